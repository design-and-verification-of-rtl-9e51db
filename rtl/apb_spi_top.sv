// apb_spi_top: APB-to-SPI bridge with the SPI slave memory it talks to.
//
// A CPU on the APB writes commands and data into the bridge and reads the
// results back; the bridge runs each command as an SPI frame to the memory:
//
//   APB --> apb_slave --reg port--> spi_controller --request--> spi_master
//                                   (cmd/wdata/rdata FIFOs)         | SCLK, SS_n, MOSI
//                                                                    v  ^ MISO
//                                                            spi_slave_memory
//
// Programming: write {wr_rdbar, addr[14:0]} to register index 0 (PADDR[1:0]
// = 0) and, for a write, the 32-bit data to index 1 (either order); for a
// read, then read index 2, which waits (PREADY low) until the SPI read has
// returned its word. All blocks share one clock (PCLK) and the synchronous,
// active-low reset PRESETn. The SPI wires are brought out so that they can
// be observed.
//
// The chain of four blocks and their connections follow the published
// interface diagram; the clock divider and FIFO depth are this design's
// choices (parameters below).
module apb_spi_top
  import apb_spi_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8,
  parameter int unsigned SCLK_HALF  = 2,
  parameter int unsigned MEM_ADDR_W = SPI_ADDR_W
) (
  input  logic              pclk,
  input  logic              presetn,
  input  logic [31:0]       paddr,
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [DATA_W-1:0] pwdata,
  output logic              pready,
  output logic              pslverr,
  output logic [DATA_W-1:0] prdata,
  // SPI bus, for observation
  output logic              sclk,
  output logic              ss_n,
  output logic              mosi,
  output logic              miso
);

  // The slave memory samples SCLK with the system clock.
  if (SCLK_HALF < 2) begin : g_check_div
    $error("apb_spi_top: SCLK_HALF must be at least 2");
  end

  logic [1:0]            reg_addr;
  logic [DATA_W-1:0]     reg_wdata, reg_rdata;
  logic                  reg_write, reg_read;
  logic                  cmd_fifo_full, wdata_fifo_full, rdata_fifo_empty;
  logic                  master_wr_rdbar, master_enable, master_free;
  logic [SPI_ADDR_W-1:0] master_addr;
  logic [DATA_W-1:0]     master_wdata, master_rdata;

  apb_slave u_apb_slave (
    .pclk, .presetn, .paddr, .psel, .penable, .pwrite, .pwdata,
    .pready, .pslverr, .prdata,
    .reg_addr, .reg_wdata, .reg_write, .reg_read, .reg_rdata,
    .cmd_fifo_full, .wdata_fifo_full, .rdata_fifo_empty
  );

  spi_controller #(.FIFO_DEPTH(FIFO_DEPTH)) u_spi_controller (
    .clk(pclk), .rst_n(presetn),
    .reg_addr, .reg_wdata, .reg_write, .reg_read, .reg_rdata,
    .cmd_fifo_full, .wdata_fifo_full, .rdata_fifo_empty,
    .master_wr_rdbar, .master_enable, .master_addr, .master_wdata,
    .master_rdata, .master_free
  );

  spi_master #(.SCLK_HALF(SCLK_HALF)) u_spi_master (
    .sys_clk(pclk), .rst_n(presetn),
    .enable(master_enable), .wr_rdbar(master_wr_rdbar), .addr(master_addr),
    .wdata(master_wdata), .rdata(master_rdata), .free(master_free),
    .sclk, .ss_n, .mosi, .miso
  );

  spi_slave_memory #(.ADDR_W(MEM_ADDR_W), .DATA_W(DATA_W)) u_spi_slave_memory (
    .clk(pclk), .rst_n(presetn),
    .sclk, .ss_n, .mosi, .miso
  );

endmodule
