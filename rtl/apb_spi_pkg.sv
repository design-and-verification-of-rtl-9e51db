// apb_spi_pkg: types and constants shared by the APB-to-SPI bridge.
//
// Register map seen from the APB side (word index PADDR[1:0]):
//   0  command FIFO   : write only. PWDATA[15] = 1 for an SPI write, 0 for an
//                        SPI read; PWDATA[14:0] = SPI word address.
//   1  write-data FIFO: write only. 32-bit data for the next SPI write.
//   2  read-data FIFO : read only. 32-bit data returned by an SPI read.
// The map, the 16-bit command layout and the 32-bit data width follow the
// published description of the bridge. Index 3 is unused (this design's choice).
package apb_spi_pkg;

  localparam int unsigned DATA_W     = 32;   // APB and SPI data word
  localparam int unsigned SPI_ADDR_W = 15;   // SPI word address
  localparam int unsigned CMD_W      = 16;   // command word: wr_rdbar + address

  typedef enum logic [1:0] {
    REG_CMD   = 2'd0,
    REG_WDATA = 2'd1,
    REG_RDATA = 2'd2,
    REG_NONE  = 2'd3
  } reg_addr_e;

  // Command word as stored in the command FIFO.
  typedef struct packed {
    logic                  wr_rdbar;  // 1: SPI write, 0: SPI read
    logic [SPI_ADDR_W-1:0] addr;
  } spi_cmd_t;

endpackage
