// spi_controller: queues APB register accesses and turns them into SPI
// master transactions.
//
// Three FIFOs sit behind the register port (see apb_spi_pkg for the map):
//   cmd_fifo   16-bit command words, bit 15 = write (1) / read (0),
//              bits 14:0 = SPI word address; filled by writes to index 0
//              with PWDATA[15:0], as in the published example where
//              32'habcd becomes the command 16'habcd;
//   wdata_fifo 32-bit write data, filled by writes to index 1;
//   rdata_fifo 32-bit read data, emptied by reads of index 2.
// The full/empty flags go back to the APB slave, which holds the APB
// transfer in wait states instead of losing an access.
//
// State machine (after the published diagram):
//   IDLE          waits until the command FIFO holds a command, then pops it.
//   FETCH         for a write, waits for a word in the write-data FIFO and
//                 pops it into master_wdata (a command may arrive before its
//                 data); for a read, master_wdata is cleared.
//   ISSUE         waits for master_free, then raises master_enable for one
//                 cycle with master_wr_rdbar, master_addr, master_wdata.
//   WAIT_MASTER   waits until the master is free again (its transfer ended).
//   READ_DONE     after a read, pushes master_rdata into the read-data FIFO
//                 (waiting while that FIFO is full).
// Commands are executed one at a time and in order. master_* outputs stay
// stable from ISSUE until the next command is fetched.
// FIFO depth, the FETCH wait for data and the one-cycle enable are this
// design's choices; the FIFOs, their register indices, the command layout
// and the sequence IDLE -> fetch -> master enable -> wait for master -> read
// done follow the published description.
module spi_controller
  import apb_spi_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // register port from the APB slave
  input  logic [1:0]            reg_addr,
  input  logic [DATA_W-1:0]     reg_wdata,
  input  logic                  reg_write,
  input  logic                  reg_read,
  output logic [DATA_W-1:0]     reg_rdata,
  output logic                  cmd_fifo_full,
  output logic                  wdata_fifo_full,
  output logic                  rdata_fifo_empty,
  // SPI master request port
  output logic                  master_wr_rdbar,
  output logic                  master_enable,
  output logic [SPI_ADDR_W-1:0] master_addr,
  output logic [DATA_W-1:0]     master_wdata,
  input  logic [DATA_W-1:0]     master_rdata,
  input  logic                  master_free
);

  typedef enum logic [2:0] {IDLE, FETCH, ISSUE, WAIT_MASTER, READ_DONE} state_e;
  state_e state;

  // ---------------------------------------------------------------- FIFOs
  logic [CMD_W-1:0]  cmd_rdata;
  logic              cmd_empty, cmd_pop;
  logic [DATA_W-1:0] wdata_rdata;
  logic              wdata_empty, wdata_pop;
  logic              rdata_full, rdata_push;

  sync_fifo #(.WIDTH(CMD_W), .DEPTH(FIFO_DEPTH)) u_cmd_fifo (
    .clk, .rst_n,
    .wr_en  (reg_write && reg_addr == REG_CMD),
    .wr_data(reg_wdata[CMD_W-1:0]),
    .rd_en  (cmd_pop),
    .rd_data(cmd_rdata),
    .full   (cmd_fifo_full),
    .empty  (cmd_empty)
  );

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_wdata_fifo (
    .clk, .rst_n,
    .wr_en  (reg_write && reg_addr == REG_WDATA),
    .wr_data(reg_wdata),
    .rd_en  (wdata_pop),
    .rd_data(wdata_rdata),
    .full   (wdata_fifo_full),
    .empty  (wdata_empty)
  );

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_rdata_fifo (
    .clk, .rst_n,
    .wr_en  (rdata_push),
    .wr_data(master_rdata),
    .rd_en  (reg_read),
    .rd_data(reg_rdata),
    .full   (rdata_full),
    .empty  (rdata_fifo_empty)
  );

  // -------------------------------------------------------- command engine
  spi_cmd_t cmd_q;

  assign cmd_pop         = (state == IDLE) && !cmd_empty;
  assign wdata_pop       = (state == FETCH) && cmd_q.wr_rdbar && !wdata_empty;
  assign rdata_push      = (state == READ_DONE) && !rdata_full;
  assign master_enable   = (state == ISSUE) && master_free;
  assign master_wr_rdbar = cmd_q.wr_rdbar;
  assign master_addr     = cmd_q.addr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= IDLE;
      cmd_q        <= '0;
      master_wdata <= '0;
    end else begin
      unique case (state)
        IDLE: if (!cmd_empty) begin
          cmd_q <= spi_cmd_t'(cmd_rdata);
          state <= FETCH;
        end
        FETCH: if (!cmd_q.wr_rdbar) begin
          master_wdata <= '0;
          state        <= ISSUE;
        end else if (!wdata_empty) begin
          master_wdata <= wdata_rdata;
          state        <= ISSUE;
        end
        ISSUE:       if (master_free) state <= WAIT_MASTER;
        WAIT_MASTER: if (master_free) state <= cmd_q.wr_rdbar ? IDLE : READ_DONE;
        READ_DONE:   if (!rdata_full) state <= IDLE;
        default:     state <= IDLE;
      endcase
    end
  end

endmodule
