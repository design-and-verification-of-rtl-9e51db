// spi_master: SPI bus master of the APB-to-SPI bridge.
//
// One request (enable high for a cycle while free is high) makes one SPI
// frame. SS_n goes low, then 16 command bits go out on MOSI, most
// significant bit first: wr_rdbar followed by the 15-bit word address.
// For a write the 32 bits of wdata follow on MOSI; for a read 32 bits are
// shifted in from MISO and appear on rdata once the frame ends. SS_n then
// rises and free returns high.
//
// SCLK idles low. MOSI changes when SCLK falls and is meant to be sampled on
// the rising edge; MISO is sampled by the master on the rising edge (SPI
// mode 0). Each SCLK half period lasts SCLK_HALF system clocks, so
// SCLK = sys_clk / (2*SCLK_HALF).
//
// State machine (names after the published diagram): IDLE -> ADDR_REG
// (request latched, SS_n low) -> TX_ADDR (16 bits, 4-bit down counter) ->
// TX_WDATA or RX_DATA (32 bits) -> WAIT_ST (SS_n high, read data stored) ->
// DONE -> IDLE. A frame occupies the master for 3 + 96*SCLK_HALF system
// clocks from the cycle after the request to the cycle free is high again.
// The frame layout (1 + 15 command bits then 32 data bits, MSB first) follows
// the published description; the SPI mode, the clock divider and the single
// slave select are this design's choices.
module spi_master
  import apb_spi_pkg::*;
#(
  parameter int unsigned SCLK_HALF = 2   // system clocks per SCLK half period
) (
  input  logic                  sys_clk,
  input  logic                  rst_n,
  // request port from the SPI controller
  input  logic                  enable,
  input  logic                  wr_rdbar,
  input  logic [SPI_ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0]     wdata,
  output logic [DATA_W-1:0]     rdata,
  output logic                  free,
  // SPI bus
  output logic                  sclk,
  output logic                  ss_n,
  output logic                  mosi,
  input  logic                  miso
);

  typedef enum logic [2:0] {IDLE, ADDR_REG, TX_ADDR, TX_WDATA, RX_DATA, WAIT_ST, DONE} state_e;
  state_e state;

  localparam int unsigned HW = (SCLK_HALF > 1) ? $clog2(SCLK_HALF) : 1;

  logic                     op_write;
  logic [CMD_W+DATA_W-1:0]  tx_sreg;
  logic [DATA_W-1:0]        rx_sreg;
  logic [4:0]               bit_cnt;     // bits left in the phase, minus one
  logic [HW-1:0]            half_cnt;

  wire shifting  = (state == TX_ADDR) || (state == TX_WDATA) || (state == RX_DATA);
  wire half_end  = (half_cnt == HW'(SCLK_HALF - 1));
  wire bit_end   = shifting && half_end && sclk;    // SCLK about to fall

  always_ff @(posedge sys_clk) begin
    if (!rst_n) begin
      state    <= IDLE;
      op_write <= 1'b0;
      tx_sreg  <= '0;
      rx_sreg  <= '0;
      rdata    <= '0;
      bit_cnt  <= '0;
      half_cnt <= '0;
      sclk     <= 1'b0;
    end else begin
      // SCLK generation while a phase is shifting
      if (shifting) begin
        if (half_end) begin
          half_cnt <= '0;
          sclk     <= !sclk;
          if (!sclk && state == RX_DATA) rx_sreg <= {rx_sreg[DATA_W-2:0], miso};
        end else begin
          half_cnt <= half_cnt + 1'b1;
        end
      end

      unique case (state)
        IDLE: if (enable) begin
          op_write <= wr_rdbar;
          tx_sreg  <= {wr_rdbar, addr, (wr_rdbar ? wdata : '0)};
          state    <= ADDR_REG;
        end
        ADDR_REG: begin
          bit_cnt  <= 5'(CMD_W - 1);
          half_cnt <= '0;
          sclk     <= 1'b0;
          state    <= TX_ADDR;
        end
        TX_ADDR, TX_WDATA, RX_DATA: if (bit_end) begin
          tx_sreg <= tx_sreg << 1;
          if (bit_cnt != 0) begin
            bit_cnt <= bit_cnt - 1'b1;
          end else if (state == TX_ADDR) begin
            bit_cnt <= 5'(DATA_W - 1);
            state   <= op_write ? TX_WDATA : RX_DATA;
          end else begin
            state   <= WAIT_ST;
          end
        end
        WAIT_ST: begin
          if (!op_write) rdata <= rx_sreg;
          state <= DONE;
        end
        default: state <= IDLE;   // DONE
      endcase
    end
  end

  assign free = (state == IDLE);
  assign ss_n = !((state == ADDR_REG) || shifting);
  assign mosi = shifting ? tx_sreg[CMD_W+DATA_W-1] : 1'b0;

  a_request_when_free: assert property (@(posedge sys_clk) disable iff (!rst_n)
      enable |-> free)
    else $error("spi_master: request while busy");

endmodule
