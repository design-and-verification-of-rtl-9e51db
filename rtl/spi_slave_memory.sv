// spi_slave_memory: word-addressed memory behind an SPI slave port.
//
// It answers the frames of spi_master: 16 command bits (bit 15 = write,
// bits 14:0 = word address), then 32 data bits, all MSB first. A write
// frame stores the 32 bits from MOSI at the address once the last bit is
// in. A read frame drives the addressed word on MISO, MSB first, starting
// right after the last address bit. Frames are delimited by SS_n; a frame
// cut short writes nothing.
//
// The slave runs on the system clock of the bridge and sees SCLK as a
// signal: a rising SCLK (one cycle after SCLK goes high, via a register)
// samples MOSI, a falling SCLK moves the next read bit onto MISO (SPI
// mode 0). The memory is read one clock after the address is complete.
// This needs at least two system clocks per SCLK half period.
// MISO is driven low while the slave is not sending read data.
//
// The bridge description shows an SPI slave memory on the SPI bus but gives
// no insides and no size; the 2**ADDR_W x DATA_W size follows from the
// 15-bit SPI address and 32-bit data of the command format, and everything
// else here is this design's choice.
module spi_slave_memory #(
  parameter int unsigned ADDR_W = 15,
  parameter int unsigned DATA_W = 32
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sclk,
  input  logic ss_n,
  input  logic mosi,
  output logic miso
);

  localparam int unsigned CMD_BITS   = 1 + ADDR_W;
  localparam int unsigned FRAME_BITS = CMD_BITS + DATA_W;
  localparam int unsigned CNT_W      = $clog2(FRAME_BITS + 1);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  logic              sclk_q;
  logic [CNT_W-1:0]  bit_cnt;          // rising edges seen in this frame
  logic [DATA_W-2:0] rx_sreg;          // data bits seen so far
  logic [DATA_W-1:0] tx_sreg;
  logic [ADDR_W-1:0] addr_q;
  logic              write_q;
  logic              reading;
  logic              load_pending;
  logic              mem_we;
  logic [DATA_W-1:0] mem_wdata;

  wire rise = sclk && !sclk_q;
  wire fall = !sclk && sclk_q;
  wire [DATA_W-1:0] rx_next = {rx_sreg, mosi};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sclk_q       <= 1'b0;
      bit_cnt      <= '0;
      rx_sreg      <= '0;
      tx_sreg      <= '0;
      addr_q       <= '0;
      write_q      <= 1'b0;
      reading      <= 1'b0;
      load_pending <= 1'b0;
      mem_we       <= 1'b0;
      mem_wdata    <= '0;
    end else begin
      sclk_q <= sclk;
      mem_we <= 1'b0;
      if (ss_n) begin
        bit_cnt      <= '0;
        reading      <= 1'b0;
        load_pending <= 1'b0;
      end else begin
        if (rise && bit_cnt != CNT_W'(FRAME_BITS)) begin
          bit_cnt <= bit_cnt + 1'b1;
          rx_sreg <= rx_next[DATA_W-2:0];
          if (bit_cnt == CNT_W'(CMD_BITS - 1)) begin
            // last command bit: rx_next holds {wr_rdbar, address}
            write_q      <= rx_next[ADDR_W];
            addr_q       <= rx_next[ADDR_W-1:0];
            reading      <= !rx_next[ADDR_W];
            load_pending <= !rx_next[ADDR_W];
          end
          if (bit_cnt == CNT_W'(FRAME_BITS - 1) && write_q) begin
            mem_we    <= 1'b1;
            mem_wdata <= rx_next;
          end
        end
        if (load_pending) begin
          tx_sreg      <= mem[addr_q];
          load_pending <= 1'b0;
        end else if (fall && reading && bit_cnt > CNT_W'(CMD_BITS)) begin
          tx_sreg <= tx_sreg << 1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (mem_we) mem[addr_q] <= mem_wdata;
  end

  assign miso = reading && !load_pending ? tx_sreg[DATA_W-1] : 1'b0;

endmodule
