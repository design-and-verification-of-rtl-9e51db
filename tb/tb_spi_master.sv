// tb_spi_master: self-checking test of spi_master (SCLK_HALF = 2).
// A behavioural SPI slave in the testbench samples MOSI on rising SCLK and
// drives MISO on falling SCLK. For random writes and reads it checks the
// 16-bit command (wr_rdbar, address) and 32 write bits on MOSI, the 32 read
// bits returned on rdata, 48 SCLK rising edges per frame, SS_n low for the
// whole frame, and the busy time of 3 + 96*SCLK_HALF clocks.
module tb_spi_master;
  localparam int H = 2;
  logic        sys_clk = 0, rst_n = 0;
  logic        enable = 0, wr_rdbar = 0;
  logic [14:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  logic        free, sclk, ss_n, mosi, miso = 0;
  int checks = 0, failures = 0;

  spi_master #(.SCLK_HALF(H)) dut (.*);

  always #5 sys_clk = !sys_clk;

  // behavioural slave
  logic [47:0] rx;
  int          nrise = 0;
  logic [31:0] slave_word;
  always @(posedge sclk) begin
    if (ss_n) begin failures++; $display("FAIL: SCLK rose with SS_n high"); end
    rx = {rx[46:0], mosi};
    nrise++;
  end
  always @(negedge sclk) begin
    if (nrise >= 16 && nrise < 48 && !rx[15 + (nrise - 16)])
      miso = slave_word[31 - (nrise - 16)];
  end
  always @(negedge ss_n) begin nrise = 0; rx = '0; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge sys_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge sys_clk);
    rst_n = 1;
    @(negedge sys_clk);
    check(free && ss_n && !sclk, "idle after reset");
    for (int n = 0; n < 40; n++) begin
      logic        w;
      logic [14:0] a;
      logic [31:0] d;
      int          busy;
      w = (n == 0) ? 1'b1 : 1'($urandom);
      a = (n == 0) ? 15'h2bcd : 15'($urandom);
      d = (n == 0) ? 32'ha5a5a5a5 : $urandom;
      slave_word = $urandom;
      @(negedge sys_clk);
      enable = 1; wr_rdbar = w; addr = a; wdata = d;
      @(negedge sys_clk);
      enable = 0; wr_rdbar = 0; addr = '0; wdata = '0;  // request is latched
      busy = 1;
      while (!free) begin @(negedge sys_clk); busy++; end
      busy--;
      check(busy == 3 + 96 * H, $sformatf("busy %0d cycles, expected %0d", busy, 3 + 96 * H));
      check(nrise == 48, $sformatf("%0d SCLK rising edges", nrise));
      check(rx[47] == w && rx[46:32] == a, $sformatf("command %h", rx[47:32]));
      if (w) check(rx[31:0] == d, $sformatf("write data %h expected %h", rx[31:0], d));
      else   check(rdata == slave_word, $sformatf("read data %h expected %h", rdata, slave_word));
      check(ss_n && !sclk, "bus idle after frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
