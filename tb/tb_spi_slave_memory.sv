// tb_spi_slave_memory: self-checking test of spi_slave_memory (defaults:
// 15-bit address, 32-bit data). The testbench is the SPI master: SCLK
// idles low, MOSI changes while SCLK is low, each SCLK half period lasts
// two clocks, MISO is sampled as SCLK rises. A reference array holds what
// should be in memory. Checked: write frames store data, read frames return
// it MSB first, a write frame cut short by SS_n stores nothing, and
// addresses at both ends of the range work.
module tb_spi_slave_memory;
  logic clk = 0, rst_n = 0;
  logic sclk = 0, ss_n = 1, mosi = 0, miso;
  int checks = 0, failures = 0;
  logic [31:0] model [logic [14:0]];

  spi_slave_memory dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // nbits bits of a 48-bit frame; returns the MISO bits sampled
  task automatic frame(input logic [47:0] tx, input int nbits, output logic [47:0] rx);
    rx = '0;
    @(negedge clk); ss_n = 0;
    for (int i = 0; i < nbits; i++) begin
      mosi = tx[47 - i];
      repeat (2) @(negedge clk);
      rx[47 - i] = miso; sclk = 1;
      repeat (2) @(negedge clk);
      sclk = 0;
    end
    repeat (2) @(negedge clk);
    ss_n = 1; mosi = 0;
    repeat (2) @(negedge clk);
  endtask

  task automatic spi_write(input logic [14:0] a, input logic [31:0] d);
    logic [47:0] rx;
    frame({1'b1, a, d}, 48, rx);
    model[a] = d;
  endtask

  task automatic spi_read(input logic [14:0] a, output logic [31:0] d);
    logic [47:0] rx;
    frame({1'b0, a, 32'h0}, 48, rx);
    d = rx[31:0];
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [47:0] rx;
    logic [14:0] keys[$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    spi_write(15'h2bcd, 32'ha5a5a5a5);
    spi_read(15'h2bcd, d);
    check(d == 32'ha5a5a5a5, $sformatf("read %h", d));
    check(miso == 0, "MISO low between frames");
    spi_write(15'h0000, 32'h00000001);
    spi_write(15'h7fff, 32'h80000000);
    spi_read(15'h0000, d); check(d == 32'h00000001, "address 0");
    spi_read(15'h7fff, d); check(d == 32'h80000000, "address 7fff");
    // aborted write: 40 of 48 bits
    frame({1'b1, 15'h2bcd, 32'h12345678}, 40, rx);
    spi_read(15'h2bcd, d);
    check(d == 32'ha5a5a5a5, "aborted write stored nothing");
    for (int n = 0; n < 60; n++) begin
      logic [14:0] a;
      a = 15'($urandom_range(0, 63)) << 9 | 15'($urandom_range(0, 3));
      spi_write(a, $urandom);
    end
    keys = '{};
    foreach (model[k]) keys.push_back(k);
    foreach (keys[i]) begin
      spi_read(keys[i], d);
      check(d == model[keys[i]], $sformatf("addr %h read %h expected %h", keys[i], d, model[keys[i]]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
