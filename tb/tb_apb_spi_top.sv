// tb_apb_spi_top: end-to-end test of the APB-to-SPI bridge at its default
// parameters (8-entry FIFOs, SCLK = PCLK/4, 32K-word slave memory).
// The testbench is the APB requester. A reference array tracks what the
// SPI slave memory should hold; every read returned over APB is compared
// with it. Scenarios:
//  1. the example sequence: command 32'habcd (SPI write, address 15'h2bcd),
//     data 32'ha5a5a5a5, command 32'h2bcd (SPI read), then an APB read of
//     index 2 that must return a5a5a5a5;
//  2. a burst of writes that fills the command FIFO, then commands queued
//     ahead of their data so that the write-data FIFO fills; APB writes
//     are held in wait states;
//  3. a burst of read commands that fills the read-data FIFO before any
//     APB read;
//  4. accesses to unused register indices;
//  5. a random mix of writes and reads.
// Each mechanism is counted and must happen at least once: the single wait
// state, stalls on a full command / write-data FIFO, an APB read waiting
// for SPI data, a write command waiting for its data, a full read-data
// FIFO, SPI write and read frames, unmapped accesses. The length of every
// SPI frame (SS_n low for 1 + 48*4 clocks) is checked too.
module tb_apb_spi_top;
  logic        pclk = 0, presetn = 0;
  logic [31:0] paddr = '0, pwdata = '0, prdata;
  logic        psel = 0, penable = 0, pwrite = 0;
  logic        pready, pslverr;
  logic        sclk, ss_n, mosi, miso;
  int checks = 0, failures = 0;

  apb_spi_top dut (.*);

  always #5 pclk = !pclk;

  // reference memory and expected read results
  logic [31:0] model [logic [14:0]];
  logic [14:0] written[$];

  // mechanism counters
  int n_one_wait = 0, n_cmd_full_stall = 0, n_wdata_full_stall = 0, n_read_wait = 0;
  int n_wait_for_data = 0, n_rdata_full = 0, n_spi_write = 0, n_spi_read = 0, n_unmapped = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // bus monitor: frame length, frame type, stalls, PSLVERR
  int  ss_low = 0, rises = 0;
  always @(posedge pclk) if (presetn) begin
    if (pslverr) begin failures++; $display("FAIL: PSLVERR high"); end
    if (psel && penable && !pready && pwrite && paddr[1:0] == 2'd0 && dut.cmd_fifo_full)   n_cmd_full_stall++;
    if (psel && penable && !pready && pwrite && paddr[1:0] == 2'd1 && dut.wdata_fifo_full) n_wdata_full_stall++;
    if (psel && penable && !pready && !pwrite && paddr[1:0] == 2'd2 && dut.rdata_fifo_empty) n_read_wait++;
    if (dut.u_spi_controller.rdata_full) n_rdata_full++;
    if (!ss_n) ss_low++;
    else if (ss_low != 0) begin
      checks++;
      if (ss_low != 1 + 48 * 4) begin
        failures++; $display("FAIL: SS_n low for %0d clocks", ss_low);
      end
      ss_low = 0;
    end
  end
  always @(posedge sclk) begin
    rises++;
    if (rises == 1) begin
      if (mosi) n_spi_write++; else n_spi_read++;
    end
  end
  always @(posedge ss_n) if (presetn) begin
    checks++;
    if (rises != 48) begin failures++; $display("FAIL: %0d SCLK edges in frame", rises); end
    rises = 0;
  end

  task automatic apb(input logic [31:0] a, input logic w, input logic [31:0] d,
                     output logic [31:0] rd, output int cycles);
    @(negedge pclk);
    psel = 1; penable = 0; paddr = a; pwrite = w; pwdata = d; cycles = 1;
    @(negedge pclk);
    penable = 1; cycles++;
    while (!pready) begin @(negedge pclk); cycles++; end
    rd = prdata;
    @(negedge pclk);
    psel = 0; penable = 0;
    if (cycles == 3) n_one_wait++;
  endtask

  task automatic apb_write(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] rd;
    int          c;
    apb(a, 1, d, rd, c);
  endtask

  task automatic apb_read(input logic [31:0] a, output logic [31:0] d);
    int c;
    apb(a, 0, 32'h0, d, c);
  endtask

  task automatic spi_write(input logic [14:0] a, input logic [31:0] d);
    apb_write(32'h0, {16'h0, 1'b1, a});
    apb_write(32'h1, d);
    if (!model.exists(a)) written.push_back(a);
    model[a] = d;
  endtask

  task automatic read_cmd(input logic [14:0] a);
    apb_write(32'h0, {16'h0, 1'b0, a});
  endtask

  task automatic read_result(input logic [14:0] a);
    logic [31:0] d;
    apb_read(32'h2, d);
    check(d == model[a], $sformatf("read %h from %h, expected %h", d, a, model[a]));
  endtask

  initial begin
    repeat (400000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [14:0] burst[$];
    repeat (3) @(negedge pclk);
    presetn = 1;
    repeat (2) @(negedge pclk);

    // 1. example sequence
    apb_write(32'h0, 32'h0000abcd);
    repeat (20) @(negedge pclk);
    check(ss_n, "no SPI frame before the write data arrives");
    if (ss_n) n_wait_for_data++;
    apb_write(32'h1, 32'ha5a5a5a5);
    apb_write(32'h0, 32'h00002bcd);
    written.push_back(15'h2bcd); model[15'h2bcd] = 32'ha5a5a5a5;
    apb_read(32'h2, d);
    check(d == 32'ha5a5a5a5, $sformatf("example read returned %h", d));

    // 2. write burst
    for (int i = 0; i < 14; i++) begin
      logic [14:0] a;
      a = 15'($urandom);
      burst.push_back(a);
      spi_write(a, $urandom);
    end

    // 2b. commands queued ahead of their data: the write-data FIFO fills
    begin
      logic [14:0] a[10];
      logic [31:0] wd[10];
      foreach (a[i]) begin a[i] = 15'($urandom); wd[i] = $urandom; end
      for (int i = 0; i < 9; i++) apb_write(32'h0, {16'h0, 1'b1, a[i]});
      for (int i = 0; i < 10; i++) apb_write(32'h1, wd[i]);
      apb_write(32'h0, {16'h0, 1'b1, a[9]});
      foreach (a[i]) begin
        if (!model.exists(a[i])) written.push_back(a[i]);
        model[a[i]] = wd[i];
      end
    end

    // 3. read burst, results collected afterwards
    foreach (burst[i]) if (i < 11) read_cmd(burst[i]);
    repeat (11 * 200) @(negedge pclk);
    foreach (burst[i]) if (i < 11) read_result(burst[i]);

    // 4. unused register indices
    apb_read(32'h0, d);  check(d == 0, "read of index 0 returns 0"); n_unmapped++;
    apb_read(32'h1, d);  check(d == 0, "read of index 1 returns 0"); n_unmapped++;
    apb_write(32'h3, 32'hdeadbeef); n_unmapped++;
    apb_write(32'h2, 32'hdeadbeef); n_unmapped++;
    spi_write(15'h0001, 32'h01234567);
    read_cmd(15'h0001); read_result(15'h0001);

    // 5. random mix
    for (int n = 0; n < 120; n++) begin
      if ($urandom_range(0, 2) != 0 || written.size() == 0) begin
        spi_write(15'($urandom), $urandom);
      end else begin
        logic [14:0] a;
        a = written[$urandom_range(0, written.size() - 1)];
        read_cmd(a);
        read_result(a);
      end
    end

    // all writes reach the memory
    foreach (written[i]) begin
      read_cmd(written[i]);
      read_result(written[i]);
    end
    wait (ss_n && dut.master_free);
    repeat (5) @(negedge pclk);

    $display("mechanisms: one_wait=%0d cmd_full_stall=%0d wdata_full_stall=%0d read_wait=%0d wait_for_data=%0d rdata_full=%0d spi_write=%0d spi_read=%0d unmapped=%0d",
             n_one_wait, n_cmd_full_stall, n_wdata_full_stall, n_read_wait, n_wait_for_data,
             n_rdata_full, n_spi_write, n_spi_read, n_unmapped);
    check(n_one_wait > 0,         "single wait state seen");
    check(n_cmd_full_stall > 0,   "command FIFO full stall seen");
    check(n_wdata_full_stall > 0, "write-data FIFO full stall seen");
    check(n_read_wait > 0,        "APB read waited for SPI data");
    check(n_wait_for_data > 0,    "command waited for its data");
    check(n_rdata_full > 0,       "read-data FIFO full seen");
    check(n_spi_write > 0,        "SPI write frames seen");
    check(n_spi_read > 0,         "SPI read frames seen");
    check(n_unmapped > 0,         "unmapped accesses done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
