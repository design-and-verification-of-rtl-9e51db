// tb_apb_slave: self-checking test of apb_slave.
// The testbench is the APB requester and also stands in for the SPI
// controller's FIFO flags and read data. It checks:
//  - an unblocked transfer takes 3 PCLK cycles (exactly one wait state);
//  - writes to index 0 and 1 give one reg_write pulse with the right index
//    and data, completing in the same cycle as PREADY;
//  - a full command / write-data FIFO holds the transfer in wait states
//    and the write happens only after the flag drops;
//  - a read of index 2 waits while the read FIFO is empty, returns
//    reg_rdata and gives one reg_read pulse;
//  - accesses to unmapped indices complete with no strobe, PRDATA 0;
//  - PSLVERR stays low.
module tb_apb_slave;
  logic        pclk = 0, presetn = 0;
  logic [31:0] paddr = '0, pwdata = '0, prdata, reg_wdata;
  logic        psel = 0, penable = 0, pwrite = 0;
  logic        pready, pslverr, reg_write, reg_read;
  logic [1:0]  reg_addr;
  logic [31:0] reg_rdata = 32'h0;
  logic        cmd_fifo_full = 0, wdata_fifo_full = 0, rdata_fifo_empty = 1;
  int checks = 0, failures = 0;

  // strobes seen by the monitor
  int          n_write = 0, n_read = 0;
  logic [1:0]  last_addr;
  logic [31:0] last_wdata;

  apb_slave dut (.*);

  always #5 pclk = !pclk;

  always @(posedge pclk) if (presetn) begin
    if (reg_write) begin
      n_write++; last_addr = reg_addr; last_wdata = reg_wdata;
      if (!(psel && penable && pready)) begin
        failures++; $display("FAIL: reg_write outside the completing cycle");
      end
    end
    if (reg_read) n_read++;
    if (pslverr) begin failures++; $display("FAIL: PSLVERR high"); end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One APB transfer; cycles counts setup to completion inclusive.
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
  endtask

  initial begin
    repeat (5000) @(posedge pclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd;
    int cyc, w0, r0;
    repeat (3) @(negedge pclk);
    presetn = 1;

    // write command, as in the published example
    w0 = n_write;
    apb(32'h0, 1, 32'h0000abcd, rd, cyc);
    check(cyc == 3, $sformatf("command write took %0d cycles, expected 3", cyc));
    check(n_write == w0 + 1 && last_addr == 2'd0 && last_wdata == 32'h0000abcd, "command write strobe");
    // write data
    w0 = n_write;
    apb(32'h1, 1, 32'ha5a5a5a5, rd, cyc);
    check(cyc == 3, $sformatf("data write took %0d cycles, expected 3", cyc));
    check(n_write == w0 + 1 && last_addr == 2'd1 && last_wdata == 32'ha5a5a5a5, "data write strobe");

    // command FIFO full: the transfer waits until the flag drops
    cmd_fifo_full = 1;
    w0 = n_write;
    fork
      apb(32'h0, 1, 32'h00002bcd, rd, cyc);
      begin repeat (6) @(negedge pclk); check(n_write == w0, "no write while cmd FIFO full"); cmd_fifo_full = 0; end
    join
    check(cyc > 6, $sformatf("stalled command write took %0d cycles", cyc));
    check(n_write == w0 + 1 && last_wdata == 32'h00002bcd && last_addr == 2'd0, "stalled command written once");

    // write-data FIFO full
    wdata_fifo_full = 1;
    w0 = n_write;
    fork
      apb(32'h5, 1, 32'h12345678, rd, cyc);   // PADDR[1:0] = 1
      begin repeat (4) @(negedge pclk); check(n_write == w0, "no write while data FIFO full"); wdata_fifo_full = 0; end
    join
    check(cyc > 4, "data write stalled");
    check(n_write == w0 + 1 && last_addr == 2'd1 && last_wdata == 32'h12345678, "stalled data written once");

    // read with the read FIFO empty: waits, then returns reg_rdata
    r0 = n_read;
    fork
      apb(32'h2, 0, 32'h0, rd, cyc);
      begin
        repeat (8) @(negedge pclk);
        check(n_read == r0, "no read while read FIFO empty");
        reg_rdata = 32'hcafe0001; rdata_fifo_empty = 0;
      end
    join
    check(cyc > 8, "read waited for data");
    check(rd == 32'hcafe0001, $sformatf("read data %h", rd));
    check(n_read == r0 + 1, "one reg_read pulse");

    // read with data present: one wait state
    reg_rdata = 32'h0badf00d;
    r0 = n_read;
    apb(32'h2, 0, 32'h0, rd, cyc);
    check(cyc == 3 && rd == 32'h0badf00d && n_read == r0 + 1, "unblocked read");

    // unmapped accesses
    w0 = n_write; r0 = n_read;
    apb(32'h0, 0, 32'h0, rd, cyc);
    check(cyc == 3 && rd == 32'h0 && n_read == r0, "read of index 0 moves nothing");
    apb(32'h2, 1, 32'hffffffff, rd, cyc);
    check(cyc == 3 && n_write == w0, "write to index 2 moves nothing");
    apb(32'h3, 1, 32'hffffffff, rd, cyc);
    check(cyc == 3 && n_write == w0, "write to index 3 moves nothing");

    // back-to-back writes with random data
    for (int i = 0; i < 20; i++) begin
      logic [31:0] d;
      d = $urandom;
      w0 = n_write;
      apb({30'($urandom), 2'(i % 2)}, 1, d, rd, cyc);
      check(cyc == 3 && n_write == w0 + 1 && last_wdata == d && last_addr == 2'(i % 2), "random write");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
