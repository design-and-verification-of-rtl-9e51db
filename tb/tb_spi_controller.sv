// tb_spi_controller: self-checking test of spi_controller (FIFO_DEPTH = 4).
// The testbench drives the register port directly and stands in for the
// SPI master: it records each request (master_enable with wr_rdbar, addr,
// wdata), stays busy for a random number of cycles, and for reads returns
// a word computed from the address. Checked:
//  - the published example: command 16'habcd then data 32'ha5a5a5a5 gives
//    an SPI write of a5a5a5a5 to 15'h2bcd; command 16'h2bcd gives an SPI
//    read of 15'h2bcd;
//  - a write command queued before its data waits for the data;
//  - requests are issued only while the master is free, in command order;
//  - read results go through the read FIFO in order;
//  - cmd_fifo_full / wdata_fifo_full rise when the FIFOs fill up and
//    rdata_fifo_empty follows the read FIFO.
module tb_spi_controller;
  localparam int D = 4;
  logic        clk = 0, rst_n = 0;
  logic [1:0]  reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic        reg_write = 0, reg_read = 0;
  logic        cmd_fifo_full, wdata_fifo_full, rdata_fifo_empty;
  logic        master_wr_rdbar, master_enable;
  logic [14:0] master_addr;
  logic [31:0] master_wdata, master_rdata = '0;
  logic        master_free = 1;
  int checks = 0, failures = 0;

  spi_controller #(.FIFO_DEPTH(D)) dut (.*);

  always #5 clk = !clk;

  function automatic logic [31:0] rd_word(input logic [14:0] a);
    return {~a, 2'b10, a} ^ 32'h5a5a_0000;
  endfunction

  // master stand-in
  typedef struct { logic w; logic [14:0] a; logic [31:0] d; } req_t;
  req_t reqs[$];
  int   busy_left = 0;
  bit   hold_busy = 0;           // keep the master busy from outside
  always @(posedge clk) begin
    if (master_enable) begin
      if (!master_free) begin failures++; $display("FAIL: enable while busy"); end
      reqs.push_back('{master_wr_rdbar, master_addr, master_wdata});
      busy_left <= $urandom_range(2, 12);
      master_free <= 0;
    end else if (!master_free && !hold_busy) begin
      if (busy_left == 0) begin
        master_free <= 1;
        if (!reqs[$].w) master_rdata <= rd_word(reqs[$].a);
      end else busy_left <= busy_left - 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic reg_wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    reg_addr = a; reg_wdata = d; reg_write = 1;
    @(negedge clk);
    reg_write = 0;
  endtask

  task automatic reg_rd(output logic [31:0] d);
    while (rdata_fifo_empty) @(negedge clk);
    d = reg_rdata; reg_addr = 2'd2; reg_read = 1;
    @(negedge clk);
    reg_read = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int          seen_full_cmd, seen_full_wdata;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(rdata_fifo_empty && !cmd_fifo_full && !wdata_fifo_full, "flags after reset");

    // published example: command first, data later
    reg_wr(2'd0, 32'h0000abcd);
    repeat (10) @(negedge clk);
    check(reqs.size() == 0, "write command waits for its data");
    reg_wr(2'd1, 32'ha5a5a5a5);
    reg_wr(2'd0, 32'h00002bcd);
    repeat (60) @(negedge clk);
    check(reqs.size() == 2, $sformatf("%0d requests", reqs.size()));
    if (reqs.size() == 2) begin
      check(reqs[0].w == 1 && reqs[0].a == 15'h2bcd && reqs[0].d == 32'ha5a5a5a5, "SPI write request");
      check(reqs[1].w == 0 && reqs[1].a == 15'h2bcd, "SPI read request");
    end
    check(!rdata_fifo_empty, "read result queued");
    reg_rd(d);
    check(d == rd_word(15'h2bcd), $sformatf("read result %h", d));
    check(rdata_fifo_empty, "read FIFO empty again");
    reqs.delete();

    // master held busy: FIFOs fill up
    hold_busy = 1;
    reg_wr(2'd0, 32'h00008001); reg_wr(2'd1, 32'h11111111);   // taken by the controller
    repeat (5) @(negedge clk);
    check(reqs.size() == 1, "first request issued");
    seen_full_cmd = 0; seen_full_wdata = 0;
    for (int i = 0; i < D; i++) begin
      reg_wr(2'd0, 32'h8010 + 32'(i));
      reg_wr(2'd1, 32'h22220000 + i);
    end
    @(negedge clk);
    check(cmd_fifo_full && wdata_fifo_full, "command and data FIFOs full");
    hold_busy = 0;
    repeat (200) @(negedge clk);
    check(reqs.size() == D + 1, $sformatf("%0d queued writes issued", reqs.size()));
    for (int i = 1; i < reqs.size(); i++)
      check(reqs[i].w && reqs[i].a == 15'(32'h10 + 32'(i) - 1) && reqs[i].d == 32'h22220000 + i - 1,
            $sformatf("queued write %0d in order", i));
    reqs.delete();

    // random mix of writes and reads
    for (int n = 0; n < 60; n++) begin
      logic        w;
      logic [14:0] a;
      logic [31:0] wd, got;
      w = 1'($urandom); a = 15'($urandom); wd = $urandom;
      if (w) begin
        if ($urandom_range(0, 1) == 1) begin reg_wr(2'd1, wd); reg_wr(2'd0, {16'h0, 1'b1, a}); end
        else                      begin reg_wr(2'd0, {16'h0, 1'b1, a}); reg_wr(2'd1, wd); end
        while (reqs.size() == 0 || !master_free) @(negedge clk);
        check(reqs[0].w && reqs[0].a == a && reqs[0].d == wd, "random write request");
      end else begin
        reg_wr(2'd0, {16'h0, 1'b0, a});
        reg_rd(got);
        check(reqs.size() == 1 && !reqs[0].w && reqs[0].a == a, "random read request");
        check(got == rd_word(a), "random read data");
      end
      reqs.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
