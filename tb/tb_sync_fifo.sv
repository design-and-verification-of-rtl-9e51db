// tb_sync_fifo: self-checking test of sync_fifo (8-bit wide, 4 deep).
// A queue in the testbench is the reference. Random pushes and pops (never
// into a full or out of an empty FIFO) are checked entry by entry, and the
// full/empty flags are compared with the queue size after every cycle.
// Also checks that the head is visible without a read (fall-through).
module tb_sync_fifo;
  localparam int W = 8, D = 4;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic full, empty;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hit_full;
    hit_full = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full, "empty after reset");
    // fill to full
    for (int i = 0; i < D; i++) begin
      wr_en = 1; wr_data = W'(8'h10 + i); model.push_back(wr_data);
      @(negedge clk);
    end
    wr_en = 0;
    check(full && !empty, "full after DEPTH writes");
    check(rd_data == 8'h10, "head visible without read");
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      bit do_w, do_r;
      do_w = ($urandom_range(0, 1) == 1) && (model.size() < D);
      do_r = ($urandom_range(0, 1) == 1) && (model.size() > 0);
      wr_en = do_w; rd_en = do_r; wr_data = W'($urandom);
      if (do_r) check(rd_data == model[0], $sformatf("data %0h expected %0h", rd_data, model[0]));
      @(negedge clk);
      if (do_r) void'(model.pop_front());
      if (do_w) model.push_back(wr_data);
      wr_en = 0; rd_en = 0;
      check(full == (model.size() == D), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      if (full) hit_full++;
    end
    check(hit_full > 0, "random traffic reached full");
    // drain
    while (model.size() > 0) begin
      check(rd_data == model.pop_front(), "drain data");
      rd_en = 1; @(negedge clk); rd_en = 0;
    end
    check(empty, "empty after drain");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
