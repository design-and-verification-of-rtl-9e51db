// tb_example_sequence: the bridge's worked example, checked signal by
// signal at the default parameters.
//  APB:    write index 0 <- 32'h0000abcd  (SPI write, address 15'h2bcd)
//          write index 1 <- 32'ha5a5a5a5  (its data)
//          write index 0 <- 32'h00002bcd  (SPI read, address 15'h2bcd)
//          read  index 2 -> 32'ha5a5a5a5
// Checked: each APB write takes 3 PCLK cycles (one wait state); the SPI
// master gets a write request (wr_rdbar 1, address 2bcd, data a5a5a5a5)
// and then a read request (wr_rdbar 0, address 2bcd); the first frame on
// MOSI is 48'habcd_a5a5a5a5; in the second frame MOSI carries 16'h2bcd and
// MISO returns a5a5a5a5; the slave memory holds the word; the APB read
// returns it.
module tb_example_sequence;
  logic        pclk = 0, presetn = 0;
  logic [31:0] paddr = '0, pwdata = '0, prdata;
  logic        psel = 0, penable = 0, pwrite = 0;
  logic        pready, pslverr;
  logic        sclk, ss_n, mosi, miso;
  int checks = 0, failures = 0;

  apb_spi_top dut (.*);

  always #5 pclk = !pclk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // requests seen at the SPI master's port
  typedef struct { logic w; logic [14:0] a; logic [31:0] d; } req_t;
  req_t reqs[$];
  always @(posedge pclk)
    if (presetn && dut.master_enable)
      reqs.push_back('{dut.master_wr_rdbar, dut.master_addr, dut.master_wdata});

  // frames seen on the SPI wires
  logic [47:0] mosi_sr, miso_sr;
  logic [47:0] mosi_frames[$], miso_frames[$];
  always @(posedge sclk) begin
    mosi_sr = {mosi_sr[46:0], mosi};
    miso_sr = {miso_sr[46:0], miso};
  end
  always @(negedge ss_n) begin mosi_sr = '0; miso_sr = '0; end
  always @(posedge ss_n) if (presetn) begin
    mosi_frames.push_back(mosi_sr);
    miso_frames.push_back(miso_sr);
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
    int          cyc;
    repeat (3) @(negedge pclk);
    presetn = 1;
    repeat (2) @(negedge pclk);

    apb(32'h0, 1, 32'h0000abcd, rd, cyc); check(cyc == 3, $sformatf("write 1: %0d cycles", cyc));
    apb(32'h1, 1, 32'ha5a5a5a5, rd, cyc); check(cyc == 3, $sformatf("write 2: %0d cycles", cyc));
    apb(32'h0, 1, 32'h00002bcd, rd, cyc); check(cyc == 3, $sformatf("write 3: %0d cycles", cyc));
    apb(32'h2, 0, 32'h0, rd, cyc);
    check(rd == 32'ha5a5a5a5, $sformatf("APB read returned %h", rd));
    check(cyc > 2 * 193, $sformatf("APB read waited %0d cycles for two frames", cyc));
    wait (ss_n && dut.master_free);
    repeat (3) @(negedge pclk);

    check(reqs.size() == 2, $sformatf("%0d master requests", reqs.size()));
    if (reqs.size() == 2) begin
      check(reqs[0].w == 1'b1 && reqs[0].a == 15'h2bcd && reqs[0].d == 32'ha5a5a5a5,
            $sformatf("request 1: wr_rdbar=%b addr=%h wdata=%h", reqs[0].w, reqs[0].a, reqs[0].d));
      check(reqs[1].w == 1'b0 && reqs[1].a == 15'h2bcd,
            $sformatf("request 2: wr_rdbar=%b addr=%h", reqs[1].w, reqs[1].a));
    end
    check(mosi_frames.size() == 2, $sformatf("%0d SPI frames", mosi_frames.size()));
    if (mosi_frames.size() == 2) begin
      check(mosi_frames[0] == 48'habcd_a5a5a5a5, $sformatf("frame 1 MOSI %h", mosi_frames[0]));
      check(mosi_frames[1][47:32] == 16'h2bcd, $sformatf("frame 2 command %h", mosi_frames[1][47:32]));
      check(miso_frames[1][31:0] == 32'ha5a5a5a5, $sformatf("frame 2 MISO %h", miso_frames[1][31:0]));
    end
    check(dut.u_spi_slave_memory.mem[15'h2bcd] == 32'ha5a5a5a5, "slave memory holds the word");
    check(dut.rdata_fifo_empty, "read FIFO empty at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
