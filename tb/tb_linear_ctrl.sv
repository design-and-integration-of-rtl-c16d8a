// tb_linear_ctrl: self-checking test of the 4-phase linear latch controller.
// A 4-phase sender offers numbered flits on lr; a model latch loads the flit
// when cap pulses; a slow 4-phase receiver takes flits on rr/ra after random
// delays. Checked: every flit arrives once, in order, so the latch is never
// overwritten before the receiver took it; an idle controller forwards a
// request on rr two cycles after lr rises.
module tb_linear_ctrl;
  localparam int NFLIT = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lr, la, ln, rr, ra, cap;
  int checks = 0, failures = 0;
  int data, latch, n_nack = 0;
  bit outstanding;
  logic ln_d;
  int acc_q[$], rcv_q[$];

  always #5 clk = ~clk;

  linear_ctrl dut (.clk, .rst_n, .lr, .la, .rr, .ra, .cap);
  assign ln = 1'b0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // latch model and protocol checks, sampled between edges
  always @(negedge clk) if (rst_n) begin
    if (cap) begin
      latch <= data;
      outstanding <= 1'b1;
    end
    ln_d <= ln;
    if (ln && !ln_d) begin
      check(outstanding, "refusal only while a flit waits for ra");
      n_nack++;
    end
    check(!(la && ln), "la and ln together");
  end

  // receiver
  initial begin
    ra = 1'b0;
    forever begin
      @(posedge clk);
      if (rr && !ra) begin
        repeat ($urandom_range(0, 8)) @(posedge clk);
        #1 rcv_q.push_back(latch);
        ra = 1'b1;
        outstanding = 1'b0;
        do @(posedge clk); while (rr);
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1 ra = 1'b0;
      end
    end
  end

  initial begin
    lr = 1'b0; data = 0; outstanding = 1'b0; ln_d = 1'b0; latch = -1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    // latency on an idle arbiter
    #1 data = 0; lr = 1'b1;
    repeat (2) @(posedge clk);
    #1 check(rr, "rr two cycles after lr+");
    while (!la && !ln) @(posedge clk);
    #1 acc_q.push_back(0);
    lr = 1'b0;
    while (la || ln) @(posedge clk);
    for (int id = 1; id < NFLIT; ) begin
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1 data = id; lr = 1'b1;
      while (!la && !ln) @(posedge clk);
      #1;
      if (la) begin acc_q.push_back(id); id++; end
      lr = 1'b0;
      while (la || ln) @(posedge clk);
    end
    while (rcv_q.size() < NFLIT) @(posedge clk);
    check(rcv_q.size() == acc_q.size(), "every accepted flit delivered once");
    for (int i = 0; i < NFLIT; i++) check(rcv_q[i] == i, $sformatf("flit %0d delivered as %0d", i, rcv_q[i]));
    check(n_nack == 0, "no refusals");
    $display("refusals=%0d", n_nack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
