// tb_conv_4to2_nack: self-checking test of the nacking 4-to-2-phase converter.
// A 4-phase sender offers numbered flits and resends one that was refused
// (ln); a 2-phase receiver answers each rr transition with ra (taken) or, at
// random, rn (refused). Checked: the receiver takes every flit exactly once
// and in order, each refusal reaches the sender as ln and each acceptance as
// la, la and ln are never high together, dout is stable until answered, and
// an answer reaches la/ln one cycle after it arrives.
module tb_conv_4to2_nack;
  localparam int W = 16, NFLIT = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lr, la, ln, rr, ra, rn;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;
  int rcv_q[$];
  int n_rn = 0, n_ln = 0;

  always #5 clk = ~clk;

  conv_4to2_nack #(.W(W)) dut (.clk, .rst_n, .lr, .la, .ln, .rr, .ra, .rn, .din, .dout);

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

  initial begin
    logic rr_seen;
    logic [W-1:0] held;
    ra = 1'b0; rn = 1'b0; rr_seen = 1'b0;
    forever begin
      @(negedge clk);
      if (rst_n && rr != rr_seen) begin
        rr_seen = rr;
        held = dout;
        repeat ($urandom_range(0, 5)) begin
          @(negedge clk);
          check(dout == held, "dout stable until answered");
        end
        if ($urandom_range(0, 2) == 0) begin
          rn = ~rn; n_rn++;
        end else begin
          rcv_q.push_back(int'(dout));
          ra = ~ra;
        end
        @(posedge clk); @(negedge clk);
        check(la || ln, "answer one cycle after the link answer");
      end
      check(!(la && ln), "la and ln together");
    end
  end

  initial begin
    lr = 1'b0; din = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int id = 0; id < NFLIT; ) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 din = W'(id); lr = 1'b1;
      while (!la && !ln) @(posedge clk);
      #1;
      if (la) id++; else n_ln++;
      lr = 1'b0;
      while (la || ln) @(posedge clk);
    end
    while (rcv_q.size() < NFLIT) @(posedge clk);
    for (int i = 0; i < NFLIT; i++) check(rcv_q[i] == i, $sformatf("flit %0d arrived as %0d", i, rcv_q[i]));
    check(n_ln == n_rn, "every link refusal reached the sender");
    check(n_rn > 0, "refusals happened");
    $display("refusals=%0d", n_rn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
