// tb_merge_pipeline: self-checking test of the channel arbiter on a link.
// Two 4-phase senders model the merge_virtual modules of channels 0 and 1
// and offer numbered flits tagged with their channel; a 2-phase link
// receiver accepts (ra) or refuses (rn) each flit at random. Checked: each
// channel's flits are accepted once and in order, a refused flit is offered
// again, and whenever a flit is refused while the other channel is waiting,
// the next flit on the link comes from the other channel (the refusal lets
// the other channel pass). That case must occur.
module tb_merge_pipeline;
  localparam int W = 16, NPER = 150;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] lr, la;
  logic [1:0][W-1:0] din;
  logic rr, ra, rn;
  logic [W-1:0] dout;
  int checks = 0, failures = 0;
  int next_seq[2];
  int n_acc = 0, n_ref = 0, n_pass = 0;

  always #5 clk = ~clk;

  merge_pipeline #(.W(W)) dut (.clk, .rst_n, .lr, .la, .din, .rr, .ra, .rn, .dout);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic sender(input int c);
    for (int q = 0; q < NPER; q++) begin
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1 din[c] = W'((c << 12) | q);
      lr[c] = 1'b1;
      while (!la[c]) @(posedge clk);
      #1 lr[c] = 1'b0;
      while (la[c]) @(posedge clk);
    end
  endtask

  initial begin
    logic rr_seen;
    int expect_other;   // -1: no constraint, else channel that must come next
    ra = 1'b0; rn = 1'b0; rr_seen = 1'b0; expect_other = -1;
    forever begin
      @(negedge clk);
      if (rst_n) begin
        check($countones(la) <= 1, "one channel acknowledged at a time");
        if (rr != rr_seen) begin
          int c, q;
          rr_seen = rr;
          c = int'(dout) >> 12;
          q = int'(dout) & 12'hfff;
          if (expect_other >= 0) begin
            check(c == expect_other, "after a refusal the waiting channel goes next");
            if (c == expect_other) n_pass++;
          end
          expect_other = -1;
          repeat ($urandom_range(0, 3)) @(negedge clk);
          if ($urandom_range(0, 2) == 0) begin
            n_ref++;
            if (lr[1-c]) expect_other = 1 - c;
            rn = ~rn;
          end else begin
            check(c < 2 && q == next_seq[c], $sformatf("channel %0d flit %0d, expected %0d", c, q, next_seq[c]));
            if (c < 2) next_seq[c] = q + 1;
            n_acc++;
            ra = ~ra;
          end
        end
      end
    end
  end

  initial begin
    lr = '0; din = '0; next_seq[0] = 0; next_seq[1] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      sender(0);
      sender(1);
    join
    repeat (20) @(posedge clk);
    check(n_acc == 2 * NPER, "every flit accepted once");
    check(n_pass > 0, "a refusal let the other channel pass");
    $display("accepted=%0d refused=%0d passes=%0d", n_acc, n_ref, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
