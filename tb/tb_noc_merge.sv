// tb_noc_merge: self-checking test of the merge module (no virtual channels).
// Four 4-phase senders model switches and offer numbered flits tagged with
// their source; a 2-phase link receiver answers after random delays. Checked:
// every flit arrives exactly once, flits of one source keep their order, the
// acknowledgement goes only to a source that is requesting, and contention
// (several sources requesting at once) actually occurred.
module tb_noc_merge;
  localparam int W = 16, NIN = 4, NPER = 100;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NIN-1:0] lr, la;
  logic [NIN-1:0][W-1:0] din;
  logic rr, ra;
  logic [W-1:0] dout;
  int checks = 0, failures = 0;
  int next_seq[NIN];
  int n_rcv = 0, n_contention = 0;

  always #5 clk = ~clk;

  noc_merge #(.W(W), .N_IN(NIN)) dut (.clk, .rst_n, .lr, .la, .din, .rr, .ra, .dout);

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

  task automatic sender(input int s);
    for (int q = 0; q < NPER; q++) begin
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 din[s] = W'((s << 12) | q);
      lr[s] = 1'b1;
      while (!la[s]) @(posedge clk);
      #1 lr[s] = 1'b0;
      while (la[s]) @(posedge clk);
    end
  endtask

  // link receiver and checks
  initial begin
    logic rr_seen;
    ra = 1'b0; rr_seen = 1'b0;
    forever begin
      @(negedge clk);
      if (rst_n) begin
        check($countones(la) <= 1, "one acknowledgement at a time");
        if ($countones(lr & ~la) >= 2) n_contention++;
        if (rr != rr_seen) begin
          int s, q;
          rr_seen = rr;
          s = int'(dout) >> 12;
          q = int'(dout) & 12'hfff;
          check(s < NIN && q == next_seq[s], $sformatf("source %0d flit %0d, expected %0d", s, q, next_seq[s]));
          if (s < NIN) next_seq[s] = q + 1;
          n_rcv++;
          repeat ($urandom_range(0, 4)) @(negedge clk);
          ra = ~ra;
        end
      end
    end
  end

  initial begin
    lr = '0; din = '0;
    for (int s = 0; s < NIN; s++) next_seq[s] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      sender(0);
      sender(1);
      sender(2);
      sender(3);
    join
    while (n_rcv < NIN * NPER) @(posedge clk);
    repeat (20) @(posedge clk);
    check(n_rcv == NIN * NPER, "every flit arrived once");
    check(n_contention > 0, "contention between sources occurred");
    $display("contention cycles=%0d", n_contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
