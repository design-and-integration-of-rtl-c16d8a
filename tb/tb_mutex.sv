// tb_mutex: self-checking test of the N-input mutex.
// Four requesters follow the 4-phase rule (raise, wait for grant, hold a
// random time, drop, wait for release). Checked every cycle: at most one
// grant, grants only go to raised requests, a grant is held while its request
// stays high. Also checked: round-robin order when all four keep requesting,
// and grant latency of one cycle from an idle mutex.
module tb_mutex;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req, gnt, gnt_d, req_d;
  int checks = 0, failures = 0;
  int served [N];

  always #5 clk = ~clk;

  mutex #(.N(N)) dut (.clk, .rst_n, .req, .gnt);

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

  // per-cycle protocol checks
  always @(negedge clk) if (rst_n) begin
    gnt_d <= gnt;
    req_d <= req;
    check($countones(gnt) <= 1, "more than one grant");
    check((gnt & ~gnt_d & ~req_d) == '0, "grant to an idle request");
  end

  task automatic requester(input int rr);
    for (int t = 0; t < 50; t++) begin
      repeat ($urandom_range(0, 5)) @(posedge clk);
      #1 req[rr] = 1'b1;
      do @(posedge clk); while (!gnt[rr]);
      served[rr]++;
      repeat ($urandom_range(0, 4)) begin
        @(posedge clk); #1;
        check(gnt[rr], "grant held while request high");
      end
      #1 req[rr] = 1'b0;
      do @(posedge clk); while (gnt[rr]);
    end
  endtask

  initial begin
    req = '0; gnt_d = '0; req_d = '0;
    for (int i = 0; i < N; i++) served[i] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    // latency: single request on an idle mutex
    #1 req = 4'b0100;
    @(posedge clk); #1;
    check(gnt == 4'b0100, "grant one cycle after request");
    req = '0;
    @(posedge clk); #1;
    check(gnt == '0, "release one cycle after request falls");
    // round robin with everyone requesting: each holds one cycle then re-raises
    begin
      int order[$];
      req = '1;
      while (order.size() < 8) begin
        @(posedge clk); #1;
        if (gnt != '0) begin
          for (int i = 0; i < N; i++) if (gnt[i]) begin order.push_back(i); req[i] = 1'b0; end
        end else req = '1;
      end
      for (int k = 1; k < 8; k++)
        check(order[k] == (order[k-1] + 1) % N, $sformatf("round robin order %0d after %0d", order[k], order[k-1]));
      req = '0;
      repeat (3) @(posedge clk);
    end
    // random 4-phase traffic
    fork
      requester(0);
      requester(1);
      requester(2);
      requester(3);
    join
    for (int i = 0; i < N; i++) check(served[i] == 50, $sformatf("requester %0d served %0d", i, served[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
