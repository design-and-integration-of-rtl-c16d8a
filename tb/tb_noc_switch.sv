// tb_noc_switch: self-checking test of the switch module (no virtual channels).
// A 2-phase link sender offers random flits; four 4-phase receivers model the
// merges and answer after random delays. Checked for every flit: it leaves on
// the output named by its two top address bits, exactly once, with the
// address rotated left by two and the rest unchanged; the link is
// acknowledged once per flit; on an idle switch the output request rises
// three cycles after the link request.
module tb_noc_switch;
  localparam int W = 20, AW = 8;
  localparam int NFLIT = 400;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lr, la;
  logic [W-1:0] din, dout;
  logic [3:0] rr, ra;
  logic [3:0] busy;   // a receiver is handling a request
  int checks = 0, failures = 0;
  logic [W-1:0] exp_q[$];
  int n_rcv = 0;
  int per_dir[4];

  always #5 clk = ~clk;

  noc_switch #(.FLIT_W(W), .ADDR_W(AW)) dut (.clk, .rst_n, .lr, .la, .din, .rr, .ra, .dout);

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

  function automatic logic [W-1:0] rotated(input logic [W-1:0] f);
    logic [AW-1:0] a;
    a = f[W-1 -: AW];
    return {a[AW-3:0], a[AW-1 -: 2], f[W-AW-1:0]};
  endfunction

  // merge models
  initial begin
    ra = '0; busy = '0;
    forever begin
      @(negedge clk);
      if (rst_n) begin
        check($countones(rr) <= 1, "one output request at a time");
        for (int k = 0; k < 4; k++) if (rr[k] && !ra[k] && !busy[k]) begin
          logic [W-1:0] e;
          busy[k] = 1'b1;
          e = exp_q.pop_front();
          check(k == int'(e[W-1 -: 2]), $sformatf("flit went to %0d, expected %0d", k, e[W-1 -: 2]));
          check(dout == rotated(e), $sformatf("rotated address and payload %h vs %h (in %h)", dout, rotated(e), e));
          per_dir[k]++;
          n_rcv++;
          fork
            automatic int kk = k;
            begin
              repeat ($urandom_range(0, 5)) @(negedge clk);
              ra[kk] = 1'b1;
              while (rr[kk]) @(negedge clk);
              repeat ($urandom_range(0, 2)) @(negedge clk);
              ra[kk] = 1'b0;
              busy[kk] = 1'b0;
            end
          join_none
        end
      end
    end
  end

  initial begin
    logic la0;
    lr = 1'b0; din = '0;
    for (int k = 0; k < 4; k++) per_dir[k] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < NFLIT; t++) begin
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1 din = W'($urandom);
      exp_q.push_back(din);
      la0 = la;
      lr = ~lr;
      if (t == 0) begin
        repeat (3) @(posedge clk);
        #1 check(rr != '0, "output request three cycles after link request");
      end
      while (la == la0) @(posedge clk);
    end
    while (n_rcv < NFLIT) @(posedge clk);
    for (int k = 0; k < 4; k++) check(per_dir[k] > 0, $sformatf("direction %0d used", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
