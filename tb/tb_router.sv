// tb_router: self-checking test of the five-port router (no virtual channels).
// Five 2-phase link senders (four network ports and the core) offer random
// flits, each tagged in its payload with the input port and a sequence
// number; five 2-phase link receivers answer after random delays. Checked
// for every flit: it leaves on the port its first address pair selects (a
// network port's own code meaning the core), exactly once, with the address
// rotated and the payload intact; flits from one input to one output keep
// their order; every input-output path is exercised.
module tb_router
  import noc_pkg::*;
;
  localparam int W = 24, AW = 8, NPER = 120;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] lr_in, la_in, rr_out, ra_out;
  logic [4:0][W-1:0] d_in, d_out;
  int checks = 0, failures = 0;
  int next_seq[5][5];
  int n_rcv = 0;
  int pair_seen[5][5];

  always #5 clk = ~clk;

  router #(.FLIT_W(W), .ADDR_W(AW)) dut (.clk, .rst_n, .lr_in, .la_in, .d_in, .rr_out, .ra_out, .d_out);

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

  // payload: [15:13] input port, [12:10] output port, [9:0] sequence
  task automatic sender(input int p);
    int seq[5];
    logic la0;
    for (int o = 0; o < 5; o++) seq[o] = 0;
    for (int t = 0; t < NPER; t++) begin
      int k, o;
      logic [AW-1:0] a;
      k = $urandom_range(0, 3);
      o = int'(switch_target(p, k));
      a = AW'($urandom);
      a[AW-1 -: 2] = 2'(k);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 d_in[p] = {a, 16'((p << 13) | (o << 10) | seq[o])};
      seq[o]++;
      la0 = la_in[p];
      lr_in[p] = ~lr_in[p];
      while (la_in[p] == la0) @(posedge clk);
    end
  endtask

  task automatic receiver(input int o);
    logic rr_seen;
    rr_seen = 1'b0;
    forever begin
      @(negedge clk);
      if (rst_n && rr_out[o] != rr_seen) begin
        int p, oo, q;
        logic [AW-1:0] a;
        rr_seen = rr_out[o];
        p  = int'(d_out[o][15:13]);
        oo = int'(d_out[o][12:10]);
        q  = int'(d_out[o][9:0]);
        a  = d_out[o][W-1 -: AW];
        check(oo == o, $sformatf("flit from port %0d for %0d left on %0d", p, oo, o));
        check(p < 5 && q == next_seq[p][o], $sformatf("order %0d->%0d: %0d, expected %0d", p, o, q, next_seq[p][o]));
        check(p == PORT_CORE ? int'(a[1:0]) == o : (o == PORT_CORE ? int'(a[1:0]) == p : int'(a[1:0]) == o),
              "used pair rotated to the end of the address");
        if (p < 5) begin next_seq[p][o] = q + 1; pair_seen[p][o]++; end
        n_rcv++;
        repeat ($urandom_range(0, 4)) @(negedge clk);
        ra_out[o] = ~ra_out[o];
      end
    end
  endtask

  initial begin
    lr_in = '0; ra_out = '0; d_in = '0;
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) begin next_seq[i][j] = 0; pair_seen[i][j] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    fork
      receiver(0); receiver(1); receiver(2); receiver(3); receiver(4);
    join_none
    fork
      sender(0); sender(1); sender(2); sender(3); sender(4);
    join
    while (n_rcv < 5 * NPER) @(posedge clk);
    repeat (20) @(posedge clk);
    check(n_rcv == 5 * NPER, "every flit delivered once");
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++)
      if (i != j) check(pair_seen[i][j] > 0, $sformatf("path %0d->%0d used", i, j));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
