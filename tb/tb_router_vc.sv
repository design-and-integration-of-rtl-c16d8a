// tb_router_vc: self-checking test of the virtual-channel router.
// Four network senders offer random flits on random channels and resend a
// flit the router refuses (ln); the core sender offers channel-0 flits. Four
// network receivers accept or, at random, refuse (rn) each flit; the core
// receiver accepts everything. Each flit carries its input port, output port
// and a sequence number per (input, output, channel). Checked: each flit
// leaves once on the port its first address pair selects, on the channel it
// came in on, with the address rotated, in order per (input, output,
// channel); refusals happen in both directions; every path is used.
module tb_router_vc
  import noc_pkg::*;
;
  localparam int W = 24, AW = 8, NPER = 120;
  localparam int AH = W - 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] lr_in, la_in, rr_out, ra_out;
  logic [3:0] ln_in, rn_out;
  logic [4:0][W-1:0] d_in, d_out;
  int checks = 0, failures = 0;
  int next_seq[5][5][2];
  int n_rcv = 0, n_ln = 0, n_rn = 0;
  int pair_seen[5][5];

  always #5 clk = ~clk;

  router_vc #(.FLIT_W(W), .ADDR_W(AW)) dut (
    .clk, .rst_n, .lr_in, .la_in, .ln_in, .d_in, .rr_out, .ra_out, .rn_out, .d_out);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // payload (15 bits): [14:12] input port, [11:9] output port, [8:0] sequence
  task automatic sender(input int p);
    int seq[5][2];
    logic la0, ln0;
    for (int o = 0; o < 5; o++) begin seq[o][0] = 0; seq[o][1] = 0; end
    for (int t = 0; t < NPER; t++) begin
      int k, o, c;
      logic [AW-1:0] a;
      k = $urandom_range(0, 3);
      o = int'(switch_target(p, k));
      c = (p == PORT_CORE) ? 0 : $urandom_range(0, 1);
      a = AW'($urandom);
      a[AW-1 -: 2] = 2'(k);
      repeat ($urandom_range(0, 2)) @(posedge clk);
      #1 d_in[p] = {1'(c), a, 15'((p << 12) | (o << 9) | seq[o][c])};
      seq[o][c]++;
      forever begin
        la0 = la_in[p];
        ln0 = (p < 4) ? ln_in[p] : 1'b0;
        lr_in[p] = ~lr_in[p];
        while (la_in[p] == la0 && (p == PORT_CORE || ln_in[p] == ln0)) @(posedge clk);
        #1;
        if (la_in[p] != la0) break;
        n_ln++;
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1;
      end
    end
  endtask

  task automatic receiver(input int o);
    logic rr_seen;
    rr_seen = 1'b0;
    forever begin
      @(negedge clk);
      if (rst_n && rr_out[o] != rr_seen) begin
        rr_seen = rr_out[o];
        repeat ($urandom_range(0, 6)) @(negedge clk);
        if (o < 4 && $urandom_range(0, 3) == 0) begin
          rn_out[o] = ~rn_out[o];
          n_rn++;
        end else begin
          int p, oo, q, c;
          logic [AW-1:0] a;
          c  = int'(d_out[o][W-1]);
          p  = int'(d_out[o][14:12]);
          oo = int'(d_out[o][11:9]);
          q  = int'(d_out[o][8:0]);
          a  = d_out[o][AH -: AW];
          check(oo == o, $sformatf("flit from port %0d for %0d left on %0d", p, oo, o));
          check(p < 5 && q == next_seq[p][o][c], $sformatf("order %0d->%0d ch%0d: %0d, expected %0d", p, o, c, q, next_seq[p][o][c]));
          check(p == PORT_CORE ? int'(a[1:0]) == o : (o == PORT_CORE ? int'(a[1:0]) == p : int'(a[1:0]) == o),
                "used pair rotated to the end of the address");
          if (p < 5) begin next_seq[p][o][c] = q + 1; pair_seen[p][o]++; end
          n_rcv++;
          ra_out[o] = ~ra_out[o];
        end
      end
    end
  endtask

  initial begin
    lr_in = '0; ra_out = '0; rn_out = '0; d_in = '0;
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) begin
      next_seq[i][j][0] = 0; next_seq[i][j][1] = 0; pair_seen[i][j] = 0;
    end
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
    check(n_ln > 0, "router refused flits");
    check(n_rn > 0, "router resent refused flits");
    for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++)
      if (i != j) check(pair_seen[i][j] > 0, $sformatf("path %0d->%0d used", i, j));
    $display("router refusals=%0d link refusals=%0d", n_ln, n_rn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
