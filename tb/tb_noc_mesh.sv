// tb_noc_mesh: network test of noc_mesh at 4x4 with request/reply traffic.
//
// Each node sends NREQ request flits to random other nodes, with source
// routes computed by the package's route function. A node that receives a
// request builds the reply route from nothing but the address the request
// arrived with: the pairs the request used, in reverse order and inverted
// (N<->S, E<->W). It sends the reply, which must come back to the
// requester. Checked: every request and every reply is delivered exactly once
// at the node it was meant for, with its payload intact, and the hop count of
// each reply equals that of its request. The receiver of each node delays its
// acknowledge at random so that back-pressure reaches the network.
module tb_noc_mesh
  import noc_pkg::*;
;
  localparam int  N = 4, NN = N * N;
  localparam bit  TORUS = 1'b0;
  localparam int  FW = MESH_FLIT_W, AW = MESH_ADDR_W, PW = MESH_PAYLOAD_W;
  localparam int  AHI = TORUS ? FW - 2 : FW - 1;   // top bit of the address field
  localparam int  NREQ = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NN-1:0]         core_lr, core_la, core_rr, core_ra;
  logic [NN-1:0][FW-1:0] core_din, core_dout;

  int checks = 0, failures = 0;
  int n_req = 0, n_rep = 0, n_wrap = 0;
  int seen_req[NN][NREQ], seen_rep[NN][NREQ];
  int hops_req[NN][NREQ];

  always #5 clk = ~clk;

  noc_mesh #(.N(N)) dut (.clk, .rst_n, .core_lr, .core_la, .core_din, .core_rr, .core_ra, .core_dout);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (requests %0d, replies %0d)", n_req, n_rep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // flits each node still has to send
  logic [FW-1:0] txq[NN][$];

  // payload: [PW-1] reply, then source, destination, sequence, random data
  function automatic logic [PW-1:0] mk_payload(bit rep, int s, int d, int q);
    logic [PW-1:0] p;
    p = PW'($urandom);
    p[PW-1] = rep;
    p[PW-2 -: 4] = 4'(s);
    p[PW-6 -: 4] = 4'(d);
    p[PW-10 -: 8] = 8'(q);
    return p;
  endfunction

  // reply address from the address a request arrived with after h hops:
  // pair k of the original route now sits at bits 2(h-k)+1:2(h-k)
  function automatic logic [AW-1:0] reply_route(logic [AW-1:0] a, int h);
    logic [AW-1:0] r;
    logic [1:0] last;
    r = '0;
    for (int k = 0; k < h; k++) begin
      last = ~a[2*k+2 +: 2];              // pair h-1-k of the request, inverted
      r[AW-1-2*k -: 2] = last;
    end
    r[AW-1-2*h -: 2] = ~last;             // exit pair
    return r;
  endfunction

  task automatic node_tx(input int i);
    logic a0;
    forever begin
      @(posedge clk);
      if (txq[i].size() != 0) begin
        repeat ($urandom_range(0, 6)) @(posedge clk);
        #1 core_din[i] = txq[i].pop_front();
        a0 = core_la[i];
        core_lr[i] = ~core_lr[i];
        while (core_la[i] == a0) @(posedge clk);
      end
    end
  endtask

  task automatic node_rx(input int i);
    logic r0;
    r0 = 1'b0;
    forever begin
      @(negedge clk);
      if (rst_n && core_rr[i] != r0) begin
        logic [FW-1:0] f;
        logic [PW-1:0] p;
        int s, d, q, h;
        r0 = core_rr[i];
        f = core_dout[i];
        p = f[PW-1:0];
        s = int'(p[PW-2 -: 4]); d = int'(p[PW-6 -: 4]); q = int'(p[PW-10 -: 8]);
        if (TORUS && f[FW-1]) n_wrap++;
        if (!p[PW-1]) begin
          check(d == i, $sformatf("request %0d/%0d for %0d arrived at %0d", s, q, d, i));
          check(q < NREQ && seen_req[s][q] == 0, $sformatf("request %0d/%0d once", s, q));
          if (q < NREQ) seen_req[s][q]++;
          h = hops_req[s][q];
          // the reply goes back the way the request came
          begin
            logic [FW-1:0] rf;
            rf = '0;
            rf[AHI -: AW] = reply_route(f[AHI -: AW], h);
            rf[PW-1:0] = mk_payload(1'b1, i, s, q);
            txq[i].push_back(rf);
          end
          n_req++;
        end else begin
          // a reply from s to d for d's request q
          check(d == i, $sformatf("reply %0d->%0d arrived at %0d", s, d, i));
          check(q < NREQ && seen_rep[d][q] == 0, $sformatf("reply for %0d/%0d once", d, q));
          if (q < NREQ) seen_rep[d][q]++;
          n_rep++;
        end
        repeat ($urandom_range(0, 4)) @(negedge clk);
        core_ra[i] = ~core_ra[i];
      end
    end
  endtask

  initial begin
    core_lr = '0; core_ra = '0; core_din = '0;
    for (int i = 0; i < NN; i++) for (int q = 0; q < NREQ; q++) begin
      seen_req[i][q] = 0; seen_rep[i][q] = 0;
    end
    // requests
    for (int i = 0; i < NN; i++) begin
      for (int q = 0; q < NREQ; q++) begin
        int d;
        logic [FW-1:0] f;
        logic [MAX_ADDR_W-1:0] r;
        do d = $urandom_range(0, NN - 1); while (d == i);
        r = source_route(N, TORUS, i % N, i / N, d % N, d / N);
        hops_req[i][q] = int'(route_hops(N, TORUS, i % N, i / N, d % N, d / N));
        f = '0;
        f[AHI -: AW] = r[MAX_ADDR_W-1 -: AW];
        f[PW-1:0] = mk_payload(1'b0, i, d, q);
        txq[i].push_back(f);
      end
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < NN; i++) begin
      fork
        automatic int ii = i;
        node_tx(ii);
        node_rx(ii);
      join_none
    end
    while (n_rep < NN * NREQ) @(posedge clk);
    repeat (50) @(posedge clk);
    check(n_req == NN * NREQ, "every request delivered once");
    check(n_rep == NN * NREQ, "every reply delivered once");
    $display("requests=%0d replies=%0d wrap-arrivals=%0d", n_req, n_rep, n_wrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
