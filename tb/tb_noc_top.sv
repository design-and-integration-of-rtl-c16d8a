// tb_noc_top: end-to-end test of both networks at full size (8x8 mesh and
// 8x8 torus, default parameters).
//
// Traffic is uniform random messages of MSG_FLITS flits: every node of each
// network sends NMSG messages, each to a random other node, through the
// route-encoding interface, and takes every flit delivered to it after a
// random delay. Each payload carries source, intended
// destination, a per-source sequence number and random data. Checked for
// every delivered packet: it reaches its destination, exactly once, with its
// payload intact, in the order sent; the rotated address it arrives with holds the route it
// took, so that reversing and inverting the used pairs gives a route that
// leads back to the source (walked in a model of the network). Mechanisms
// that must occur at least once: contention at a mesh merge, contention at a
// torus merge, a packet crossing a torus wrap link (arrives on channel 1), a
// refused flit in the torus, and a refusal that lets the other virtual
// channel pass.
module tb_noc_top
  import noc_pkg::*;
;
  localparam int N = 8, NN = N * N;
  localparam int NMSG = 2, MSG_FLITS = 10, NREQ = NMSG * MSG_FLITS;
  localparam int MPW = MESH_PAYLOAD_W, TPW = TORUS_PAYLOAD_W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NN-1:0]               mesh_inj_req, mesh_inj_ack, mesh_ej_req, mesh_ej_ack;
  logic [NN-1:0][5:0]          mesh_inj_dst;
  logic [NN-1:0][MPW-1:0]      mesh_inj_payload;
  logic [NN-1:0][MESH_FLIT_W-1:0]  mesh_ej_flit;
  logic [NN-1:0]               torus_inj_req, torus_inj_ack, torus_ej_req, torus_ej_ack;
  logic [NN-1:0][5:0]          torus_inj_dst;
  logic [NN-1:0][TPW-1:0]      torus_inj_payload;
  logic [NN-1:0][TORUS_FLIT_W-1:0] torus_ej_flit;

  int checks = 0, failures = 0;
  int m_rcv = 0, t_rcv = 0;
  int m_seen[NN][NREQ], t_seen[NN][NREQ];
  int m_last[NN][NN], t_last[NN][NN];   // last sequence number from a source, per receiver
  int n_mesh_cont = 0, n_torus_cont = 0, n_wrap = 0, n_refuse = 0, n_pass = 0;
  longint cyc = 0;

  always #5 clk = ~clk;

  noc_top dut (
    .clk, .rst_n,
    .mesh_inj_req, .mesh_inj_ack, .mesh_inj_dst, .mesh_inj_payload,
    .mesh_ej_req, .mesh_ej_ack, .mesh_ej_flit,
    .torus_inj_req, .torus_inj_ack, .torus_inj_dst, .torus_inj_payload,
    .torus_ej_req, .torus_ej_ack, .torus_ej_flit
  );

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (mesh %0d, torus %0d delivered)", m_rcv, t_rcv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism probes ----------------------------------------------------
  logic [NN-1:0] mesh_cont, torus_cont, torus_pass;
  logic [NN-1:0][3:0] ln_now, ln_prev;
  for (genvar i = 0; i < NN; i++) begin : g_probe
    logic [4:0][3:0] mlr;
    logic [3:0][1:0][3:0] tlr;
    logic [3:0][1:0] blk;
    assign mlr = dut.u_mesh.g_node[i].u_router.mg_lr;
    assign tlr = dut.u_torus.g_node[i].u_router.mv_lr;
    for (genvar m = 0; m < 4; m++) begin : g_mp
      assign blk[m] = dut.u_torus.g_node[i].u_router.g_mp[m].u_mp.block_q;
    end
    always_comb begin
      mesh_cont[i] = 1'b0;
      torus_cont[i] = 1'b0;
      torus_pass[i] = 1'b0;
      for (int m = 0; m < 5; m++) if ($countones(mlr[m]) >= 2) mesh_cont[i] = 1'b1;
      for (int m = 0; m < 4; m++) begin
        for (int c = 0; c < 2; c++) if ($countones(tlr[m][c]) >= 2) torus_cont[i] = 1'b1;
        if (blk[m] != '0) torus_pass[i] = 1'b1;
      end
    end
    assign ln_now[i] = dut.u_torus.ln_in[i];
  end

  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
      if (mesh_cont != '0) n_mesh_cont++;
      if (torus_cont != '0) n_torus_cont++;
      if (torus_pass != '0) n_pass++;
      for (int i = 0; i < NN; i++) n_refuse += $countones(ln_now[i] ^ ln_prev[i]);
    end
    ln_prev <= ln_now;
  end

  // ---- route model ---------------------------------------------------------
  function automatic int hops(input bit torus, input int s, input int d);
    return int'(route_hops(N, torus, s % N, s / N, d % N, d / N));
  endfunction

  // Reverse and invert the used pairs of a delivered address and walk the
  // result from the destination; returns the node it ends at (-1 if lost).
  function automatic int walk_back(input logic [63:0] a, input int aw, input bit torus,
                                   input int h, input int d);
    logic [1:0] used[32];
    int x, y;
    logic [1:0] code;
    // after h+1 rotations the used pairs 0..h sit in the lowest h+1 pairs
    for (int k = 0; k <= h; k++) used[k] = a[2*(h-k)+1 -: 2];
    x = d % N; y = d / N;
    for (int k = 0; k < h; k++) begin
      code = ~used[h-1-k];
      case (code)
        2'b00: y--;
        2'b01: x++;
        2'b10: x--;
        default: y++;
      endcase
      if (torus) begin x = (x + N) % N; y = (y + N) % N; end
      else if (x < 0 || x >= N || y < 0 || y >= N) return -1;
    end
    return y * N + x;
  endfunction

  // ---- mesh nodes ----------------------------------------------------------
  // payload: [41:36] source, [35:30] destination, [29:20] sequence, [19:0] data
  task automatic mesh_node_tx(input int i);
    logic a0;
    int d;
    for (int q = 0; q < NREQ; q++) begin
      if (q % MSG_FLITS == 0) do d = $urandom_range(0, NN - 1); while (d == i);
      repeat ($urandom_range(0, 20)) @(posedge clk);
      #1 mesh_inj_dst[i] = 6'(d);
      mesh_inj_payload[i] = {6'(i), 6'(d), 10'(q), 20'($urandom)};
      a0 = mesh_inj_ack[i];
      mesh_inj_req[i] = ~mesh_inj_req[i];
      while (mesh_inj_ack[i] == a0) @(posedge clk);
    end
  endtask

  task automatic mesh_node_rx(input int i);
    logic r0;
    r0 = 1'b0;
    forever begin
      @(negedge clk);
      if (rst_n && mesh_ej_req[i] != r0) begin
        int s, d, q, h;
        logic [MESH_FLIT_W-1:0] f;
        r0 = mesh_ej_req[i];
        f = mesh_ej_flit[i];
        s = int'(f[41:36]); d = int'(f[35:30]); q = int'(f[29:20]);
        check(d == i, $sformatf("mesh packet for %0d delivered at %0d", d, i));
        check(q < NREQ && m_seen[s][q] == 0, $sformatf("mesh packet %0d/%0d delivered once", s, q));
        if (q < NREQ) m_seen[s][q]++;
        check(q > m_last[i][s], $sformatf("mesh flits from %0d arrive at %0d in order", s, i));
        m_last[i][s] = q;
        h = hops(1'b0, s, i);
        check(walk_back(64'(f[MESH_FLIT_W-1 -: MESH_ADDR_W]), MESH_ADDR_W, 1'b0, h, i) == s,
              "mesh return route leads to the source");
        m_rcv++;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        mesh_ej_ack[i] = ~mesh_ej_ack[i];
      end
    end
  endtask

  // ---- torus nodes ---------------------------------------------------------
  // payload: [39:34] source, [33:28] destination, [27:18] sequence, [17:0] data
  task automatic torus_node_tx(input int i);
    logic a0;
    int d;
    for (int q = 0; q < NREQ; q++) begin
      if (q % MSG_FLITS == 0) do d = $urandom_range(0, NN - 1); while (d == i);
      repeat ($urandom_range(0, 20)) @(posedge clk);
      #1 torus_inj_dst[i] = 6'(d);
      torus_inj_payload[i] = {6'(i), 6'(d), 10'(q), 18'($urandom)};
      a0 = torus_inj_ack[i];
      torus_inj_req[i] = ~torus_inj_req[i];
      while (torus_inj_ack[i] == a0) @(posedge clk);
    end
  endtask

  task automatic torus_node_rx(input int i);
    logic r0;
    r0 = 1'b0;
    forever begin
      @(negedge clk);
      if (rst_n && torus_ej_req[i] != r0) begin
        int s, d, q, h;
        logic [TORUS_FLIT_W-1:0] f;
        r0 = torus_ej_req[i];
        f = torus_ej_flit[i];
        s = int'(f[39:34]); d = int'(f[33:28]); q = int'(f[27:18]);
        check(d == i, $sformatf("torus packet for %0d delivered at %0d", d, i));
        check(q < NREQ && t_seen[s][q] == 0, $sformatf("torus packet %0d/%0d delivered once", s, q));
        if (q < NREQ) t_seen[s][q]++;
        check(q > t_last[i][s], $sformatf("torus flits from %0d arrive at %0d in order", s, i));
        t_last[i][s] = q;
        h = hops(1'b1, s, i);
        check(walk_back(64'(f[TORUS_FLIT_W-2 -: TORUS_ADDR_W]), TORUS_ADDR_W, 1'b1, h, i) == s,
              "torus return route leads to the source");
        if (f[TORUS_FLIT_W-1]) n_wrap++;
        t_rcv++;
        repeat ($urandom_range(0, 3)) @(negedge clk);
        torus_ej_ack[i] = ~torus_ej_ack[i];
      end
    end
  endtask

  initial begin
    mesh_inj_req = '0; mesh_ej_ack = '0; mesh_inj_dst = '0; mesh_inj_payload = '0;
    torus_inj_req = '0; torus_ej_ack = '0; torus_inj_dst = '0; torus_inj_payload = '0;
    ln_prev = '0;
    for (int i = 0; i < NN; i++) for (int j = 0; j < NN; j++) begin m_last[i][j] = -1; t_last[i][j] = -1; end
    for (int i = 0; i < NN; i++) for (int q = 0; q < NREQ; q++) begin m_seen[i][q] = 0; t_seen[i][q] = 0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < NN; i++) begin
      fork
        automatic int ii = i;
        begin
          mesh_node_rx(ii);
        end
        begin
          torus_node_rx(ii);
        end
        begin
          mesh_node_tx(ii);
        end
        begin
          torus_node_tx(ii);
        end
      join_none
    end
    while (m_rcv < NN * NREQ || t_rcv < NN * NREQ) @(posedge clk);
    repeat (50) @(posedge clk);
    check(m_rcv == NN * NREQ, "every mesh packet delivered once");
    check(t_rcv == NN * NREQ, "every torus packet delivered once");
    check(n_mesh_cont > 0, "contention at a mesh merge");
    check(n_torus_cont > 0, "contention at a torus merge");
    check(n_wrap > 0, "packets crossed a torus wrap link");
    check(n_refuse > 0, "flits refused in the torus");
    check(n_pass > 0, "a refusal let the other channel pass");
    $display("cycles=%0d mesh=%0d torus=%0d mesh-contention=%0d torus-contention=%0d wrap=%0d refusals=%0d passes=%0d",
             cyc, m_rcv, t_rcv, n_mesh_cont, n_torus_cont, n_wrap, n_refuse, n_pass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
