// tb_route_encoder: exhaustive check of the source-route encoder.
// For every source/destination pair of an 8x8 mesh (30 address bits) and an
// 8x8 torus (18 address bits) the produced address is executed the way the
// routers execute it: the source router moves in the direction of the first
// pair, every later router ejects the flit when the pair names the port the
// flit came in on and moves on otherwise. Checked: the flit ends at the
// destination core, never leaves the mesh, takes the minimal number of hops
// (Manhattan distance in the mesh, shortest way round each ring in the
// torus), and the route fits the address field.
module tb_route_encoder;
  localparam int N = 8;
  logic [2:0] sx, sy, dx, dy;
  logic [29:0] addr_m;
  logic [17:0] addr_t;
  int checks = 0, failures = 0;
  int max_hops_m = 0, max_hops_t = 0;

  route_encoder #(.N(N), .ADDR_W(30), .TORUS(1'b0)) dut_m (
    .src_x(sx), .src_y(sy), .dst_x(dx), .dst_y(dy), .addr(addr_m));
  route_encoder #(.N(N), .ADDR_W(18), .TORUS(1'b1)) dut_t (
    .src_x(sx), .src_y(sy), .dst_x(dx), .dst_y(dy), .addr(addr_t));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // execute a route; returns hop count, -1 on error
  function automatic int walk(input logic [63:0] a, input int aw, input bit torus,
                              input int x0, input int y0, input int x1, input int y1);
    int x, y, hops;
    logic [1:0] code, arrived;
    x = x0; y = y0; hops = 0; arrived = 2'b00;
    for (int i = 0; i < aw / 2; i++) begin
      code = a[aw-1-2*i -: 2];
      if (i > 0 && code == arrived) return (x == x1 && y == y1) ? hops : -1;
      case (code)
        2'b00: y--;   // N
        2'b01: x++;   // E
        2'b10: x--;   // W
        default: y++; // S
      endcase
      if (torus) begin x = (x + N) % N; y = (y + N) % N; end
      else if (x < 0 || x >= N || y < 0 || y >= N) return -1;
      arrived = ~code;
      hops++;
    end
    return -1;
  endfunction

  function automatic int ring(input int a, input int b);
    int d;
    d = (b - a + N) % N;
    return (d > N / 2) ? N - d : d;
  endfunction

  initial begin
    for (int s = 0; s < N*N; s++)
      for (int d = 0; d < N*N; d++) if (s != d) begin
        int hm, ht, em, et;
        sx = 3'(s % N); sy = 3'(s / N); dx = 3'(d % N); dy = 3'(d / N);
        #1;
        hm = walk(64'(addr_m), 30, 1'b0, s % N, s / N, d % N, d / N);
        ht = walk(64'(addr_t), 18, 1'b1, s % N, s / N, d % N, d / N);
        em = ((s % N > d % N) ? s % N - d % N : d % N - s % N) + ((s / N > d / N) ? s / N - d / N : d / N - s / N);
        et = ring(s % N, d % N) + ring(s / N, d / N);
        check(hm == em, $sformatf("mesh %0d->%0d: %0d hops, expected %0d", s, d, hm, em));
        check(ht == et, $sformatf("torus %0d->%0d: %0d hops, expected %0d", s, d, ht, et));
        if (hm > max_hops_m) max_hops_m = hm;
        if (ht > max_hops_t) max_hops_t = ht;
      end
    check(max_hops_m == 14, "mesh diameter 2(n-1) = 14");
    check(max_hops_t == 8, "torus diameter n = 8");
    $display("mesh diameter=%0d torus diameter=%0d", max_hops_m, max_hops_t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
