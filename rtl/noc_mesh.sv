// noc_mesh: N x N mesh of five-port routers (no virtual channels).
//
// Router i = y*N + x sits at column x (growing East) and row y (growing
// South). Neighbouring routers are joined by 2-phase bundled-data links in
// both directions; the network ports on the array edge are left unconnected
// (no requests in, acknowledgements tied low), since XY source routes never
// use them. The local core port of every router is brought out.
//
// Interface per node i: core_lr[i]/core_la[i]/core_din[i] inject a flit,
// core_rr[i]/core_ra[i]/core_dout[i] deliver one; all 2-phase.
// Timing: about six cycles per router crossed when nothing blocks.
// The 8x8 size, the router and the link protocol follow the original design;
// the node numbering and the tied-off edge ports are this design's choices.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned N      = MESH_N,
  parameter int unsigned FLIT_W = MESH_FLIT_W,
  parameter int unsigned ADDR_W = MESH_ADDR_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N*N-1:0]             core_lr,
  output logic [N*N-1:0]             core_la,
  input  logic [N*N-1:0][FLIT_W-1:0] core_din,
  output logic [N*N-1:0]             core_rr,
  input  logic [N*N-1:0]             core_ra,
  output logic [N*N-1:0][FLIT_W-1:0] core_dout
);
  logic [N*N-1:0][4:0]             lr_in, la_in, rr_out, ra_out;
  logic [N*N-1:0][4:0][FLIT_W-1:0] d_in, d_out;

  for (genvar i = 0; i < N*N; i++) begin : g_node
    localparam int X = i % N;
    localparam int Y = i / N;

    router #(.FLIT_W(FLIT_W), .ADDR_W(ADDR_W)) u_router (
      .clk, .rst_n,
      .lr_in(lr_in[i]), .la_in(la_in[i]), .d_in(d_in[i]),
      .rr_out(rr_out[i]), .ra_out(ra_out[i]), .d_out(d_out[i])
    );

    // core port
    assign lr_in[i][PORT_CORE]  = core_lr[i];
    assign d_in[i][PORT_CORE]   = core_din[i];
    assign core_la[i]           = la_in[i][PORT_CORE];
    assign core_rr[i]           = rr_out[i][PORT_CORE];
    assign core_dout[i]         = d_out[i][PORT_CORE];
    assign ra_out[i][PORT_CORE] = core_ra[i];

    // input port p listens to the neighbour in direction p, which sends on
    // its port of the opposite direction (code ~p)
    for (genvar p = 0; p < 4; p++) begin : g_port
      localparam int NX = (p == DIR_E) ? X + 1 : (p == DIR_W) ? X - 1 : X;
      localparam int NY = (p == DIR_S) ? Y + 1 : (p == DIR_N) ? Y - 1 : Y;
      localparam int unsigned Q = 3 - p;
      if (NX >= 0 && NX < N && NY >= 0 && NY < N) begin : g_link
        localparam int unsigned J = NY * N + NX;
        assign lr_in[i][p]  = rr_out[J][Q];
        assign d_in[i][p]   = d_out[J][Q];
        assign ra_out[J][Q] = la_in[i][p];
      end else begin : g_edge
        assign lr_in[i][p]  = 1'b0;
        assign d_in[i][p]   = '0;
        assign ra_out[i][p] = 1'b0;
      end
    end
  end

endmodule
