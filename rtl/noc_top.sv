// noc_top: the two networks of the design side by side.
//
// mesh_*  : an N x N mesh of plain five-port routers, 72-bit flits.
// torus_* : an N x N torus of virtual-channel routers, 59-bit flits.
// Each node has a network interface made of a route encoder: the core names
// a destination node and a payload, and the encoder puts the XY source route
// in front of the payload (and channel bit 0 for the torus). Delivered flits
// come out whole, with their address field rotated into the return route.
//
// Handshakes are 2-phase: toggle *_inj_req with *_inj_dst/*_inj_payload
// stable, wait for *_inj_ack to toggle; a delivered flit toggles *_ej_req and
// is released by toggling *_ej_ack. A node must not send to itself.
// Timing: the route encoder is combinational, so injection adds no cycle.
// The two networks and their sizes follow the original design; computing the
// routes with logic instead of a stored table, and the {y,x} destination
// format, are this design's choices.
module noc_top
  import noc_pkg::*;
#(
  parameter int unsigned MN = MESH_N,
  parameter int unsigned TN = TORUS_N
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // mesh
  input  logic [MN*MN-1:0]                      mesh_inj_req,
  output logic [MN*MN-1:0]                      mesh_inj_ack,
  input  logic [MN*MN-1:0][2*$clog2(MN)-1:0]    mesh_inj_dst,
  input  logic [MN*MN-1:0][MESH_PAYLOAD_W-1:0]  mesh_inj_payload,
  output logic [MN*MN-1:0]                      mesh_ej_req,
  input  logic [MN*MN-1:0]                      mesh_ej_ack,
  output logic [MN*MN-1:0][MESH_FLIT_W-1:0]     mesh_ej_flit,
  // torus
  input  logic [TN*TN-1:0]                      torus_inj_req,
  output logic [TN*TN-1:0]                      torus_inj_ack,
  input  logic [TN*TN-1:0][2*$clog2(TN)-1:0]    torus_inj_dst,
  input  logic [TN*TN-1:0][TORUS_PAYLOAD_W-1:0] torus_inj_payload,
  output logic [TN*TN-1:0]                      torus_ej_req,
  input  logic [TN*TN-1:0]                      torus_ej_ack,
  output logic [TN*TN-1:0][TORUS_FLIT_W-1:0]    torus_ej_flit
);
  localparam int unsigned MB = $clog2(MN);
  localparam int unsigned TB = $clog2(TN);

  logic [MN*MN-1:0][MESH_FLIT_W-1:0]  mesh_flit;
  logic [TN*TN-1:0][TORUS_FLIT_W-1:0] torus_flit;

  for (genvar i = 0; i < MN*MN; i++) begin : g_mesh_ni
    logic [MESH_ADDR_W-1:0] addr;
    route_encoder #(.N(MN), .ADDR_W(MESH_ADDR_W), .TORUS(1'b0)) u_re (
      .src_x(MB'(i % MN)), .src_y(MB'(i / MN)),
      .dst_x(mesh_inj_dst[i][MB-1:0]), .dst_y(mesh_inj_dst[i][2*MB-1:MB]),
      .addr
    );
    assign mesh_flit[i] = {addr, mesh_inj_payload[i]};
  end

  for (genvar i = 0; i < TN*TN; i++) begin : g_torus_ni
    logic [TORUS_ADDR_W-1:0] addr;
    route_encoder #(.N(TN), .ADDR_W(TORUS_ADDR_W), .TORUS(1'b1)) u_re (
      .src_x(TB'(i % TN)), .src_y(TB'(i / TN)),
      .dst_x(torus_inj_dst[i][TB-1:0]), .dst_y(torus_inj_dst[i][2*TB-1:TB]),
      .addr
    );
    assign torus_flit[i] = {1'b0, addr, torus_inj_payload[i]};
  end

  noc_mesh #(.N(MN)) u_mesh (
    .clk, .rst_n,
    .core_lr(mesh_inj_req), .core_la(mesh_inj_ack), .core_din(mesh_flit),
    .core_rr(mesh_ej_req), .core_ra(mesh_ej_ack), .core_dout(mesh_ej_flit)
  );

  noc_torus #(.N(TN)) u_torus (
    .clk, .rst_n,
    .core_lr(torus_inj_req), .core_la(torus_inj_ack), .core_din(torus_flit),
    .core_rr(torus_ej_req), .core_ra(torus_ej_ack), .core_dout(torus_ej_flit)
  );

endmodule
