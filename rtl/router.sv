// router: five-port router without virtual channels, for the mesh.
//
// Each port has a switch (input side) and a merge (output side). Ports 0..3
// are the network directions N, E, W, S (numbered by their direction code),
// port 4 is the local core. A switch reads the two top address bits of a flit
// and sends it to one of the four other ports' merges: the core switch
// reaches the four network merges directly; a network switch reaches the
// other three network merges, and its own direction code means "to the
// core". Each merge therefore has four inputs, one from every other switch.
// There is no crossbar and no routing logic beyond this decoding.
//
// All link signals are 2-phase: a transition on lr_in[p] offers d_in[p] and a
// transition on la_in[p] acknowledges it; rr_out[p]/ra_out[p] do the same for
// d_out[p]. Timing: a flit crosses a router in roughly six cycles when
// nothing blocks it.
module router
  import noc_pkg::*;
#(
  parameter int unsigned FLIT_W = MESH_FLIT_W,
  parameter int unsigned ADDR_W = MESH_ADDR_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [4:0]             lr_in,
  output logic [4:0]             la_in,
  input  logic [4:0][FLIT_W-1:0] d_in,
  output logic [4:0]             rr_out,
  input  logic [4:0]             ra_out,
  output logic [4:0][FLIT_W-1:0] d_out
);
  // switch side
  logic [4:0][3:0]        sw_rr, sw_ra;
  logic [4:0][FLIT_W-1:0] sw_d;
  // merge side
  logic [4:0][3:0]              mg_lr, mg_la;
  logic [4:0][3:0][FLIT_W-1:0]  mg_d;

  for (genvar p = 0; p < 5; p++) begin : g_sw
    noc_switch #(.FLIT_W(FLIT_W), .ADDR_W(ADDR_W)) u_sw (
      .clk, .rst_n, .lr(lr_in[p]), .la(la_in[p]), .din(d_in[p]),
      .rr(sw_rr[p]), .ra(sw_ra[p]), .dout(sw_d[p])
    );
  end

  // merge m, input j <- switch s(m,j), output k(m,j)
  for (genvar m = 0; m < 5; m++) begin : g_mg
    for (genvar j = 0; j < 4; j++) begin : g_in
      localparam int unsigned S = (m == PORT_CORE) ? j : ((j < m) ? j : j + 1);
      localparam int unsigned K = (m == PORT_CORE) ? j : m;
      assign mg_lr[m][j]    = sw_rr[S][K];
      assign sw_ra[S][K]    = mg_la[m][j];
      assign mg_d[m][j]     = sw_d[S];
    end
    noc_merge #(.W(FLIT_W), .N_IN(4)) u_mg (
      .clk, .rst_n, .lr(mg_lr[m]), .la(mg_la[m]), .din(mg_d[m]),
      .rr(rr_out[m]), .ra(ra_out[m]), .dout(d_out[m])
    );
  end

endmodule
