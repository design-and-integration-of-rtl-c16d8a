// noc_torus: N x N torus of virtual-channel routers.
//
// Router i = y*N + x. Every router is linked to its four neighbours; the
// routers on opposite edges are joined by wrap links, so each row and each
// column is a ring. Each link carries the 2-phase request, acknowledgement
// and refusal (ln/rn) signals with the flit. A wrap link forces the flit's
// channel bit to 1: a packet leaves virtual channel 0 only by crossing a wrap
// link, which breaks the cyclic dependency of the rings. The same netlist
// serves the torus with RC or transmission-line wrap wires and the folded
// torus: they differ in placement and wire delay, not in connectivity.
//
// Interface per node i: core_lr/core_la/core_din inject, core_rr/core_ra/
// core_dout deliver; all 2-phase, no refusal on the core port.
// Timing: a few cycles more per router than the mesh; refused flits retry.
// The 8x8 size, the virtual-channel router and the channel change on wrap
// links follow the original design; setting the channel bit in the wiring of
// the wrap link, rather than in a sending circuit, is this design's choice.
module noc_torus
  import noc_pkg::*;
#(
  parameter int unsigned N      = TORUS_N,
  parameter int unsigned FLIT_W = TORUS_FLIT_W,
  parameter int unsigned ADDR_W = TORUS_ADDR_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N*N-1:0]             core_lr,
  output logic [N*N-1:0]             core_la,
  input  logic [N*N-1:0][FLIT_W-1:0] core_din,
  output logic [N*N-1:0]             core_rr,
  input  logic [N*N-1:0]             core_ra,
  output logic [N*N-1:0][FLIT_W-1:0] core_dout
);
  logic [N*N-1:0][4:0]             lr_in, la_in, rr_out, ra_out;
  logic [N*N-1:0][3:0]             ln_in, rn_out;
  logic [N*N-1:0][4:0][FLIT_W-1:0] d_in, d_out;

  for (genvar i = 0; i < N*N; i++) begin : g_node
    localparam int X = i % N;
    localparam int Y = i / N;

    router_vc #(.FLIT_W(FLIT_W), .ADDR_W(ADDR_W)) u_router (
      .clk, .rst_n,
      .lr_in(lr_in[i]), .la_in(la_in[i]), .ln_in(ln_in[i]), .d_in(d_in[i]),
      .rr_out(rr_out[i]), .ra_out(ra_out[i]), .rn_out(rn_out[i]), .d_out(d_out[i])
    );

    assign lr_in[i][PORT_CORE]  = core_lr[i];
    assign d_in[i][PORT_CORE]   = core_din[i];
    assign core_la[i]           = la_in[i][PORT_CORE];
    assign core_rr[i]           = rr_out[i][PORT_CORE];
    assign core_dout[i]         = d_out[i][PORT_CORE];
    assign ra_out[i][PORT_CORE] = core_ra[i];

    for (genvar p = 0; p < 4; p++) begin : g_port
      localparam int RX = (p == DIR_E) ? X + 1 : (p == DIR_W) ? X - 1 : X;
      localparam int RY = (p == DIR_S) ? Y + 1 : (p == DIR_N) ? Y - 1 : Y;
      localparam bit WRAP = (RX < 0) || (RX >= N) || (RY < 0) || (RY >= N);
      localparam int unsigned J = ((RY + N) % N) * N + ((RX + N) % N);
      localparam int unsigned Q = 3 - p;
      logic [FLIT_W-1:0] d_link;
      assign d_link       = d_out[J][Q];
      assign lr_in[i][p]  = rr_out[J][Q];
      assign d_in[i][p]   = {WRAP ? 1'b1 : d_link[FLIT_W-1], d_link[FLIT_W-2:0]};
      assign ra_out[J][Q] = la_in[i][p];
      assign rn_out[J][Q] = ln_in[i][p];
    end
  end

endmodule
