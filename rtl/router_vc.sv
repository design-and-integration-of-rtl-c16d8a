// router_vc: five-port router with two virtual channels, for the torus.
//
// Ports 0..3 (N, E, W, S by direction code) are network ports with virtual
// channels and nacking: a switch_nack on the input side, and on the output
// side one merge_virtual per channel followed by a merge_pipeline that shares
// the link between the channels. Port 4, the core, has a plain switch and a
// plain merge without nacking.
//
// Steering is as in the mesh router: a network switch's own direction code
// means "to the core". A flit keeps the channel it arrived on; it enters
// channel 1 only by crossing a wrap link, which the network sets up by
// forcing the channel bit. The core switch feeds channel 0 of the four
// network merges, since every packet is injected on channel 0. The core merge
// takes both channels of the four network switches (eight inputs); the
// original design does not detail this port, so its width is this design's choice.
//
// Link signals are 2-phase. Network ports add ln_in (refusal of a flit offered
// on lr_in) and rn_out (refusal of a flit sent on rr_out).
module router_vc
  import noc_pkg::*;
#(
  parameter int unsigned FLIT_W = TORUS_FLIT_W,
  parameter int unsigned ADDR_W = TORUS_ADDR_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [4:0]             lr_in,
  output logic [4:0]             la_in,
  output logic [3:0]             ln_in,
  input  logic [4:0][FLIT_W-1:0] d_in,
  output logic [4:0]             rr_out,
  input  logic [4:0]             ra_out,
  input  logic [3:0]             rn_out,
  output logic [4:0][FLIT_W-1:0] d_out
);
  // network switches: [port][channel][direction]
  logic [3:0][1:0][3:0]        sn_rr, sn_ra;
  logic [3:0][1:0][FLIT_W-1:0] sn_d;
  // core switch
  logic [3:0]                  cs_rr, cs_ra;
  logic [FLIT_W-1:0]           cs_d;
  // merge_virtual: [port][channel][input]
  logic [3:0][1:0][3:0]              mv_lr, mv_la;
  logic [3:0][1:0][3:0][FLIT_W-1:0]  mv_din;
  logic [3:0][1:0]                   mv_rr, mv_ra;
  logic [3:0][1:0][FLIT_W-1:0]       mv_dout;
  // core merge
  logic [7:0]                  cm_lr, cm_la;
  logic [7:0][FLIT_W-1:0]      cm_din;

  for (genvar p = 0; p < 4; p++) begin : g_sn
    switch_nack #(.FLIT_W(FLIT_W), .ADDR_W(ADDR_W)) u_sn (
      .clk, .rst_n, .lr(lr_in[p]), .la(la_in[p]), .ln(ln_in[p]), .din(d_in[p]),
      .rr(sn_rr[p]), .ra(sn_ra[p]), .dout(sn_d[p])
    );
  end

  noc_switch #(.FLIT_W(FLIT_W), .ADDR_W(ADDR_W), .ADDR_HI(FLIT_W - 2)) u_core_sw (
    .clk, .rst_n, .lr(lr_in[PORT_CORE]), .la(la_in[PORT_CORE]), .din(d_in[PORT_CORE]),
    .rr(cs_rr), .ra(cs_ra), .dout(cs_d)
  );

  for (genvar m = 0; m < 4; m++) begin : g_mp
    for (genvar c = 0; c < 2; c++) begin : g_vc
      for (genvar j = 0; j < 3; j++) begin : g_in
        localparam int unsigned S = (j < m) ? j : j + 1;
        assign mv_lr[m][c][j]  = sn_rr[S][c][m];
        assign sn_ra[S][c][m]  = mv_la[m][c][j];
        assign mv_din[m][c][j] = sn_d[S][c];
      end
      if (c == 0) begin : g_core_in
        assign mv_lr[m][c][3]  = cs_rr[m];
        assign cs_ra[m]        = mv_la[m][c][3];
        assign mv_din[m][c][3] = cs_d;
      end else begin : g_no_core
        assign mv_lr[m][c][3]  = 1'b0;
        assign mv_din[m][c][3] = '0;
      end
      merge_virtual #(.W(FLIT_W), .N_IN(4)) u_mv (
        .clk, .rst_n, .lr(mv_lr[m][c]), .la(mv_la[m][c]), .din(mv_din[m][c]),
        .rr(mv_rr[m][c]), .ra(mv_ra[m][c]), .dout(mv_dout[m][c])
      );
    end
    merge_pipeline #(.W(FLIT_W)) u_mp (
      .clk, .rst_n, .lr(mv_rr[m]), .la(mv_ra[m]), .din(mv_dout[m]),
      .rr(rr_out[m]), .ra(ra_out[m]), .rn(rn_out[m]), .dout(d_out[m])
    );
  end

  // core merge: input 2*s+c <- channel c of network switch s, code s
  for (genvar s = 0; s < 4; s++) begin : g_cm
    for (genvar c = 0; c < 2; c++) begin : g_vc
      assign cm_lr[2*s+c]   = sn_rr[s][c][s];
      assign sn_ra[s][c][s] = cm_la[2*s+c];
      assign cm_din[2*s+c]  = sn_d[s][c];
    end
  end

  noc_merge #(.W(FLIT_W), .N_IN(8)) u_core_mg (
    .clk, .rst_n, .lr(cm_lr), .la(cm_la), .din(cm_din),
    .rr(rr_out[PORT_CORE]), .ra(ra_out[PORT_CORE]), .dout(d_out[PORT_CORE])
  );

endmodule
