// narb: non-blocking (nacking) arbiter of the virtual-channel switch.
//
// A 4-phase latch controller for one virtual channel. A left request lr+ is
// taken when the channel is free: the flit is captured (cap pulses for one
// cycle), lr is acknowledged on la and the flit is forwarded on rr. If a new
// request arrives while the previous flit has been acknowledged on the left but
// not yet on the right (ra), the request is refused on ln instead of waiting,
// so the sender can let the other virtual channel through.
//
// The state machine is the original CCS specification, state for state
// (S0..S21). Each signal name stands for its next transition; all five
// signals are 4-phase levels. An input transition is remembered until the
// current state can take it. Where the specification lets two outputs fire in
// either order (S1, S7, S19) both fire in the same cycle. Where an input and
// an output are both possible the input is taken first; in S10 a pending ra is
// taken before a pending lr, so a request is only refused when ra has
// really not arrived. These orderings are this design's choices.
// In S19 the right request is an output, as in the other states.
//
// Interface: lr/la/ln toward the 2-to-4-phase converter, rr/ra toward the
// merge modules, cap = load the channel's flit latch.
// Timing: one clock per specification step.
module narb (
  input  logic clk,
  input  logic rst_n,
  input  logic lr,
  output logic la,
  output logic ln,
  output logic rr,
  input  logic ra,
  output logic cap
);
  typedef enum logic [4:0] {
    S0, S1, S2, S3, S4, S5, S6, S7, S8, S9, S10,
    S11, S12, S13, S14, S15, S16, S17, S18, S19, S20, S21
  } nstate_e;

  nstate_e st, st_n;
  logic    lr_s, ra_s;        // last taken level of lr and ra
  logic    lr_ev, ra_ev;      // a transition is pending
  logic    take_lr, take_ra;
  logic    fire_la, fire_rr, fire_ln;

  assign lr_ev = (lr != lr_s);
  assign ra_ev = (ra != ra_s);

  always_comb begin
    st_n    = st;
    take_lr = 1'b0;
    take_ra = 1'b0;
    fire_la = 1'b0;
    fire_rr = 1'b0;
    fire_ln = 1'b0;
    cap     = 1'b0;
    unique case (st)
      S0:  if (lr_ev) begin take_lr = 1'b1; cap = 1'b1; st_n = S1; end
      S1:  begin fire_la = 1'b1; fire_rr = 1'b1; st_n = S4; end
      S2:  begin fire_rr = 1'b1; st_n = S4; end
      S3:  begin fire_la = 1'b1; st_n = S4; end
      S4:  if (lr_ev) begin take_lr = 1'b1; st_n = S5; end
           else if (ra_ev) begin take_ra = 1'b1; st_n = S6; end
      S5:  if (ra_ev) begin take_ra = 1'b1; st_n = S7; end
           else begin fire_la = 1'b1; st_n = S10; end
      S6:  if (lr_ev) begin take_lr = 1'b1; st_n = S7; end
           else begin fire_rr = 1'b1; st_n = S8; end
      S7:  begin fire_la = 1'b1; fire_rr = 1'b1; st_n = S12; end
      S8:  if (lr_ev) begin take_lr = 1'b1; st_n = S9; end
      S9:  begin fire_la = 1'b1; st_n = S12; end
      S10: if (ra_ev) begin take_ra = 1'b1; st_n = S11; end
           else if (lr_ev) begin take_lr = 1'b1; st_n = S15; end
      S11: begin fire_rr = 1'b1; st_n = S12; end
      S12: if (lr_ev) begin take_lr = 1'b1; cap = 1'b1; st_n = S13; end
           else if (ra_ev) begin take_ra = 1'b1; st_n = S0; end
      S13: if (ra_ev) begin take_ra = 1'b1; st_n = S1; end
           else begin fire_la = 1'b1; st_n = S14; end
      S14: if (ra_ev) begin take_ra = 1'b1; st_n = S2; end
      S15: begin fire_ln = 1'b1; st_n = S16; end
      S16: if (lr_ev) begin take_lr = 1'b1; st_n = S17; end
           else if (ra_ev) begin take_ra = 1'b1; st_n = S18; end
      S17: if (ra_ev) begin take_ra = 1'b1; st_n = S19; end
           else begin fire_ln = 1'b1; st_n = S10; end
      S18: if (lr_ev) begin take_lr = 1'b1; st_n = S19; end
           else begin fire_rr = 1'b1; st_n = S20; end
      S19: begin fire_ln = 1'b1; fire_rr = 1'b1; st_n = S12; end
      S20: if (lr_ev) begin take_lr = 1'b1; st_n = S21; end
      S21: begin fire_ln = 1'b1; st_n = S12; end
      default: st_n = S0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= S0;
      lr_s <= 1'b0;
      ra_s <= 1'b0;
      la   <= 1'b0;
      ln   <= 1'b0;
      rr   <= 1'b0;
    end else begin
      st <= st_n;
      if (take_lr) lr_s <= ~lr_s;
      if (take_ra) ra_s <= ~ra_s;
      if (fire_la) la <= ~la;
      if (fire_rr) rr <= ~rr;
      if (fire_ln) ln <= ~ln;
    end
  end

  a_no_double_answer: assert property (@(posedge clk) disable iff (!rst_n) !(la && ln));

endmodule
