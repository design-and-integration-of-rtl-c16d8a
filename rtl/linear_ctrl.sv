// linear_ctrl: 4-phase linear latch controller (LC).
//
// One flit-wide pipeline stage. A left request lr+ loads the latch (cap pulses
// for one cycle), is acknowledged on la and forwarded on rr. The next request
// is loaded only after the right side has acknowledged (ra+) the flit that
// the latch holds, so the latch is never overwritten before it was taken.
// The left handshake may complete before the right one (decoupled stage).
//
// The original design describes the non-blocking arbiter as an LC with added
// nacking, so this controller follows the nacking arbiter's specification
// with the refusal branch removed: states S0..S14, and in S10 a new request
// simply waits for ra. Two outputs that may fire in either order fire
// together; pending inputs are taken before outputs.
//
// Interface: lr/la left (4-phase), rr/ra right (4-phase), cap = load latch.
// Timing: a flit passes in two cycles (lr taken, then la and rr together).
module linear_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic lr,
  output logic la,
  output logic rr,
  input  logic ra,
  output logic cap
);
  typedef enum logic [3:0] {
    L0, L1, L2, L3, L4, L5, L6, L7, L8, L9, L10, L11, L12, L13, L14
  } lstate_e;

  lstate_e st, st_n;
  logic    lr_s, ra_s;
  logic    lr_ev, ra_ev;
  logic    take_lr, take_ra, fire_la, fire_rr;

  assign lr_ev = (lr != lr_s);
  assign ra_ev = (ra != ra_s);

  always_comb begin
    st_n    = st;
    take_lr = 1'b0;
    take_ra = 1'b0;
    fire_la = 1'b0;
    fire_rr = 1'b0;
    cap     = 1'b0;
    unique case (st)
      L0:  if (lr_ev) begin take_lr = 1'b1; cap = 1'b1; st_n = L1; end
      L1:  begin fire_la = 1'b1; fire_rr = 1'b1; st_n = L4; end
      L2:  begin fire_rr = 1'b1; st_n = L4; end
      L3:  begin fire_la = 1'b1; st_n = L4; end
      L4:  if (lr_ev) begin take_lr = 1'b1; st_n = L5; end
           else if (ra_ev) begin take_ra = 1'b1; st_n = L6; end
      L5:  if (ra_ev) begin take_ra = 1'b1; st_n = L7; end
           else begin fire_la = 1'b1; st_n = L10; end
      L6:  if (lr_ev) begin take_lr = 1'b1; st_n = L7; end
           else begin fire_rr = 1'b1; st_n = L8; end
      L7:  begin fire_la = 1'b1; fire_rr = 1'b1; st_n = L12; end
      L8:  if (lr_ev) begin take_lr = 1'b1; st_n = L9; end
      L9:  begin fire_la = 1'b1; st_n = L12; end
      L10: if (ra_ev) begin take_ra = 1'b1; st_n = L11; end
      L11: begin fire_rr = 1'b1; st_n = L12; end
      L12: if (lr_ev) begin take_lr = 1'b1; cap = 1'b1; st_n = L13; end
           else if (ra_ev) begin take_ra = 1'b1; st_n = L0; end
      L13: if (ra_ev) begin take_ra = 1'b1; st_n = L1; end
           else begin fire_la = 1'b1; st_n = L14; end
      L14: if (ra_ev) begin take_ra = 1'b1; st_n = L2; end
      default: st_n = L0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= L0;
      lr_s <= 1'b0;
      ra_s <= 1'b0;
      la   <= 1'b0;
      rr   <= 1'b0;
    end else begin
      st <= st_n;
      if (take_lr) lr_s <= ~lr_s;
      if (take_ra) ra_s <= ~ra_s;
      if (fire_la) la <= ~la;
      if (fire_rr) rr <= ~rr;
    end
  end

endmodule
