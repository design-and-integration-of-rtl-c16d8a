// conv_4to2: 4-phase to 2-phase converter with output latch, at the output of
// a merge module.
//
// A 4-phase request lr+ loads the flit latch and is sent onto the link as a
// transition of rr; the left side is then acknowledged (la+) without waiting
// for the link, so the converter is a one-flit pipeline stage. The left
// handshake may also return to zero before the link answers, but a second
// request is neither loaded nor acknowledged until the link acknowledgement ra
// has toggled, so the flit on the link stays stable.
//
// The state machine follows the original converter's formal specification
// state by state (SPEC1..SPEC9). In the state reached when a new request
// arrives before the link acknowledgement, the new flit is loaded once ra has
// toggled.
//
// Interface: lr/la 4-phase toward the merge, rr/ra 2-phase link, din/dout the
// flit. dout is held from the rr transition until ra toggles.
// Timing: lr+ to rr one cycle, rr to la+ one more cycle.
module conv_4to2 #(
  parameter int unsigned W = 72
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         lr,
  output logic         la,
  output logic         rr,
  input  logic         ra,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  typedef enum logic [3:0] {
    SP1, SP2, SP3, SP4, SP5, SP6, SP7, SP8, SP9
  } pstate_e;

  pstate_e st;
  logic    lr_s, ra_s;
  logic    lr_ev, ra_ev;

  assign lr_ev = (lr != lr_s);
  assign ra_ev = (ra != ra_s);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= SP1;
      lr_s <= 1'b0;
      ra_s <= 1'b0;
      la   <= 1'b0;
      rr   <= 1'b0;
      dout <= '0;
    end else begin
      unique case (st)
        SP1: if (lr_ev) begin lr_s <= ~lr_s; dout <= din; st <= SP2; end
        SP2: begin rr <= ~rr; st <= SP3; end
        SP3: begin la <= ~la; st <= SP4; end
        SP4: if (lr_ev) begin lr_s <= ~lr_s; st <= SP5; end
             else if (ra_ev) begin ra_s <= ~ra_s; st <= SP9; end
        SP9: if (lr_ev) begin lr_s <= ~lr_s; st <= SP8; end
        SP8: begin la <= ~la; st <= SP1; end
        SP5: if (ra_ev) begin ra_s <= ~ra_s; st <= SP8; end
             else begin la <= ~la; st <= SP7; end
        SP7: if (lr_ev) begin lr_s <= ~lr_s; st <= SP6; end
             else if (ra_ev) begin ra_s <= ~ra_s; st <= SP1; end
        SP6: if (ra_ev) begin ra_s <= ~ra_s; dout <= din; st <= SP2; end
        default: st <= SP1;
      endcase
    end
  end

endmodule
