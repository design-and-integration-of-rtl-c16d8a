// merge_pipeline: puts the two virtual channels of a merge port onto one link.
//
// A 2-input mutex chooses between the requests of the two merge_virtual
// modules; its grant selects the data and connects the granted request to the
// nacking 4-to-2-phase converter that drives the link. If the next router
// accepts the flit (ra toggles) the granted channel is acknowledged and its
// flit is gone. If the next router refuses it (rn toggles) the channel is not
// acknowledged: its request is withdrawn from the converter, and when the
// other channel is waiting the refused one is masked out of the mutex until
// the other channel has been granted, so the other channel can pass. This is
// how a refusal breaks a cycle in which each channel waits for the other.
// A refused flit stays in its merge_virtual latch and is offered again.
// How long a refused channel stays masked is this design's choice.
//
// Interface: lr[c]/la[c] 4-phase with merge_virtual c and din[c]; rr (out),
// ra, rn (in) 2-phase link with dout.
// Timing: grant to rr toggle two cycles; link answer to la one cycle.
module merge_pipeline #(
  parameter int unsigned W = 59
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [1:0]          lr,
  output logic [1:0]          la,
  input  logic [1:0][W-1:0]   din,
  output logic                rr,
  input  logic                ra,
  input  logic                rn,
  output logic [W-1:0]        dout
);
  logic [1:0] req, gnt, block_q;
  logic       c_lr, k_la, k_ln, busy;
  logic [W-1:0] mux;

  assign busy = k_la | k_ln;
  assign req  = (lr & ~block_q) | (gnt & {2{busy}});

  mutex #(.N(2)) u_mutex (.clk, .rst_n, .req, .gnt);

  assign mux  = gnt[1] ? din[1] : din[0];
  assign c_lr = |(gnt & lr & ~block_q) & ~k_ln;
  assign la   = gnt & {2{k_la}};

  // mask a refused channel while the other one waits
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) block_q <= '0;
    else begin
      for (int c = 0; c < 2; c++) begin
        if (k_ln && gnt[c] && lr[1-c]) block_q[c] <= 1'b1;
        else if (gnt[1-c] || !lr[1-c]) block_q[c] <= 1'b0;
      end
    end
  end

  conv_4to2_nack #(.W(W)) u_conv (
    .clk, .rst_n, .lr(c_lr), .la(k_la), .ln(k_ln), .rr, .ra, .rn, .din(mux), .dout
  );

endmodule
