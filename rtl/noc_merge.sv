// noc_merge: router output port without virtual channels (merge module).
//
// N_IN switch modules compete for one output link. A mutex grants one 4-phase
// request at a time; its grant selects the data input (the multiplexer) and
// connects the granted request to the 4-to-2-phase converter, which loads the
// output latch and toggles rr onto the link. The converter's acknowledgement
// is routed back only to the granted switch. The grant is held while the
// granted request or the converter's acknowledgement is high (the role of the
// original C-elements), so a new request cannot reach the converter before
// its handshake has returned to zero.
//
// The original merge has four inputs; N_IN=8 is used for the core port of
// the virtual-channel router, which takes both channels of four switches.
//
// Interface: lr[i]/la[i] 4-phase from switch i with din[i]; rr/ra 2-phase
// link with dout. Timing: request to rr toggle about three cycles.
module noc_merge #(
  parameter int unsigned W    = 72,
  parameter int unsigned N_IN = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [N_IN-1:0]     lr,
  output logic [N_IN-1:0]     la,
  input  logic [N_IN-1:0][W-1:0] din,
  output logic                rr,
  input  logic                ra,
  output logic [W-1:0]        dout
);
  logic [N_IN-1:0] req, gnt;
  logic            c_lr, c_la;
  logic [W-1:0]    mux;

  assign req = lr | (gnt & {N_IN{c_la}});

  mutex #(.N(N_IN)) u_mutex (.clk, .rst_n, .req, .gnt);

  always_comb begin
    mux = '0;
    for (int unsigned i = 0; i < N_IN; i++)
      if (gnt[i]) mux = din[i];
  end

  assign c_lr = |(gnt & lr);
  assign la   = gnt & {N_IN{c_la}};

  conv_4to2 #(.W(W)) u_conv (
    .clk, .rst_n, .lr(c_lr), .la(c_la), .rr, .ra, .din(mux), .dout
  );

endmodule
