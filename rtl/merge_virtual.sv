// merge_virtual: one virtual channel of a merge port.
//
// Works like the plain merge module: a mutex picks one of the four switch
// requests of this channel, the grant drives the data multiplexer, and the
// granted request goes to a linear latch controller that loads the flit and
// forwards it as a 4-phase request to the merge pipeline. The grant is held
// until the controller's left acknowledgement has returned to zero.
//
// Interface: lr[i]/la[i] 4-phase from switch i with din[i]; rr/ra 4-phase to
// the merge pipeline with dout. Timing: request to rr about three cycles.
module merge_virtual #(
  parameter int unsigned W    = 59,
  parameter int unsigned N_IN = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N_IN-1:0]        lr,
  output logic [N_IN-1:0]        la,
  input  logic [N_IN-1:0][W-1:0] din,
  output logic                   rr,
  input  logic                   ra,
  output logic [W-1:0]           dout
);
  logic [N_IN-1:0] req, gnt;
  logic            c_lr, c_la, cap;
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

  linear_ctrl u_lc (.clk, .rst_n, .lr(c_lr), .la(c_la), .rr, .ra, .cap);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout <= '0;
    else if (cap) dout <= mux;
  end

endmodule
