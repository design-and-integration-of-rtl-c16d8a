// switch_nack: router input port with two virtual channels and nacking.
//
// The flit's most significant bit selects virtual channel 0 or 1. A link
// request (2-phase lr) is converted to a 4-phase request, steered by the
// channel bit to that channel's non-blocking arbiter (NARB), which either
// takes the flit into the channel's latch and acknowledges it (la toggles) or
// refuses it because the channel still holds an unforwarded flit (ln
// toggles). Each channel has its own latch and its own 1-to-4 direction
// demultiplexer on the two address bits below the channel bit; the address
// field (below the channel bit) is rotated by two bits on the way out.
//
// The channel bit is held in a latch that is transparent while no 4-phase
// request is in progress and closed while one is, so the steering cannot
// change in the middle of a handshake. The original design places a 2-input mutex
// between each channel's request and its right acknowledgement to order the
// two in the asynchronous circuit; in this clocked version the controller
// takes at most one of them per cycle, which gives the same ordering, so no
// separate mutex is instantiated (this design's simplification).
//
// Interface: lr (in), la, ln (out) 2-phase link; rr[c][k]/ra[c][k] 4-phase
// toward the merge of direction k for channel c; dout[c] flit of channel c.
// Timing: lr toggle -> rr rises 3 cycles later, or ln toggles 4 cycles later.
module switch_nack #(
  parameter int unsigned FLIT_W = 59,
  parameter int unsigned ADDR_W = 18
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   lr,
  output logic                   la,
  output logic                   ln,
  input  logic [FLIT_W-1:0]      din,
  output logic [1:0][3:0]        rr,
  input  logic [1:0][3:0]        ra,
  output logic [1:0][FLIT_W-1:0] dout
);
  localparam int unsigned AH = FLIT_W - 2;  // address MSB, below the channel bit

  logic       lr_m, la_m, ln_m;
  logic       ch_q;
  logic [1:0] lr_c, la_c, ln_c, rr_c, cap_c;

  conv_2to4 u_conv (.clk, .rst_n, .lr, .la, .ln, .lr_m, .la_m, .ln_m);

  // channel selection latch: open between handshakes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ch_q <= 1'b0;
    else if (!lr_m) ch_q <= din[FLIT_W-1];
  end

  assign lr_c = {lr_m & ch_q, lr_m & ~ch_q};
  assign la_m = |la_c;
  assign ln_m = |ln_c;

  for (genvar c = 0; c < 2; c++) begin : g_vc
    logic [FLIT_W-1:0] flit_q;
    logic [ADDR_W-1:0] addr;

    narb u_narb (
      .clk, .rst_n, .lr(lr_c[c]), .la(la_c[c]), .ln(ln_c[c]),
      .rr(rr_c[c]), .ra(|ra[c]), .cap(cap_c[c])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) flit_q <= '0;
      else if (cap_c[c]) flit_q <= din;
    end

    assign addr = flit_q[AH -: ADDR_W];

    always_comb begin
      rr[c] = '0;
      rr[c][addr[ADDR_W-1 -: 2]] = rr_c[c];
      dout[c] = flit_q;
      dout[c][AH -: ADDR_W] = {addr[ADDR_W-3:0], addr[ADDR_W-1 -: 2]};
    end
  end

endmodule
