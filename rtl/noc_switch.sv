// noc_switch: router input port without virtual channels (switch module).
//
// A flit arrives as a 2-phase request on lr with the flit on din. The
// 2-to-4-phase converter hands the request to a linear latch controller that
// loads the flit latch and raises its right request. The two most significant
// address bits of the latched flit select one of four right requests rr[3:0]
// (the 1-to-4 demultiplexer); the acknowledgements of the four merge modules
// are ORed back into the controller. The flit leaves with its address field
// rotated left by two bits: the pair just used moves to the end of the
// address, the next pair moves to the top. After the last router the address
// therefore holds the route used, which is how the return path is derived.
//
// ADDR_HI is the bit position of the address MSB: FLIT_W-1 for mesh flits,
// FLIT_W-2 when a channel bit sits above the address (core port of the
// virtual-channel router). Bits above ADDR_HI and below the address pass
// unchanged.
//
// Interface: lr (in)/la (out) 2-phase link; rr[k]/ra[k] 4-phase toward the
// merge reached by direction code k; dout shared by all four.
// Timing: lr toggle -> rr[k] rises 3 cycles later; dout is stable while
// any rr[k] is high.
module noc_switch #(
  parameter int unsigned FLIT_W = 72,
  parameter int unsigned ADDR_W = 30,
  parameter int unsigned ADDR_HI = FLIT_W - 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              lr,
  output logic              la,
  input  logic [FLIT_W-1:0] din,
  output logic [3:0]        rr,
  input  logic [3:0]        ra,
  output logic [FLIT_W-1:0] dout
);
  logic              lr_m, la_m;
  logic              unused_ln;
  logic              rr_m, cap;
  logic [FLIT_W-1:0] flit_q;
  logic [ADDR_W-1:0] addr;
  logic [1:0]        dir;

  conv_2to4 u_conv (
    .clk, .rst_n, .lr, .la, .ln(unused_ln),
    .lr_m, .la_m, .ln_m(1'b0)
  );

  linear_ctrl u_lc (
    .clk, .rst_n, .lr(lr_m), .la(la_m), .rr(rr_m), .ra(|ra), .cap
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flit_q <= '0;
    else if (cap) flit_q <= din;
  end

  assign addr = flit_q[ADDR_HI -: ADDR_W];
  assign dir  = addr[ADDR_W-1 -: 2];

  // 1-to-4 demultiplexer
  always_comb begin
    rr = '0;
    rr[dir] = rr_m;
  end

  // address rotation
  always_comb begin
    dout = flit_q;
    dout[ADDR_HI -: ADDR_W] = {addr[ADDR_W-3:0], addr[ADDR_W-1 -: 2]};
  end

endmodule
