// route_encoder: source-route lookup for one sending node.
//
// Turns source and destination coordinates into the address field of a flit:
// one two-bit direction per router on the XY path (X first, then Y), then the
// inverse of the last direction, which makes the destination router hand the
// flit to its core. In a torus each dimension goes the short way round. The
// original design keeps precomputed routes in a table at the sender; this block
// computes the same entries with combinational logic (noc_pkg::source_route)
// instead of storing them. Source and destination must differ.
//
// Interface: coordinates in, addr out (pair for the first router in the two
// most significant bits). Timing: combinational.
module route_encoder
  import noc_pkg::*;
#(
  parameter int unsigned N      = MESH_N,
  parameter int unsigned ADDR_W = MESH_ADDR_W,
  parameter bit          TORUS  = 1'b0
) (
  input  logic [$clog2(N)-1:0] src_x,
  input  logic [$clog2(N)-1:0] src_y,
  input  logic [$clog2(N)-1:0] dst_x,
  input  logic [$clog2(N)-1:0] dst_y,
  output logic [ADDR_W-1:0]    addr
);
  logic [MAX_ADDR_W-1:0] full;

  always_comb begin
    full = source_route(N, TORUS, int'(src_x), int'(src_y), int'(dst_x), int'(dst_y));
    addr = full[MAX_ADDR_W-1 -: ADDR_W];
  end

endmodule
