// noc_pkg: constants, direction encoding and the source-route function shared by
// the routers, the networks and their testbenches.
//
// Direction codes. A switch reads the two most significant address bits as a
// direction. The codes are chosen so that the code of the opposite direction is
// the bitwise inverse (N=00/S=11, E=01/W=10). A network input port that reads its
// own direction code delivers the flit to the local core: the last route pair of
// a packet is the inverse of the last hop taken, which is exactly the direction
// the packet arrived from. In the original design the exit pair is the inverse
// of the final route pair; the numeric codes and this way of decoding it are
// this design's choices.
//
// Flit layouts (most significant bit first):
//   mesh router : {address[29:0], payload[41:0]}            = 72 bits
//   VC router   : {channel, address[17:0], payload[39:0]}   = 59 bits
// Payload is 32 data bits plus 10 (mesh) or 8 (torus) bits of address that the
// network does not interpret.
//
// Coordinates: node index = y*N + x, x grows to the East, y grows to the South.
package noc_pkg;

  typedef enum logic [1:0] {
    DIR_N = 2'b00,
    DIR_E = 2'b01,
    DIR_W = 2'b10,
    DIR_S = 2'b11
  } dir_e;

  // Router port numbering: the four network ports use their direction code,
  // the core port is number 4.
  localparam int unsigned PORT_CORE = 4;
  localparam int unsigned NUM_PORTS = 5;

  // 8x8 mesh (no virtual channels)
  localparam int unsigned MESH_N         = 8;
  localparam int unsigned MESH_ADDR_W    = 30;
  localparam int unsigned MESH_PAYLOAD_W = 42;
  localparam int unsigned MESH_FLIT_W    = MESH_ADDR_W + MESH_PAYLOAD_W;  // 72

  // 8x8 torus (two virtual channels, channel bit in the MSB)
  localparam int unsigned TORUS_N         = 8;
  localparam int unsigned TORUS_ADDR_W    = 18;
  localparam int unsigned TORUS_PAYLOAD_W = 40;
  localparam int unsigned TORUS_FLIT_W    = 1 + TORUS_ADDR_W + TORUS_PAYLOAD_W;  // 59

  localparam int unsigned MAX_ADDR_W = 64;

  // Switch output k of input port p leads to this router port. The core port
  // reaches the four network ports directly; a network port p reaching code p
  // means "deliver to the core".
  function automatic int unsigned switch_target(int unsigned p, int unsigned k);
    if (p == PORT_CORE) return k;
    return (k == p) ? PORT_CORE : k;
  endfunction

  // XY source route from (sx,sy) to (dx,dy) in an n x n mesh or torus.
  // Returns the route pairs left-aligned in a MAX_ADDR_W-bit word: pair 0 (used
  // by the source router) in bits [MAX_ADDR_W-1 -: 2]. The pair after the last
  // hop is the inverse of that hop, which makes the destination router eject
  // the flit. Unused pairs are zero. In the torus each dimension goes the short
  // way round (ties go East/South). Source and destination must differ.
  function automatic logic [MAX_ADDR_W-1:0] source_route(
      input int unsigned n, input bit torus,
      input int unsigned sx, input int unsigned sy,
      input int unsigned dx, input int unsigned dy);
    logic [MAX_ADDR_W-1:0] a;
    int unsigned pos;
    int unsigned cnt;
    logic [1:0] code;
    logic [1:0] last;
    a    = '0;
    pos  = 0;
    last = DIR_E;
    // X dimension
    if (torus) begin
      cnt  = (dx + n - sx) % n;
      code = DIR_E;
      if (cnt > n / 2) begin
        cnt  = n - cnt;
        code = DIR_W;
      end
    end else begin
      cnt  = (dx >= sx) ? dx - sx : sx - dx;
      code = (dx >= sx) ? DIR_E : DIR_W;
    end
    for (int unsigned i = 0; i < MAX_ADDR_W / 2; i++) begin
      if (i < cnt) begin
        a[MAX_ADDR_W-1-2*pos -: 2] = code;
        pos++;
        last = code;
      end
    end
    // Y dimension
    if (torus) begin
      cnt  = (dy + n - sy) % n;
      code = DIR_S;
      if (cnt > n / 2) begin
        cnt  = n - cnt;
        code = DIR_N;
      end
    end else begin
      cnt  = (dy >= sy) ? dy - sy : sy - dy;
      code = (dy >= sy) ? DIR_S : DIR_N;
    end
    for (int unsigned i = 0; i < MAX_ADDR_W / 2; i++) begin
      if (i < cnt) begin
        a[MAX_ADDR_W-1-2*pos -: 2] = code;
        pos++;
        last = code;
      end
    end
    // exit pair: inverse of the last hop
    a[MAX_ADDR_W-1-2*pos -: 2] = ~last;
    return a;
  endfunction

  // Number of router-to-router hops of the route above.
  function automatic int unsigned route_hops(
      input int unsigned n, input bit torus,
      input int unsigned sx, input int unsigned sy,
      input int unsigned dx, input int unsigned dy);
    int unsigned cx, cy;
    cx = torus ? (dx + n - sx) % n : ((dx >= sx) ? dx - sx : sx - dx);
    cy = torus ? (dy + n - sy) % n : ((dy >= sy) ? dy - sy : sy - dy);
    if (torus && cx > n / 2) cx = n - cx;
    if (torus && cy > n / 2) cy = n - cy;
    return cx + cy;
  endfunction

endpackage
