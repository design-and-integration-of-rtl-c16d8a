// mutex: N-input mutual exclusion element for 4-phase requests.
//
// At most one grant is high at a time. A grant is given to a raised request
// while no grant is held and stays high until that request falls; the element
// then releases and, one cycle later, may grant again. The asynchronous
// element of the router resolves simultaneous requests arbitrarily; this
// clocked version resolves them round robin, starting after the last winner
// (this design's choice, it keeps the arbitration fair).
//
// Interface: req[N-1:0] 4-phase request levels, gnt[N-1:0] one-hot grant.
// Timing: grant one cycle after the request, release one cycle after the
// granted request falls.
module mutex #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  output logic [N-1:0] gnt
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] last_q;
  logic [N-1:0]  pick;
  logic [IW-1:0] pick_idx;
  logic          pick_vld;

  // round-robin choice, starting after the last winner
  always_comb begin
    pick     = '0;
    pick_idx = '0;
    pick_vld = 1'b0;
    for (int unsigned i = 1; i <= N; i++) begin
      int unsigned j;
      j = (int'(last_q) + i) % N;
      if (!pick_vld && req[j]) begin
        pick_vld = 1'b1;
        pick_idx = IW'(j);
        pick[j]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gnt    <= '0;
      last_q <= IW'(N - 1);
    end else if (gnt == '0) begin
      if (pick_vld) begin
        gnt    <= pick;
        last_q <= pick_idx;
      end
    end else if ((gnt & req) == '0) begin
      gnt <= '0;
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));

endmodule
