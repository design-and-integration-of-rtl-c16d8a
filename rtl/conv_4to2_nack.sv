// conv_4to2_nack: 4-phase to 2-phase converter with negative acknowledgement,
// at the link output of a virtual-channel merge port.
//
// A 4-phase request lr+ loads the flit latch and sends it as a transition of
// rr. The receiving switch answers with a transition of ra (flit taken) or of
// rn (flit refused because its virtual channel is busy). The converter turns
// that answer into la+ or ln+ toward the merge pipeline; lr- then returns the
// answer to zero. The latch holds the flit on the link until the answer.
//
// The original design builds this converter from two 4-to-2-phase state machines
// (one for the accepted path, one for the refused path) whose rr outputs are
// combined by an XOR. This version keeps one link request wire and one state
// machine. The original converter derives la or ln from the link's answer;
// that the left side waits for that answer before la or ln rises is this
// design's reading.
//
// Interface: lr, la, ln 4-phase left; rr (out), ra, rn (in) 2-phase link;
// din/dout flit. Timing: lr+ to rr one cycle; ra/rn to la/ln one cycle.
module conv_4to2_nack #(
  parameter int unsigned W = 59
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         lr,
  output logic         la,
  output logic         ln,
  output logic         rr,
  input  logic         ra,
  input  logic         rn,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);
  typedef enum logic [1:0] {K_IDLE, K_WAIT, K_RTZ} kstate_e;
  kstate_e st;
  logic    ra_s, rn_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st   <= K_IDLE;
      ra_s <= 1'b0;
      rn_s <= 1'b0;
      la   <= 1'b0;
      ln   <= 1'b0;
      rr   <= 1'b0;
      dout <= '0;
    end else begin
      unique case (st)
        K_IDLE: if (lr) begin
          dout <= din;
          rr   <= ~rr;
          st   <= K_WAIT;
        end
        K_WAIT: if (ra != ra_s) begin
          ra_s <= ~ra_s;
          la   <= 1'b1;
          st   <= K_RTZ;
        end else if (rn != rn_s) begin
          rn_s <= ~rn_s;
          ln   <= 1'b1;
          st   <= K_RTZ;
        end
        K_RTZ: if (!lr) begin
          la <= 1'b0;
          ln <= 1'b0;
          st <= K_IDLE;
        end
        default: st <= K_IDLE;
      endcase
    end
  end

  a_single_answer: assert property (@(posedge clk) disable iff (!rst_n) !(la && ln));

endmodule
