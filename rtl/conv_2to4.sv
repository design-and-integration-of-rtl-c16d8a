// conv_2to4: 2-phase to 4-phase converter at a router input port.
//
// A link request is a transition of lr (2-phase). The converter raises the
// 4-phase request lr_m; the controller behind it answers with la_m (accepted)
// or ln_m (negative acknowledgement, only used by the virtual-channel switch).
// The answer is passed back to the link as a transition of la or ln, then
// lr_m returns to zero and the converter waits for la_m/ln_m to fall before it
// accepts the next link transition. This is the signal order of the original
// converter: lr -> lr_m+ -> (la_m|ln_m)+ -> (la|ln) -> lr_m- -> (la_m|ln_m)-.
//
// Interface: lr (in), la, ln (out) are 2-phase link signals; lr_m (out),
// la_m, ln_m (in) are 4-phase. Tie ln_m low where no nack exists.
// Timing: one clock per transition; lr_m rises the cycle after lr toggles.
module conv_2to4 (
  input  logic clk,
  input  logic rst_n,
  input  logic lr,
  output logic la,
  output logic ln,
  output logic lr_m,
  input  logic la_m,
  input  logic ln_m
);
  typedef enum logic [1:0] {C_IDLE, C_REQ, C_RTZ} cstate_e;
  cstate_e st;
  logic    lr_seen;   // phase of the last link request taken

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= C_IDLE;
      lr_seen <= 1'b0;
      lr_m    <= 1'b0;
      la      <= 1'b0;
      ln      <= 1'b0;
    end else begin
      unique case (st)
        C_IDLE: if (lr != lr_seen && !la_m && !ln_m) begin
          lr_m <= 1'b1;
          st   <= C_REQ;
        end
        C_REQ: if (la_m || ln_m) begin
          if (la_m) la <= ~la;
          else      ln <= ~ln;
          lr_seen <= ~lr_seen;
          lr_m    <= 1'b0;
          st      <= C_RTZ;
        end
        C_RTZ: if (!la_m && !ln_m) st <= C_IDLE;
        default: st <= C_IDLE;
      endcase
    end
  end

  a_one_answer: assert property (@(posedge clk) disable iff (!rst_n) !(la_m && ln_m));

endmodule
