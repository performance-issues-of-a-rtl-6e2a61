// ctu: the SDSP control transfer unit.
//
// Resolves one branch or jump per cycle. An operation issued in cycle t is
// latched and evaluated in t+1: the condition is computed, the actual
// successor (target when taken, next word otherwise) is compared with the
// successor the fetch unit predicted for that instruction, and a mismatch
// raises mispredict together with the correct fetch address. Recovery
// starts in that same cycle, as soon as the outcome is known, rather than
// when the branch reaches the bottom of the scheduling unit. Targets are
// word offsets from the branch itself. The outcome also reports taken and
// target so the predictor can be trained when the block commits.
module ctu
  import sdsp_pkg::*;
#(
  parameter int unsigned SU_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  issue_t     iss,
  output ctu_out_t   out,
  input  logic       flush,      // recovery by this unit is the only flush
  input  tag_t       flush_tag,
  input  logic [3:0] head
);
  logic   v_q;
  issue_t q;
  logic   taken;
  pc_t    target, actual;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0; q <= '0;
    end else begin
      v_q <= iss.valid && !(flush && tag_younger(iss.tag, flush_tag, head, SU_DEPTH));
      q   <= iss;
    end
  end

  always_comb begin
    unique case (q.dec.ct_op)
      CT_BEQ:  taken = (q.a == q.b);
      CT_BNE:  taken = (q.a != q.b);
      CT_BLT:  taken = ($signed(q.a) <  $signed(q.b));
      CT_BGE:  taken = ($signed(q.a) >= $signed(q.b));
      default: taken = 1'b1;
    endcase
    target = q.pc + pc_t'(q.dec.imm);
    actual = taken ? target : q.pc + 1'b1;
    out.valid       = v_q;
    out.tag         = q.tag;
    out.taken       = taken;
    out.target      = target;
    out.mispredict  = v_q && (actual != q.pred_next);
    out.redirect_pc = actual;
  end
endmodule
