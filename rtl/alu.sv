// alu: one of the four single-cycle integer ALUs of the SDSP.
//
// An operation issued in cycle t is latched at the end of t and its result
// is offered on the write-back side during t+1 (single-cycle latency; the
// window bypasses it to consumers issued in t+1). Only four results can be
// written per cycle and loads and multiplies come first, so an ALU whose
// result is not granted keeps it and reports busy until it is granted.
// A pending operation younger than a mispredicted branch is dropped.
module alu
  import sdsp_pkg::*;
#(
  parameter int unsigned SU_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  issue_t     iss,
  output logic       free,       // can accept an issue this cycle
  output result_t    res,        // result offered for write-back
  input  logic       grant,      // result written this cycle
  input  logic       flush,      // mispredict recovery this cycle
  input  tag_t       flush_tag,
  input  logic [3:0] head
);
  logic    v_q;
  tag_t    tag_q;
  alu_op_e op_q;
  word_t   a_q, b_q, y;

  always_comb begin
    unique case (op_q)
      ALU_ADD:   y = a_q + b_q;
      ALU_SUB:   y = a_q - b_q;
      ALU_AND:   y = a_q & b_q;
      ALU_OR:    y = a_q | b_q;
      ALU_XOR:   y = a_q ^ b_q;
      ALU_SLL:   y = a_q << b_q[4:0];
      ALU_SRL:   y = a_q >> b_q[4:0];
      ALU_SRA:   y = word_t'($signed(a_q) >>> b_q[4:0]);
      ALU_SLT:   y = word_t'($signed(a_q) < $signed(b_q));
      ALU_SLTU:  y = word_t'(a_q < b_q);
      ALU_PASSB: y = b_q;
      default:   y = a_q + b_q;
    endcase
  end

  assign res  = '{valid: v_q, tag: tag_q, value: y};
  assign free = !v_q || grant;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0; tag_q <= '0; op_q <= ALU_ADD; a_q <= '0; b_q <= '0;
    end else begin
      if (free) begin
        v_q   <= iss.valid && !(flush && tag_younger(iss.tag, flush_tag, head, SU_DEPTH));
        tag_q <= iss.tag;
        op_q  <= iss.dec.alu_op;
        a_q   <= iss.a;
        b_q   <= iss.dec.use_imm ? iss.dec.imm : iss.b;
      end else if (flush && tag_younger(tag_q, flush_tag, head, SU_DEPTH)) begin
        v_q <= 1'b0;
      end
    end
  end
endmodule
