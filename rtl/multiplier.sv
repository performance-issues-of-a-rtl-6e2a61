// multiplier: the SDSP 16-bit integer multiplier.
//
// Multiplies the signed low 16 bits of both sources into a 32-bit product.
// It is pipelined with a two-cycle latency: an operation issued in cycle t
// is multiplied in t+1 and its product is offered for write-back in t+2.
// A new operation can start every cycle. Multiply results are granted
// write-back ahead of ALU results (only load has higher priority, and at
// most one load result exists per cycle), so the pipe never stalls.
// Operations younger than a mispredicted branch are dropped in either stage.
module multiplier
  import sdsp_pkg::*;
#(
  parameter int unsigned SU_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  issue_t     iss,
  output result_t    res,
  input  logic       flush,
  input  tag_t       flush_tag,
  input  logic [3:0] head
);
  logic        v1, v2;
  tag_t        t1, t2;
  logic [15:0] a1, b1;
  word_t       p2;

  function automatic logic killed(logic v, tag_t t);
    return v && flush && tag_younger(t, flush_tag, head, SU_DEPTH);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; t1 <= '0; t2 <= '0; a1 <= '0; b1 <= '0; p2 <= '0;
    end else begin
      v1 <= iss.valid && !killed(iss.valid, iss.tag);
      t1 <= iss.tag;
      a1 <= iss.a[15:0];
      b1 <= iss.b[15:0];
      v2 <= v1 && !killed(v1, t1);
      t2 <= t1;
      p2 <= word_t'($signed(a1) * $signed(b1));
    end
  end

  assign res = '{valid: v2, tag: t2, value: p2};
endmodule
