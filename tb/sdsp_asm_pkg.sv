// sdsp_asm_pkg: instruction encoders and a reference instruction-set model
// for the SDSP testbenches. The encoders build words in the encoding of
// sdsp_pkg; iss_step executes one instruction on an architectural state
// held by the caller, independently of the RTL.
package sdsp_asm_pkg;
  import sdsp_pkg::*;

  function automatic word_t r_op(alu_op_e f, int rd, int rs1, int rs2);
    return {OP_ALU, 5'(rd), 5'(rs1), 5'(rs2), 7'd0, 4'(f)};
  endfunction
  function automatic word_t i_op(opcode_e op, int rd, int rs1, int imm);
    return {op, 5'(rd), 5'(rs1), 16'(imm)};
  endfunction
  function automatic word_t mul_op(int rd, int rs1, int rs2);
    return {OP_MUL, 5'(rd), 5'(rs1), 5'(rs2), 11'd0};
  endfunction
  function automatic word_t lw(int rd, int rs1, int imm);
    return {OP_LW, 5'(rd), 5'(rs1), 16'(imm)};
  endfunction
  function automatic word_t sw(int rsrc, int rs1, int imm);
    return {OP_SW, 5'(rsrc), 5'(rs1), 16'(imm)};
  endfunction
  function automatic word_t br(opcode_e op, int rs1, int rs2, int off);
    return {op, 5'(rs2), 5'(rs1), 16'(off)};
  endfunction
  function automatic word_t jmp(int off);
    return {OP_J, 26'(off)};
  endfunction
  function automatic word_t halt();
    return {OP_HALT, 26'd0};
  endfunction

  function automatic word_t sx16(word_t w);
    return {{16{w[15]}}, w[15:0]};
  endfunction

  // Reference ALU
  function automatic word_t ref_alu(alu_op_e f, word_t a, word_t b);
    case (f)
      ALU_ADD:  return a + b;
      ALU_SUB:  return a - b;
      ALU_AND:  return a & b;
      ALU_OR:   return a | b;
      ALU_XOR:  return a ^ b;
      ALU_SLL:  return a << b[4:0];
      ALU_SRL:  return a >> b[4:0];
      ALU_SRA:  return word_t'($signed(a) >>> b[4:0]);
      ALU_SLT:  return ($signed(a) < $signed(b)) ? 32'd1 : 32'd0;
      ALU_SLTU: return (a < b) ? 32'd1 : 32'd0;
      ALU_PASSB: return b;
      default:  return a + b;
    endcase
  endfunction
endpackage
