// instruction_decoder: decodes one 32-bit SDSP instruction.
//
// Four of these sit side by side behind the fetch block, one per decode
// slot. The decoder is purely combinational: it sorts the instruction to a
// functional-unit class (ALU, multiplier, load, store, control transfer),
// picks the operation, the source and destination registers and the
// sign- or zero-extended immediate. Empty slots and no-ops come out with
// valid = 0, so they take no functional unit and are complete at once.
// The encoding is this design's own (see sdsp_pkg); the document defines
// the instruction set elsewhere.
module instruction_decoder
  import sdsp_pkg::*;
(
  input  logic     valid,   // slot holds a fetched, valid instruction
  input  word_t    instr,
  output decoded_t dec
);
  opcode_e op;
  word_t   sext16, zext16, sext26;

  always_comb begin
    op     = opcode_e'(instr[31:26]);
    sext16 = {{16{instr[15]}}, instr[15:0]};
    zext16 = {16'h0, instr[15:0]};
    sext26 = {{6{instr[25]}}, instr[25:0]};

    dec         = '0;
    dec.rs1     = instr[20:16];
    dec.rs2     = instr[15:11];
    dec.rd      = instr[25:21];
    dec.imm     = sext16;
    dec.alu_op  = ALU_ADD;
    dec.ct_op   = CT_BEQ;
    dec.fu      = FU_NONE;
    dec.valid   = valid;

    unique case (op)
      OP_ALU: begin
        dec.fu = FU_ALU; dec.use_rs1 = 1'b1; dec.use_rs2 = 1'b1;
        dec.alu_op = (instr[3:0] <= 4'd9) ? alu_op_e'(instr[3:0]) : ALU_ADD;
      end
      OP_ADDI: begin dec.fu = FU_ALU; dec.use_rs1 = 1'b1; dec.use_imm = 1'b1; dec.alu_op = ALU_ADD; end
      OP_ANDI: begin dec.fu = FU_ALU; dec.use_rs1 = 1'b1; dec.use_imm = 1'b1; dec.alu_op = ALU_AND; dec.imm = zext16; end
      OP_ORI:  begin dec.fu = FU_ALU; dec.use_rs1 = 1'b1; dec.use_imm = 1'b1; dec.alu_op = ALU_OR;  dec.imm = zext16; end
      OP_XORI: begin dec.fu = FU_ALU; dec.use_rs1 = 1'b1; dec.use_imm = 1'b1; dec.alu_op = ALU_XOR; dec.imm = zext16; end
      OP_SLTI: begin dec.fu = FU_ALU; dec.use_rs1 = 1'b1; dec.use_imm = 1'b1; dec.alu_op = ALU_SLT; end
      OP_LUI:  begin dec.fu = FU_ALU; dec.use_imm = 1'b1; dec.alu_op = ALU_PASSB; dec.imm = {instr[15:0], 16'h0}; end
      OP_MUL:  begin dec.fu = FU_MUL; dec.use_rs1 = 1'b1; dec.use_rs2 = 1'b1; end
      OP_LW:   begin dec.fu = FU_LD;  dec.use_rs1 = 1'b1; end
      OP_SW:   begin dec.fu = FU_ST;  dec.use_rs1 = 1'b1; dec.use_rs2 = 1'b1; dec.rs2 = instr[25:21]; dec.rd = '0; end
      OP_BEQ, OP_BNE, OP_BLT, OP_BGE: begin
        dec.fu = FU_CTU; dec.use_rs1 = 1'b1; dec.use_rs2 = 1'b1; dec.rs2 = instr[25:21]; dec.rd = '0;
        dec.ct_op = (op == OP_BEQ) ? CT_BEQ : (op == OP_BNE) ? CT_BNE : (op == OP_BLT) ? CT_BLT : CT_BGE;
      end
      OP_J:    begin dec.fu = FU_CTU; dec.ct_op = CT_J; dec.rd = '0; dec.imm = sext26; end
      OP_HALT: begin dec.halt = valid; dec.rd = '0; end
      default: begin dec.valid = 1'b0; dec.rd = '0; end   // no-op or unknown
    endcase

    if (!valid) dec = '0;
    if (!dec.use_rs1) dec.rs1 = '0;
    if (!dec.use_rs2) dec.rs2 = '0;
    if (dec.fu == FU_NONE && !dec.halt) dec.valid = 1'b0;
  end
endmodule
