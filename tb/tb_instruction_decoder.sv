// tb_instruction_decoder: each instruction class decodes to the right
// unit, operation, registers and immediate; no-ops and empty slots are
// invalid.
module tb_instruction_decoder;
  import sdsp_pkg::*;
  import sdsp_asm_pkg::*;
  logic valid; word_t instr; decoded_t dec;
  int checks = 0, failures = 0;
  instruction_decoder dut (.valid, .instr, .dec);
  task automatic check(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  initial begin
    valid = 1;
    instr = r_op(ALU_SUB, 3, 4, 5); #1;
    check(dec.valid && dec.fu == FU_ALU && dec.alu_op == ALU_SUB && dec.rd == 3 && dec.rs1 == 4 && dec.rs2 == 5 && !dec.use_imm, "R-type");
    instr = i_op(OP_ADDI, 7, 8, -3); #1;
    check(dec.fu == FU_ALU && dec.use_imm && dec.imm == -3 && dec.rd == 7 && dec.rs1 == 8 && dec.rs2 == 0, "ADDI sign-extends");
    instr = i_op(OP_ORI, 7, 8, 16'h8001); #1;
    check(dec.alu_op == ALU_OR && dec.imm == 32'h8001, "ORI zero-extends");
    instr = i_op(OP_LUI, 9, 0, 16'hbeef); #1;
    check(dec.alu_op == ALU_PASSB && dec.imm == 32'hbeef0000 && dec.rd == 9, "LUI");
    instr = mul_op(1, 2, 3); #1;
    check(dec.fu == FU_MUL && dec.rd == 1 && dec.rs1 == 2 && dec.rs2 == 3, "MUL");
    instr = lw(4, 5, 16'hfffc); #1;
    check(dec.fu == FU_LD && dec.rd == 4 && dec.rs1 == 5 && dec.imm == -4 && !dec.use_rs2, "LW");
    instr = sw(6, 7, 8); #1;
    check(dec.fu == FU_ST && dec.rd == 0 && dec.rs1 == 7 && dec.rs2 == 6 && dec.imm == 8, "SW data register from rd field");
    instr = br(OP_BLT, 10, 11, -5); #1;
    check(dec.fu == FU_CTU && dec.ct_op == CT_BLT && dec.rs1 == 10 && dec.rs2 == 11 && dec.rd == 0 && dec.imm == -5, "BLT");
    instr = jmp(-100); #1;
    check(dec.fu == FU_CTU && dec.ct_op == CT_J && dec.imm == -100 && !dec.use_rs1, "J");
    instr = halt(); #1;
    check(dec.valid && dec.halt && dec.fu == FU_NONE, "HALT");
    instr = 32'h0; #1;
    check(!dec.valid, "no-op invalid");
    instr = r_op(ALU_ADD, 1, 2, 3); valid = 0; #1;
    check(!dec.valid && dec.fu == FU_NONE && dec.rd == 0, "empty slot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #10000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
