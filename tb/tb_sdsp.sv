// tb_sdsp: end-to-end test of the SDSP core at its default configuration.
//
// A unified word memory serves both caches. The program is a loop over an
// array of random words: per element it loads, squares with the multiplier,
// accumulates, runs independent ALU work, stores and reloads (store-buffer
// forwarding), takes a data-dependent branch (mispredictions) and a jump,
// then stores its totals and halts. A reference instruction-set model runs
// the same program on its own copy of memory; afterwards the register file
// and the data memory must match it. The test also counts how often each
// mechanism of the core occurred (SU stall, SU full, mispredict recovery,
// predicted-taken fetch, cache misses, bypassed issue, write-back conflict,
// store-buffer forwarding, more than four issues in a cycle) and fails any
// that never happened. It reports IPC and the average fetch per block.
module tb_sdsp;
  import sdsp_pkg::*;
  import sdsp_asm_pkg::*;

  localparam int MEMW   = 16384;        // words
  localparam int DATA   = 32'h8000;     // byte address of the array
  localparam int NELEM  = 48;
  localparam int MAXCYC = 200000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  word_t mem [MEMW];
  word_t refmem [MEMW];
  word_t refreg [32];

  blk_t        imem_addr, dmem_raddr;
  word_t [3:0] imem_line, dmem_rline;
  logic        dmem_we, halted;
  word_t       dmem_waddr, dmem_wdata;
  perf_t       perf;

  sdsp dut (.clk, .rst_n, .imem_addr, .imem_line, .dmem_raddr, .dmem_rline,
            .dmem_we, .dmem_waddr, .dmem_wdata, .halted, .perf);

  always_comb
    for (int i = 0; i < 4; i++) begin
      imem_line[i]  = mem[(int'(imem_addr) * 4 + i) % MEMW];
      dmem_rline[i] = mem[(int'(dmem_raddr) * 4 + i) % MEMW];
    end
  always_ff @(posedge clk) if (rst_n && dmem_we) mem[(dmem_waddr >> 2) % MEMW] <= dmem_wdata;

  int checks = 0, failures = 0;
  int pc_w;
  task automatic emit(word_t w); mem[pc_w] = w; pc_w++; endtask

  // ---- program ----
  task automatic build_program();
    int loop_top, skip_at;
    pc_w = 0;
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    emit(i_op(OP_LUI, 1, 0, DATA >> 16));
    emit(i_op(OP_ORI, 1, 1, DATA & 16'hffff));        // r1 = array pointer
    emit(i_op(OP_ADDI, 2, 0, NELEM));                 // r2 = count
    emit(i_op(OP_ADDI, 5, 0, 0));
    emit(i_op(OP_ADDI, 13, 0, 0));
    loop_top = pc_w;
    emit(lw(3, 1, 0));                                // r3 = a[i]
    emit(mul_op(4, 3, 3));                            // r4 = a*a (16-bit)
    emit(r_op(ALU_ADD, 5, 5, 4));                     // acc
    emit(i_op(OP_ADDI, 6, 6, 1));
    emit(r_op(ALU_XOR, 7, 7, 3));
    emit(i_op(OP_ADDI, 20, 0, 3));
    emit(r_op(ALU_SLL, 8, 3, 20));
    emit(r_op(ALU_SUB, 9, 8, 7));
    emit(r_op(ALU_SRA, 14, 9, 20));
    emit(r_op(ALU_SLT, 15, 14, 9));
    emit(r_op(ALU_OR, 16, 16, 15));
    emit(r_op(ALU_AND, 17, 9, 3));
    emit(r_op(ALU_SRL, 18, 3, 20));
    emit(r_op(ALU_SLTU, 19, 18, 3));
    emit(sw(5, 1, 16'h0400));                         // b[i] = acc
    emit(lw(10, 1, 16'h0400));                        // reload: forwarding
    emit(r_op(ALU_ADD, 11, 11, 10));
    emit(i_op(OP_ANDI, 12, 3, 1));
    skip_at = pc_w;
    emit(br(OP_BEQ, 12, 0, 3));                       // even: skip two
    emit(i_op(OP_ADDI, 13, 13, 1));
    emit(mul_op(21, 13, 3));
    emit(r_op(ALU_ADD, 22, 22, 21));
    emit(br(OP_BLT, 3, 0, 2));                        // negative: skip one
    emit(i_op(OP_XORI, 23, 23, 16'h5a5a));
    emit(i_op(OP_ADDI, 1, 1, 4));
    emit(i_op(OP_ADDI, 2, 2, -1));
    emit(br(OP_BNE, 2, 0, loop_top - pc_w));          // loop
    emit(jmp(3));
    emit(i_op(OP_ADDI, 24, 0, 99));                   // skipped by the jump
    emit(i_op(OP_ADDI, 24, 0, 98));
    emit(sw(5, 0, 16'h7000));
    emit(sw(11, 0, 16'h7004));
    emit(sw(13, 0, 16'h7008));
    emit(lw(25, 0, 16'h7004));
    emit(br(OP_BGE, 25, 11, 2));
    emit(i_op(OP_ADDI, 26, 0, 1));
    emit(halt());
    for (int i = 0; i < NELEM; i++)
      mem[DATA / 4 + i] = (i % 5 == 0) ? -($urandom % 1000) : $urandom;
  endtask

  // ---- reference model ----
  task automatic run_reference(output int n_instr);
    pc_t pc;
    word_t ins, a, b;
    int rd, rs1, rs2, n;
    opcode_e op;
    for (int i = 0; i < MEMW; i++) refmem[i] = mem[i];
    for (int i = 0; i < 32; i++) refreg[i] = '0;
    pc = '0; n = 0;
    forever begin
      ins = refmem[pc % MEMW];
      op  = opcode_e'(ins[31:26]);
      rd = ins[25:21]; rs1 = ins[20:16]; rs2 = ins[15:11];
      a = refreg[rs1]; b = refreg[rs2];
      if (op != OP_NOP) n++;
      pc = pc + 1;
      case (op)
        OP_ALU:  refreg[rd] = ref_alu(alu_op_e'(ins[3:0]), a, b);
        OP_ADDI: refreg[rd] = a + sx16(ins);
        OP_ANDI: refreg[rd] = a & {16'h0, ins[15:0]};
        OP_ORI:  refreg[rd] = a | {16'h0, ins[15:0]};
        OP_XORI: refreg[rd] = a ^ {16'h0, ins[15:0]};
        OP_SLTI: refreg[rd] = ($signed(a) < $signed(sx16(ins))) ? 1 : 0;
        OP_LUI:  refreg[rd] = {ins[15:0], 16'h0};
        OP_MUL:  refreg[rd] = $signed(a[15:0]) * $signed(b[15:0]);
        OP_LW:   refreg[rd] = refmem[((a + sx16(ins)) >> 2) % MEMW];
        OP_SW:   refmem[((a + sx16(ins)) >> 2) % MEMW] = refreg[rd];
        OP_BEQ:  if (a == refreg[rd]) pc = pc - 1 + pc_t'(sx16(ins));
        OP_BNE:  if (a != refreg[rd]) pc = pc - 1 + pc_t'(sx16(ins));
        OP_BLT:  if ($signed(a) <  $signed(refreg[rd])) pc = pc - 1 + pc_t'(sx16(ins));
        OP_BGE:  if ($signed(a) >= $signed(refreg[rd])) pc = pc - 1 + pc_t'(sx16(ins));
        OP_J:    pc = pc - 1 + pc_t'({{6{ins[25]}}, ins[25:0]});
        OP_HALT: break;
        default: ;
      endcase
      refreg[0] = '0;
    end
    n_instr = n;
  endtask

  // ---- event counters ----
  longint cyc = 0, committed = 0, fetched = 0, blocks = 0;
  int n_stall = 0, n_full = 0, n_mis = 0, n_ptaken = 0, n_imiss = 0, n_dmiss = 0;
  int n_byp = 0, n_wbc = 0, n_fwd = 0, n_wide = 0;
  always_ff @(posedge clk) if (rst_n && !halted) begin
    cyc       <= cyc + 1;
    committed <= committed + perf.commit_cnt;
    fetched   <= fetched + perf.fetch_cnt;
    blocks    <= blocks + perf.fetch_block;
    n_stall   <= n_stall + perf.su_stall;
    n_full    <= n_full + perf.su_full;
    n_mis     <= n_mis + perf.mispredict;
    n_ptaken  <= n_ptaken + perf.pred_taken;
    n_imiss   <= n_imiss + perf.icache_miss;
    n_dmiss   <= n_dmiss + perf.dcache_miss;
    n_byp     <= n_byp + perf.bypass_issue;
    n_wbc     <= n_wbc + perf.wb_conflict;
    n_fwd     <= n_fwd + perf.sb_forward;
    n_wide    <= n_wide + (perf.issue_cnt > 4);
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic need(int n, string what);
    $display("  %-28s %0d", what, n);
    check(n > 0, {"mechanism never happened: ", what});
  endtask

  initial begin
    int n_ref;
    build_program();
    run_reference(n_ref);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (halted);
    repeat (20) @(posedge clk);   // let the store buffer drain
    for (int r = 1; r < 32; r++)
      check(dut.u_rf.regs[r] == refreg[r], $sformatf("r%0d = %h, expected %h", r, dut.u_rf.regs[r], refreg[r]));
    for (int i = DATA / 4; i < MEMW; i++)
      if (mem[i] != refmem[i]) check(1'b0, $sformatf("mem[%0h] = %h, expected %h", i * 4, mem[i], refmem[i]));
    checks++;
    check(committed == longint'(n_ref), $sformatf("committed %0d instructions, reference %0d", committed, n_ref));
    $display("cycles %0d  instructions %0d  IPC %0.2f  AIF %0.2f", cyc, committed,
             real'(committed) / real'(cyc), real'(fetched) / real'(blocks));
    need(n_stall,  "SU stall cycles");
    need(n_full,   "SU full (fetch held)");
    need(n_mis,    "mispredict recoveries");
    need(n_ptaken, "predicted-taken fetches");
    need(n_imiss,  "I-cache miss cycles");
    need(n_dmiss,  "D-cache miss cycles");
    need(n_byp,    "bypassed issues");
    need(n_wbc,    "write-back conflicts");
    need(n_fwd,    "store-buffer forwards");
    need(n_wide,   "cycles issuing over 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAXCYC) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
