// tb_sdsp_workloads: runs two of the Stanford integer benchmarks on the
// SDSP core at its default parameters, at their usual sizes: "bubble"
// (bubble sort of 500 random words) and "intmm" (40 x 40 integer matrix
// multiply, operands in -60..59 so that the 16-bit multiplier is exact),
// and a "dct" kernel: a 2-D discrete cosine transform of an 8 x 8 pixel
// block followed by the inverse transform, repeated 100 times. The DCT is
// done as four 8 x 8 matrix products with the cosine matrix
// C[u][x] = round(64 * a(u) * cos((2x+1) u pi / 16)), a(0) = sqrt(1/8),
// a(u) = 1/2, each product shifted right by 6 to stay within the 16-bit
// multiplier; the result must equal the same integer arithmetic done here
// and come back close to the original pixels (the rounded cosine matrix
// is a few percent off orthogonal, so within 16 levels).
// Each program is hand-written in the core's instruction set; the sorted
// array and the product matrix are checked against results computed here
// in the testbench. Cycles, committed instructions, IPC, average fetch per
// block, mispredicts and SU stalls are reported for each.
module tb_sdsp_workloads;
  import sdsp_pkg::*;
  import sdsp_asm_pkg::*;

  localparam int MEMW = 32768;           // words (128 KB)
  localparam int ABASE = 32'h8000, BBASE = 32'hA000, CBASE = 32'hC000;
  localparam int NSORT = 500, NMM = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  word_t mem [MEMW];
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

  int checks = 0, failures = 0, pc_w;
  longint cyc, committed, fetched, blocks, nmis, nstall;
  always_ff @(posedge clk) if (rst_n && !halted) begin
    cyc <= cyc + 1; committed <= committed + perf.commit_cnt; fetched <= fetched + perf.fetch_cnt;
    blocks <= blocks + perf.fetch_block; nmis <= nmis + perf.mispredict; nstall <= nstall + perf.su_stall;
  end

  task automatic emit(word_t w); mem[pc_w] = w; pc_w++; endtask
  task automatic check(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  task automatic li(int r, int v);
    emit(i_op(OP_LUI, r, 0, v >>> 16)); emit(i_op(OP_ORI, r, r, v & 16'hffff));
  endtask

  task automatic run(string name);
    cyc = 0; committed = 0; fetched = 0; blocks = 0; nmis = 0; nstall = 0;
    rst_n = 0; repeat (3) @(posedge clk); rst_n = 1;
    wait (halted);
    repeat (20) @(posedge clk);
    $display("%-8s cycles %0d  instructions %0d  IPC %0.2f  AIF %0.2f  mispredicts %0d  SU stalls %0d",
             name, cyc, committed, real'(committed) / real'(cyc), real'(fetched) / real'(blocks), nmis, nstall);
  endtask

  task automatic bubble();
    int outer, inner;
    word_t expv [$];
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    pc_w = 0;
    li(1, ABASE);
    emit(i_op(OP_ADDI, 2, 0, NSORT - 1));              // r2 = top
    outer = pc_w;
    emit(i_op(OP_ADDI, 3, 1, 0));                      // r3 = &a[0]
    emit(i_op(OP_ADDI, 9, 0, 2));
    emit(r_op(ALU_SLL, 6, 2, 9));
    emit(r_op(ALU_ADD, 5, 1, 6));                      // r5 = &a[top]
    inner = pc_w;
    emit(lw(7, 3, 0));
    emit(lw(8, 3, 4));
    emit(br(OP_BGE, 8, 7, 3));                         // in order: no swap
    emit(sw(8, 3, 0));
    emit(sw(7, 3, 4));
    emit(i_op(OP_ADDI, 3, 3, 4));
    emit(br(OP_BNE, 3, 5, inner - pc_w));
    emit(i_op(OP_ADDI, 2, 2, -1));
    emit(br(OP_BNE, 2, 0, outer - pc_w));
    emit(halt());
    for (int i = 0; i < NSORT; i++) begin
      mem[ABASE / 4 + i] = word_t'($urandom % 100000) - 50000;
      expv.push_back(mem[ABASE / 4 + i]);
    end
    run("bubble");
    begin
      int sexp [NSORT];
      int t;
      // reference: insertion sort of the original data
      for (int i = 0; i < NSORT; i++) begin
        t = int'(expv[i]);
        sexp[i] = t;
        for (int j = i; j > 0 && sexp[j - 1] > t; j--) begin sexp[j] = sexp[j - 1]; sexp[j - 1] = t; end
      end
      for (int i = 0; i < NSORT; i++)
        check(int'(mem[ABASE / 4 + i]) == sexp[i], $sformatf("bubble a[%0d] = %0d, expected %0d", i, int'(mem[ABASE / 4 + i]), sexp[i]));
    end
  endtask

  task automatic intmm();
    int li_, lj, lk;
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    pc_w = 0;
    li(1, ABASE); li(3, CBASE);
    emit(i_op(OP_ADDI, 13, 1, 0));                     // r13 = row of A
    emit(i_op(OP_ADDI, 20, 3, 0));                     // r20 = &C[0][0]
    emit(i_op(OP_ADDI, 10, 0, NMM));                   // i count
    li_ = pc_w;
    li(14, BBASE);                                     // r14 = column of B
    emit(i_op(OP_ADDI, 11, 0, NMM));                   // j count
    lj = pc_w;
    emit(i_op(OP_ADDI, 15, 13, 0));                    // r15 = &A[i][0]
    emit(i_op(OP_ADDI, 21, 14, 0));                    // r21 = &B[0][j]
    emit(i_op(OP_ADDI, 16, 0, 0));                     // sum
    emit(i_op(OP_ADDI, 12, 0, NMM));                   // k count
    lk = pc_w;
    emit(lw(17, 15, 0));
    emit(lw(18, 21, 0));
    emit(mul_op(19, 17, 18));
    emit(r_op(ALU_ADD, 16, 16, 19));
    emit(i_op(OP_ADDI, 15, 15, 4));
    emit(i_op(OP_ADDI, 21, 21, NMM * 4));
    emit(i_op(OP_ADDI, 12, 12, -1));
    emit(br(OP_BNE, 12, 0, lk - pc_w));
    emit(sw(16, 20, 0));
    emit(i_op(OP_ADDI, 20, 20, 4));
    emit(i_op(OP_ADDI, 14, 14, 4));
    emit(i_op(OP_ADDI, 11, 11, -1));
    emit(br(OP_BNE, 11, 0, lj - pc_w));
    emit(i_op(OP_ADDI, 13, 13, NMM * 4));
    emit(i_op(OP_ADDI, 10, 10, -1));
    emit(br(OP_BNE, 10, 0, li_ - pc_w));               // back to the LUI of r14
    emit(halt());
    for (int i = 0; i < NMM * NMM; i++) begin
      mem[ABASE / 4 + i] = word_t'(int'($urandom % 120) - 60);
      mem[BBASE / 4 + i] = word_t'(int'($urandom % 120) - 60);
    end
    run("intmm");
    for (int i = 0; i < NMM; i++)
      for (int j = 0; j < NMM; j++) begin
        int s;
        s = 0;
        for (int k = 0; k < NMM; k++) s += int'(mem[ABASE / 4 + i * NMM + k]) * int'(mem[BBASE / 4 + k * NMM + j]);
        check(int'(mem[CBASE / 4 + i * NMM + j]) == s, $sformatf("intmm C[%0d][%0d] = %0d, expected %0d", i, j, int'(mem[CBASE / 4 + i * NMM + j]), s));
      end
  endtask


  // D[i][j] = (sum_k A[i][k] * B[k][j]) >>> sh, 8 x 8, byte strides given
  task automatic emit_mm(int ab, int ars, int acs, int bb, int brs, int bcs, int db, int sh);
    int l_i, l_j, l_k;
    li(13, ab); li(20, db);
    emit(i_op(OP_ADDI, 10, 0, 8));
    l_i = pc_w;
    li(14, bb);
    emit(i_op(OP_ADDI, 11, 0, 8));
    l_j = pc_w;
    emit(i_op(OP_ADDI, 15, 13, 0));
    emit(i_op(OP_ADDI, 21, 14, 0));
    emit(i_op(OP_ADDI, 16, 0, 0));
    emit(i_op(OP_ADDI, 12, 0, 8));
    l_k = pc_w;
    emit(lw(17, 15, 0));
    emit(lw(18, 21, 0));
    emit(mul_op(19, 17, 18));
    emit(r_op(ALU_ADD, 16, 16, 19));
    emit(i_op(OP_ADDI, 15, 15, acs));
    emit(i_op(OP_ADDI, 21, 21, brs));
    emit(i_op(OP_ADDI, 12, 12, -1));
    emit(br(OP_BNE, 12, 0, l_k - pc_w));
    emit(i_op(OP_ADDI, 22, 0, sh));
    emit(r_op(ALU_SRA, 16, 16, 22));
    emit(sw(16, 20, 0));
    emit(i_op(OP_ADDI, 20, 20, 4));
    emit(i_op(OP_ADDI, 14, 14, bcs));
    emit(i_op(OP_ADDI, 11, 11, -1));
    emit(br(OP_BNE, 11, 0, l_j - pc_w));
    emit(i_op(OP_ADDI, 13, 13, ars));
    emit(i_op(OP_ADDI, 10, 10, -1));
    emit(br(OP_BNE, 10, 0, l_i - pc_w));
  endtask

  function automatic void ref_mm(ref int a [64], input bit at, ref int b [64], input bit bt, ref int d [64]);
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        int sacc;
        sacc = 0;
        for (int k = 0; k < 8; k++)
          sacc += (at ? a[k * 8 + i] : a[i * 8 + k]) * (bt ? b[j * 8 + k] : b[k * 8 + j]);
        d[i * 8 + j] = sacc >>> 6;
      end
  endfunction

  task automatic dct();
    localparam int X = 32'h8000, C = 32'h8100, T = 32'h8200, Y = 32'h8300, Z = 32'h8400, X2 = 32'h8500;
    int rep;
    int xv [64], cv [64], tv [64], yv [64], zv [64], x2 [64];
    for (int i = 0; i < MEMW; i++) mem[i] = '0;
    for (int u = 0; u < 8; u++)
      for (int x = 0; x < 8; x++) begin
        real a;
        a = (u == 0) ? $sqrt(1.0 / 8.0) : 0.5;
        cv[u * 8 + x] = $rtoi(64.0 * a * $cos((2.0 * x + 1.0) * u * 3.14159265358979 / 16.0) + ((64.0 * a * $cos((2.0 * x + 1.0) * u * 3.14159265358979 / 16.0)) >= 0 ? 0.5 : -0.5));
        mem[C / 4 + u * 8 + x] = word_t'(cv[u * 8 + x]);
      end
    for (int i = 0; i < 64; i++) begin xv[i] = $urandom % 256; mem[X / 4 + i] = word_t'(xv[i]); end
    pc_w = 0;
    emit(i_op(OP_ADDI, 25, 0, 100));
    rep = pc_w;
    emit_mm(C, 32, 4, X, 32, 4, T, 6);     // T  = C  X
    emit_mm(T, 32, 4, C, 4, 32, Y, 6);     // Y  = T  C'
    emit_mm(C, 4, 32, Y, 32, 4, Z, 6);     // Z  = C' Y
    emit_mm(Z, 32, 4, C, 32, 4, X2, 6);    // X2 = Z  C
    emit(i_op(OP_ADDI, 25, 25, -1));
    emit(br(OP_BNE, 25, 0, rep - pc_w));
    emit(halt());
    run("dct");
    ref_mm(cv, 0, xv, 0, tv);
    ref_mm(tv, 0, cv, 1, yv);
    ref_mm(cv, 1, yv, 0, zv);
    ref_mm(zv, 0, cv, 0, x2);
    for (int i = 0; i < 64; i++) begin
      check(int'(mem[Y / 4 + i]) == yv[i], $sformatf("dct Y[%0d] = %0d, expected %0d", i, int'(mem[Y / 4 + i]), yv[i]));
      check(int'(mem[X2 / 4 + i]) == x2[i], $sformatf("dct X2[%0d] = %0d, expected %0d", i, int'(mem[X2 / 4 + i]), x2[i]));
      check(x2[i] - xv[i] <= 16 && xv[i] - x2[i] <= 16, $sformatf("dct round trip pixel %0d: %0d vs %0d", i, x2[i], xv[i]));
    end
  endtask

  initial begin
    bubble();
    intmm();
    dct();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
