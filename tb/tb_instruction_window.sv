// tb_instruction_window: oldest-first selection across blocks under the
// per-unit limits (4 ALU, 1 load, 1 store, 1 multiply, 1 control transfer),
// eight issues in one cycle, in-order stores, loads held behind an older
// unissued store, bypass of a result-bus value into the issuing
// instruction, wake-up capture for later issue, and cancellation of
// younger entries by a flush.
module tb_instruction_window;
  import sdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic alloc_valid, ld_free, st_free, bypassed, flush; logic [3:0] alloc_idx, head, alu_free, issue_cnt;
  decoded_t [3:0] alloc_dec; opnd_t [7:0] alloc_opnd; pc_t [3:0] alloc_pc, alloc_pred_next;
  result_t [3:0] bus; issue_t [3:0] iss_alu; issue_t iss_mul, iss_ld, iss_st, iss_ctu; tag_t flush_tag;
  int checks = 0, failures = 0;
  instruction_window dut (.*);
  task automatic check(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  function automatic opnd_t rdy(int v); return '{ready: 1, tag: '0, value: 32'(v)}; endfunction
  function automatic opnd_t wt(int t);  return '{ready: 0, tag: 6'(t), value: '0}; endfunction
  task automatic put(int s, fu_e fu, opnd_t a, opnd_t b);
    alloc_dec[s] = '0; alloc_dec[s].valid = 1; alloc_dec[s].fu = fu;
    alloc_opnd[2*s] = a; alloc_opnd[2*s+1] = b;
  endtask
  task automatic alloc(int blk); alloc_valid = 1; alloc_idx = 4'(blk); @(negedge clk); alloc_valid = 0; alloc_dec = '0; endtask
  task automatic freeze(); alu_free = 0; ld_free = 0; st_free = 0; endtask
  task automatic thaw();   alu_free = 4'b1111; ld_free = 1; st_free = 1; endtask
  initial begin
    alloc_valid = 0; alloc_idx = 0; head = 0; alloc_dec = '0; alloc_opnd = '0; alloc_pc = '0; alloc_pred_next = '0;
    bus = '0; flush = 0; flush_tag = '0; freeze();
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    put(0, FU_ALU, rdy(0), rdy(0)); put(1, FU_ALU, rdy(1), rdy(0)); put(2, FU_ALU, rdy(2), rdy(0)); put(3, FU_ALU, rdy(3), rdy(0));
    alloc(0);
    put(0, FU_ALU, rdy(4), rdy(0)); put(1, FU_LD, rdy(5), rdy(0)); put(2, FU_ST, rdy(6), rdy(0)); put(3, FU_ALU, rdy(7), rdy(0));
    alloc(1);
    put(0, FU_LD, rdy(8), rdy(0)); put(1, FU_ST, rdy(9), rdy(0)); put(2, FU_ALU, rdy(10), rdy(0)); put(3, FU_CTU, wt(50), rdy(0));
    alloc(2);
    #1; check(issue_cnt == 0, "nothing issues while units are busy");
    // cycle C: store unit busy
    alu_free = 4'b1111; ld_free = 1; st_free = 0; #1;
    check(iss_alu[0].tag == 0 && iss_alu[1].tag == 1 && iss_alu[2].tag == 2 && iss_alu[3].tag == 3 &&
          iss_alu[3].valid && iss_alu[0].a == 0 && iss_alu[3].a == 3, "oldest four ALU operations, in order");
    check(iss_ld.valid && iss_ld.tag == 5 && !iss_st.valid && !iss_ctu.valid && issue_cnt == 5, "load older than the store issues");
    @(negedge clk);
    // cycle D: ALUs 1 and 3 busy
    alu_free = 4'b0101; st_free = 1; #1;
    check(iss_alu[0].tag == 4 && iss_alu[2].tag == 7 && !iss_alu[1].valid && !iss_alu[3].valid, "ALU work goes to free ALUs only");
    check(iss_st.valid && iss_st.tag == 6 && iss_ld.valid && iss_ld.tag == 8, "store issues; the younger load goes with it");
    @(negedge clk); thaw(); #1;
    check(iss_alu[0].tag == 10 && iss_st.tag == 9 && !iss_ld.valid && !iss_ctu.valid, "remaining ALU and the second store");
    @(negedge clk); #1;
    check(issue_cnt == 0, "control transfer still waits for its operand");
    bus[2] = '{valid: 1, tag: 6'd50, value: 32'hABCD}; #1;
    check(iss_ctu.valid && iss_ctu.tag == 11 && iss_ctu.a == 32'hABCD && bypassed, "bypass from the result bus");
    @(negedge clk); bus = '0;
    // load behind an unissued store
    put(0, FU_ST, wt(40), rdy(0)); put(1, FU_LD, rdy(1), rdy(0)); put(2, FU_ALU, wt(41), rdy(0));
    alloc(3);
    #1; check(!iss_ld.valid && !iss_st.valid, "load held behind an older unissued store");
    freeze(); bus[0] = '{valid: 1, tag: 6'd41, value: 32'd77}; @(negedge clk); bus = '0; #1;
    check(issue_cnt == 0, "woken ALU held while units busy");
    thaw(); bus[1] = '{valid: 1, tag: 6'd40, value: 32'd5}; #1;
    check(iss_st.valid && iss_st.tag == 12 && iss_ld.valid && iss_ld.tag == 13, "store and load issue together once the store is ready");
    check(iss_alu[0].valid && iss_alu[0].tag == 14 && iss_alu[0].a == 77, "captured operand used later");
    @(negedge clk); bus = '0;
    // eight issues in one cycle
    freeze();
    put(0, FU_ALU, rdy(1), rdy(0)); put(1, FU_ALU, rdy(1), rdy(0)); put(2, FU_ALU, rdy(1), rdy(0)); put(3, FU_ALU, rdy(1), rdy(0));
    alloc(4);
    put(0, FU_MUL, wt(60), rdy(0)); put(1, FU_LD, wt(60), rdy(0)); put(2, FU_ST, wt(60), rdy(0)); put(3, FU_CTU, wt(60), rdy(0));
    alloc(5);
    thaw(); bus[3] = '{valid: 1, tag: 6'd60, value: 32'd1}; #1;
    check(issue_cnt == 8 && iss_mul.valid && iss_ld.valid && iss_st.valid && iss_ctu.valid && iss_alu[3].valid, "eight issues in one cycle");
    @(negedge clk); bus = '0;
    // flush cancels younger entries
    put(0, FU_ALU, wt(61), rdy(0)); put(1, FU_ALU, wt(61), rdy(0));
    alloc(6);
    flush = 1; flush_tag = 6'(6 * 4 + 0); @(negedge clk); flush = 0;
    bus[0] = '{valid: 1, tag: 6'd61, value: 32'd9}; #1;
    check(iss_alu[0].valid && iss_alu[0].tag == 24 && !iss_alu[1].valid && issue_cnt == 1, "entry after the branch cancelled");
    @(negedge clk); bus = '0;
    // a ready instruction issues in the cycle its block is decoded, and only once
    put(0, FU_ALU, rdy(3), rdy(4)); put(1, FU_ALU, wt(62), rdy(0));
    alloc_valid = 1; alloc_idx = 4'd7; #1;
    check(iss_alu[0].valid && iss_alu[0].tag == 28 && iss_alu[0].a == 3 && issue_cnt == 1, "issue in the decode cycle");
    @(negedge clk); alloc_valid = 0; alloc_dec = '0; #1;
    check(issue_cnt == 0, "instruction issued while decoded is not issued again");
    bus[2] = '{valid: 1, tag: 6'd62, value: 32'd5}; #1;
    check(iss_alu[0].valid && iss_alu[0].tag == 29 && issue_cnt == 1, "the waiting neighbour issues when woken");
    @(negedge clk); bus = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
