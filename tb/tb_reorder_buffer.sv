// tb_reorder_buffer: renaming (register file, same-block producer, buffer
// entry, value on the result bus this cycle), completion and in-order
// block commit with register writes, store count and predictor update,
// SU stall, the full condition at eight blocks, mispredict recovery and
// HALT.
module tb_reorder_buffer;
  import sdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic alloc_valid, can_alloc, st_done_valid, commit_valid, halted, su_stall;
  blk_t alloc_blk, upd_blk; decoded_t [3:0] alloc_dec; word_t [7:0] rf_rdata;
  logic [3:0] tail, head, rf_we, upd_branch, upd_taken; opnd_t [7:0] opnd;
  result_t [3:0] bus; tag_t st_done_tag; ctu_out_t ctu;
  reg_t [3:0] rf_waddr; word_t [3:0] rf_wdata; logic [2:0] commit_cnt, commit_stores; pc_t [3:0] upd_target;
  int checks = 0, failures = 0;
  reorder_buffer dut (.*);
  task automatic check(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  function automatic decoded_t mk(fu_e fu, int rd, int rs1, int rs2);
    decoded_t d; d = '0; d.valid = 1; d.fu = fu; d.rd = reg_t'(rd); d.rs1 = reg_t'(rs1); d.rs2 = reg_t'(rs2);
    d.use_rs1 = rs1 != 0; d.use_rs2 = rs2 != 0; return d;
  endfunction
  task automatic idle(); alloc_valid = 0; bus = '0; st_done_valid = 0; ctu = '0; endtask
  initial begin
    idle(); alloc_blk = '0; alloc_dec = '0; st_done_tag = '0;
    for (int p = 0; p < 8; p++) rf_rdata[p] = 32'(100 + p);
    repeat (2) @(posedge clk); rst_n = 1;
    // block A at slot 0
    @(negedge clk);
    check(can_alloc && tail == 0 && !commit_valid && !su_stall, "empty");
    alloc_valid = 1; alloc_blk = 28'h40;
    alloc_dec[0] = mk(FU_ALU, 1, 2, 3);
    alloc_dec[1] = mk(FU_ALU, 2, 1, 0);
    alloc_dec[2] = mk(FU_ST, 0, 2, 1);
    alloc_dec[3] = mk(FU_CTU, 0, 1, 0);
    #1;
    check(opnd[0].ready && opnd[0].value == 100 && opnd[1].value == 101, "sources from register file");
    check(!opnd[2].ready && opnd[2].tag == 6'd0, "same-block producer gives its tag");
    check(!opnd[4].ready && opnd[4].tag == 6'd1 && opnd[5].tag == 6'd0, "newest same-block producer");
    @(negedge clk);
    // block B at slot 1; r1 is on the bus this cycle
    alloc_blk = 28'h41;
    alloc_dec = '0;
    alloc_dec[0] = mk(FU_ALU, 2, 1, 2);
    alloc_dec[1] = mk(FU_ALU, 7, 2, 0);
    bus[0] = '{valid: 1, tag: 6'd0, value: 32'd55};
    #1;
    check(tail == 1 && su_stall, "second block; bottom incomplete is an SU stall");
    check(opnd[0].ready && opnd[0].value == 55, "value taken off the result bus at rename");
    check(!opnd[1].ready && opnd[1].tag == 6'd1, "unfinished entry gives its tag");
    check(!opnd[2].ready && opnd[2].tag == 6'd4, "same-block producer wins over an older entry");
    @(negedge clk); idle();
    alloc_valid = 0; #1;
    alloc_dec[0] = mk(FU_ALU, 5, 1, 0); #1;
    check(opnd[0].ready && opnd[0].value == 55, "finished entry gives its value");
    bus[0] = '{valid: 1, tag: 6'd1, value: 32'd66};
    st_done_valid = 1; st_done_tag = 6'd2;
    ctu = '{valid: 1, tag: 6'd3, taken: 1, target: 30'h123, mispredict: 0, redirect_pc: 30'h123};
    @(negedge clk); idle(); #1;
    check(commit_valid && commit_cnt == 4 && commit_stores == 1, "block commits when all done");
    check(rf_we == 4'b0011 && rf_waddr[0] == 1 && rf_wdata[0] == 55 && rf_waddr[1] == 2 && rf_wdata[1] == 66, "register writes");
    check(upd_blk == 28'h40 && upd_branch == 4'b1000 && upd_taken[3] && upd_target[3] == 30'h123, "predictor update");
    @(negedge clk); #1;
    check(head == 1 && !commit_valid && su_stall, "head advanced; block B waits");
    // fill: slots 2..7 then 0 -> full at 8 blocks
    for (int b = 0; b < 7; b++) begin
      alloc_valid = 1; alloc_blk = blk_t'(28'h50 + b); alloc_dec = '0;
      alloc_dec[0] = mk(FU_ALU, 6, 0, 0); alloc_dec[1] = mk(FU_CTU, 0, 0, 0); alloc_dec[2] = mk(FU_ALU, 7, 0, 0);
      @(negedge clk);
    end
    alloc_valid = 0; #1;
    check(!can_alloc, "full at eight blocks");
    // mispredict of the branch at block slot 3, word 1
    ctu = '{valid: 1, tag: 6'(3 * 4 + 1), taken: 0, target: 30'h0, mispredict: 1, redirect_pc: 30'h99};
    @(negedge clk); idle(); #1;
    check(can_alloc && tail == 4, "tail moved back after the branch block");
    alloc_dec = '0; alloc_dec[0] = mk(FU_ALU, 8, 7, 0); #1;
    check(!opnd[0].ready && opnd[0].tag == 6'(2 * 4 + 2), "flushed producer (block 3 word 2) no longer renames r7");
    // finish everything older than the flush point, block 3 word 0/1
    bus[0] = '{valid: 1, tag: 6'd4, value: 32'd77};
    bus[3] = '{valid: 1, tag: 6'd5, value: 32'd88};
    for (int b = 2; b <= 3; b++) begin
      bus[1 + (b - 2)] = '{valid: 1, tag: 6'(b * 4), value: 32'(b)};
    end
    @(negedge clk); idle(); #1;
    check(commit_valid && commit_cnt == 2 && rf_wdata[0] == 77 && rf_wdata[1] == 88, "block B commits");
    bus[0] = '{valid: 1, tag: 6'(2 * 4 + 2), value: 32'd2};
    ctu = '{valid: 1, tag: 6'(2 * 4 + 1), taken: 0, target: 30'h0, mispredict: 0, redirect_pc: 30'h0};
    @(negedge clk); idle(); #1;
    check(commit_valid && commit_cnt == 3, "block at slot 2 commits");
    @(negedge clk); #1;
    check(commit_valid && commit_cnt == 2 && rf_we == 4'b0001, "branch block commits only up to the branch");
    @(negedge clk); #1;
    check(!commit_valid && !su_stall && can_alloc, "empty after recovery");
    // HALT in word 1, an instruction in word 2 is not committed
    alloc_valid = 1; alloc_dec = '0; alloc_dec[0] = mk(FU_NONE, 0, 0, 0); alloc_dec[0].halt = 0; alloc_dec[0].valid = 0;
    alloc_dec[1] = mk(FU_NONE, 0, 0, 0); alloc_dec[1].halt = 1;
    alloc_dec[2] = mk(FU_ALU, 9, 0, 0);
    @(negedge clk); alloc_valid = 0;
    bus[0] = '{valid: 1, tag: 6'(4 * 4 + 2), value: 32'd5};
    @(negedge clk); idle(); #1;
    check(commit_valid && commit_cnt == 1 && rf_we == 4'b0000, "HALT commits alone");
    @(negedge clk); #1;
    check(halted && !can_alloc && !commit_valid, "halted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
