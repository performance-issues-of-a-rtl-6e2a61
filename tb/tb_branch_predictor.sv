// tb_branch_predictor: allocation on commit, first-taken selection among
// the four branch fields at or after the fetch word, 2-bit saturating
// up-down counting, tag mismatch and table reach (64 entries).
module tb_branch_predictor;
  import sdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  blk_t lk_blk, upd_blk; logic [1:0] lk_word, pred_slot; logic pred_taken; pc_t pred_target;
  logic upd_valid; logic [3:0] upd_branch, upd_taken; pc_t [3:0] upd_target;
  int checks = 0, failures = 0;
  branch_predictor dut (.*);
  task automatic check(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  task automatic upd(blk_t b, logic [3:0] br, logic [3:0] tk, pc_t t);
    @(negedge clk); upd_valid = 1; upd_blk = b; upd_branch = br; upd_taken = tk;
    for (int i = 0; i < 4; i++) upd_target[i] = t + pc_t'(i);
    @(negedge clk); upd_valid = 0;
  endtask
  task automatic look(blk_t b, logic [1:0] w); lk_blk = b; lk_word = w; #1; endtask
  initial begin
    upd_valid = 0; upd_blk = '0; upd_branch = '0; upd_taken = '0; upd_target = '0; lk_blk = '0; lk_word = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    look(5, 0); check(!pred_taken, "empty table predicts not taken");
    upd(5, 4'b0100, 4'b0100, 30'h500);
    look(5, 0); check(pred_taken && pred_slot == 2 && pred_target == 30'h502, "new taken branch predicted");
    look(5, 3); check(!pred_taken, "branch before fetch word ignored");
    look(5 + 64, 0); check(!pred_taken, "tag mismatch");
    upd(5, 4'b0100, 4'b0000, 30'h500);
    look(5, 0); check(!pred_taken, "weakly taken -> not taken after one miss");
    upd(5, 4'b1010, 4'b1010, 30'h700);
    look(5, 0); check(pred_taken && pred_slot == 1 && pred_target == 30'h701, "first taken of several");
    look(5, 2); check(pred_taken && pred_slot == 3 && pred_target == 30'h703, "first taken at or after word");
    // saturation: up to 3, then two not-taken needed
    upd(5, 4'b0010, 4'b0010, 30'h700); upd(5, 4'b0010, 4'b0010, 30'h700); upd(5, 4'b0010, 4'b0010, 30'h700);
    upd(5, 4'b0010, 4'b0000, 30'h700);
    look(5, 0); check(pred_taken && pred_slot == 1, "saturated counter survives one not-taken");
    upd(5, 4'b0010, 4'b0000, 30'h700);
    look(5, 0); check(pred_taken && pred_slot == 3, "second not-taken flips slot 1");
    // replacement by another block with the same index
    upd(5 + 64, 4'b0001, 4'b0001, 30'h900);
    look(5, 0); check(!pred_taken, "entry replaced");
    look(5 + 64, 0); check(pred_taken && pred_slot == 0 && pred_target == 30'h900, "new owner");
    // all 64 entries hold distinct blocks
    for (int b = 0; b < 64; b++) upd(blk_t'(1000 + b), 4'b1000, 4'b1000, pc_t'(b * 16));
    for (int b = 0; b < 64; b++) begin look(blk_t'(1000 + b), 0); check(pred_taken && pred_target == pc_t'(b * 16 + 3), "64 entries"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
