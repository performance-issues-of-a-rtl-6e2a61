// tb_program_counter: valid masks of aligned and unaligned fetches, masks
// cut after a predicted-taken branch, per-slot predicted successors, the
// next fetch address, hold without advance and redirect priority.
module tb_program_counter;
  import sdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic advance, redirect_valid, pred_taken; pc_t redirect_pc, pred_target, fetch_pc, next_pc;
  logic [1:0] pred_slot; blk_t fetch_blk; logic [3:0] slot_valid; pc_t [3:0] slot_pc, pred_next;
  int checks = 0, failures = 0;
  program_counter dut (.*);
  task automatic check(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  initial begin
    advance = 0; redirect_valid = 0; redirect_pc = '0; pred_taken = 0; pred_slot = 0; pred_target = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(fetch_pc == 0 && slot_valid == 4'b1111 && next_pc == 4, "aligned, no prediction");
    check(pred_next[0] == 1 && pred_next[3] == 4, "sequential successors");
    advance = 1; @(negedge clk); advance = 0;
    check(fetch_pc == 4 && fetch_blk == 1, "advanced to next block");
    @(negedge clk); check(fetch_pc == 4, "holds without advance");
    redirect_valid = 1; redirect_pc = 30'h106; advance = 1; @(negedge clk); redirect_valid = 0; advance = 0;
    check(fetch_pc == 30'h106, "redirect wins over advance");
    check(slot_valid == 4'b1100, "unaligned fetch invalidates slots 0-1");
    pred_taken = 1; pred_slot = 2; pred_target = 30'h2001; #1;
    check(slot_valid == 4'b0100, "slots after predicted-taken branch invalid");
    check(pred_next[2] == 30'h2001 && next_pc == 30'h2001, "taken successor is the target");
    pred_slot = 3; #1;
    check(slot_valid == 4'b1100 && pred_next[2] == 30'h107 && pred_next[3] == 30'h2001, "taken at last slot");
    advance = 1; @(negedge clk); advance = 0; pred_taken = 0; #1;
    check(fetch_pc == 30'h2001 && slot_valid == 4'b1110, "fetch at predicted target");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
