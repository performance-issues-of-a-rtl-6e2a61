// tb_icache: a miss costs exactly 6 cycles more than a hit, the refilled
// line matches memory, hits stay hits, and a conflicting block (same index,
// 8 KB apart) evicts the line.
module tb_icache;
  import sdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req, hit, miss; blk_t blk, mem_addr; word_t [3:0] line, mem_line;
  int checks = 0, failures = 0;
  icache dut (.*);
  always_comb for (int i = 0; i < 4; i++) mem_line[i] = {mem_addr[15:0], 14'd0, 2'(i)} ^ 32'h5a5a_0000;
  task automatic check(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  task automatic fetch(blk_t b, int exp_wait);
    int w;
    @(negedge clk); req = 1; blk = b; w = 0; #1;
    while (!hit) begin @(negedge clk); w++; #1; end
    check(w == exp_wait, $sformatf("block %h waited %0d, expected %0d", b, w, exp_wait));
    for (int i = 0; i < 4; i++) check(line[i] == ({b[15:0], 14'd0, 2'(i)} ^ 32'h5a5a_0000), "line data");
  endtask
  initial begin
    req = 0; blk = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    fetch(28'h10, 6);
    fetch(28'h10, 0);
    fetch(28'h11, 6);
    fetch(28'h10, 0);
    fetch(28'h10 + 512, 6);     // same index: evicts
    fetch(28'h10, 6);
    for (int b = 0; b < 20; b++) fetch(blk_t'(28'h200 + b), 6);
    for (int b = 0; b < 20; b++) fetch(blk_t'(28'h200 + b), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
