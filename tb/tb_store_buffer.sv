// tb_store_buffer: stores enter in order and report completion a cycle
// later; nothing drains before commit; committed stores drain oldest first,
// one per cycle; forwarding returns the youngest older store to the word;
// a flush removes younger speculative stores; eight entries fill it.
module tb_store_buffer;
  import sdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  issue_t iss; logic free, done_valid, fwd_hit, wr_en, flush; tag_t done_tag, fwd_tag, flush_tag;
  logic [2:0] commit_cnt; word_t fwd_addr, fwd_data, wr_addr, wr_data; logic [3:0] count;
  int checks = 0, failures = 0;
  word_t drained_a [$], drained_d [$];
  store_buffer dut (.*, .head(4'd0));
  always_ff @(posedge clk) if (rst_n && wr_en) begin drained_a.push_back(wr_addr); drained_d.push_back(wr_data); end
  task automatic check(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  task automatic st(word_t a, word_t d, tag_t t);
    @(negedge clk); iss = '0; iss.valid = 1; iss.tag = t; iss.dec.fu = FU_ST; iss.a = a - 4; iss.dec.imm = 4; iss.b = d;
    @(negedge clk); iss = '0;
    check(done_valid && done_tag == t, "completion one cycle after issue");
  endtask
  initial begin
    iss = '0; commit_cnt = 0; flush = 0; flush_tag = '0; fwd_addr = '0; fwd_tag = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    st(32'h100, 32'd1, 6'd2);
    st(32'h104, 32'd2, 6'd5);
    st(32'h100, 32'd3, 6'd9);
    repeat (3) @(negedge clk);
    check(drained_a.size() == 0 && count == 3, "nothing drains before commit");
    fwd_addr = 32'h100; fwd_tag = 6'd7; #1;
    check(fwd_hit && fwd_data == 32'd1, "forward from youngest older store (tag 2, not 9)");
    fwd_tag = 6'd12; #1;
    check(fwd_hit && fwd_data == 32'd3, "forward from tag 9");
    fwd_tag = 6'd1; #1;
    check(!fwd_hit, "no older store");
    // flush younger than tag 6: removes tag 9
    @(negedge clk); flush = 1; flush_tag = 6'd6; @(negedge clk); flush = 0;
    check(count == 2, "flush removed the younger store");
    // commit two stores, they drain in order
    @(negedge clk); commit_cnt = 2; @(negedge clk); commit_cnt = 0;
    repeat (3) @(negedge clk);
    check(drained_a.size() == 2 && drained_a[0] == 32'h100 && drained_d[0] == 1 && drained_a[1] == 32'h104 && drained_d[1] == 2, "drain order");
    check(count == 0, "empty after drain");
    for (int i = 0; i < 8; i++) st(32'h400 + 4 * i, i, tag_t'(i));
    check(!free && count == 8, "full at eight entries");
    fwd_addr = 32'h404; fwd_tag = 6'd20; #1; check(fwd_hit && fwd_data == 1, "forward from a full buffer");
    @(negedge clk); commit_cnt = 4; @(negedge clk); commit_cnt = 4; @(negedge clk); commit_cnt = 0;
    repeat (10) @(negedge clk);
    check(drained_a.size() == 10 && drained_a[9] == 32'h41c, "all drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
