// tb_load_unit: single-cycle loads on a cache hit, waiting through a miss
// (busy, no second load accepted), store-buffer data taking precedence
// over the cache, address = base + offset, and the flush of a younger load.
module tb_load_unit;
  import sdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  issue_t iss; logic free, fwd_hit, dc_req, dc_hit, forwarded, flush; result_t res;
  word_t fwd_addr, fwd_data, dc_addr, dc_data; tag_t fwd_tag, flush_tag;
  int checks = 0, failures = 0;
  int miss_left;
  word_t fwd_match;
  load_unit dut (.clk, .rst_n, .iss, .free, .res, .fwd_addr, .fwd_tag, .fwd_hit, .fwd_data,
                 .dc_req, .dc_addr, .dc_hit, .dc_data, .forwarded, .flush, .flush_tag, .head(4'd0));
  // cache stand-in: data = ~address; hits unless miss_left > 0
  assign dc_hit  = dc_req && miss_left == 0;
  assign dc_data = ~dc_addr;
  assign fwd_hit  = fwd_addr == fwd_match;
  assign fwd_data = 32'h0f0f_0f0f;
  always_ff @(posedge clk) if (dc_req && miss_left > 0) miss_left <= miss_left - 1;
  task automatic check(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  task automatic issue_ld(word_t base, word_t off, tag_t t);
    @(negedge clk); iss = '0; iss.valid = 1; iss.tag = t; iss.dec.fu = FU_LD; iss.a = base; iss.dec.imm = off;
    @(negedge clk); iss = '0;
  endtask
  initial begin
    iss = '0; flush = 0; flush_tag = '0; miss_left = 0; fwd_match = 32'hffff_fff0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      word_t b, o;
      b = $urandom & ~32'h3; o = 32'($urandom % 256) - 128;
      issue_ld(b, o, tag_t'(n % 32));
      check(res.valid && res.value == ~(b + o) && res.tag == tag_t'(n % 32) && free, "hit in one cycle");
    end
    @(negedge clk); miss_left = 5;
    issue_ld(32'h100, 0, 6'd3);
    check(!res.valid && !free, "miss: busy");
    repeat (5) begin @(negedge clk); end
    check(res.valid && res.value == ~32'h100, $sformatf("result after the miss %0b %h %0d", res.valid, res.value, miss_left));
    fwd_match = 32'h200;
    issue_ld(32'h1f0, 32'h10, 6'd4);
    check(res.valid && res.value == 32'h0f0f_0f0f && forwarded && !dc_req, "store buffer forwards");
    check(fwd_tag == 6'd4, "load tag sent for the age check");
    @(negedge clk); miss_left = 5;
    issue_ld(32'h300, 0, 6'd20);
    flush = 1; flush_tag = 6'd10; @(negedge clk); flush = 0;
    check(!res.valid && free, "younger load dropped by flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
