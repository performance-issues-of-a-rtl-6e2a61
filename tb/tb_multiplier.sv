// tb_multiplier: back-to-back signed 16x16 multiplies; each product must
// appear exactly two cycles after issue; a flush drops younger work.
module tb_multiplier;
  import sdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  issue_t iss; result_t res; logic flush; tag_t flush_tag;
  int checks = 0, failures = 0;
  word_t expq [$];
  multiplier dut (.clk, .rst_n, .iss, .res, .flush, .flush_tag, .head(4'd0));
  task automatic check(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  initial begin
    word_t e [0:2];
    logic  ev [0:2];
    iss = '0; flush = 0; flush_tag = '0;
    for (int i = 0; i < 3; i++) begin e[i] = '0; ev[i] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      // pipeline of expectations: e[2] is due now
      check(res.valid == ev[2] && (!ev[2] || res.value == e[2]), $sformatf("cycle %0d got %h/%0b exp %h/%0b", n, res.value, res.valid, e[2], ev[2]));
      e[2] = e[1]; ev[2] = ev[1];
      iss = '0; iss.valid = ($urandom % 4 != 0); iss.tag = tag_t'(n % 32);
      iss.a = $urandom; iss.b = $urandom;
      e[1] = word_t'($signed(iss.a[15:0]) * $signed(iss.b[15:0])); ev[1] = iss.valid;
    end
    // flush kill: issue tag 20, flush tag 10 next cycle
    @(negedge clk); iss = '0; iss.valid = 1; iss.tag = 6'd20; iss.a = 3; iss.b = 4;
    @(negedge clk); iss = '0; flush = 1; flush_tag = 6'd10;
    @(negedge clk); flush = 0;
    check(!res.valid, "younger multiply dropped by flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
