// tb_alu: checks the ALU's operations against a reference, its one-cycle
// latency, holding of an ungranted result (busy) and the flush of a
// younger held operation.
module tb_alu;
  import sdsp_pkg::*;
  import sdsp_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  issue_t iss; logic free, grant, flush; result_t res; tag_t flush_tag;
  int checks = 0, failures = 0;
  alu dut (.clk, .rst_n, .iss, .free, .res, .grant, .flush, .flush_tag, .head(4'd0));
  task automatic check(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  initial begin
    alu_op_e op; word_t a, b, exp;
    iss = '0; grant = 1; flush = 0; flush_tag = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      op = alu_op_e'($urandom % 11); a = $urandom; b = (n % 3 == 0) ? $urandom % 40 : $urandom;
      @(negedge clk);
      iss = '0; iss.valid = 1; iss.tag = tag_t'(n % 32); iss.dec.alu_op = op; iss.a = a; iss.b = b;
      iss.dec.use_imm = (n % 4 == 0); iss.dec.imm = b ^ 32'h1234;
      exp = ref_alu(op, a, iss.dec.use_imm ? iss.dec.imm : b);
      @(negedge clk); iss = '0;
      // result present exactly one cycle after issue
      check(res.valid && res.value == exp && res.tag == tag_t'(n % 32), $sformatf("op %0d a %h b %h got %h exp %h", op, a, b, res.value, exp));
    end
    // hold when not granted
    @(negedge clk); iss = '0; iss.valid = 1; iss.tag = 6'd9; iss.dec.alu_op = ALU_ADD; iss.a = 5; iss.b = 6;
    @(negedge clk); iss = '0; grant = 0; #1;
    check(!free && res.valid && res.value == 11, "ungranted result held, unit busy");
    @(negedge clk); check(!free && res.valid && res.value == 11, "still held");
    // a flush of an older branch kills the held, younger operation
    flush = 1; flush_tag = 6'd4; @(negedge clk); flush = 0;
    check(!res.valid && free, "younger held operation dropped by flush");
    grant = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
