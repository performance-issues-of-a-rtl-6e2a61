// tb_result_arbiter: random sets of ready results; at most four are
// written, load first, multiply second, then ALU1..ALU4; grants match.
module tb_result_arbiter;
  import sdsp_pkg::*;
  result_t ld, mul; result_t [3:0] alu; logic [3:0] alu_grant; result_t [3:0] bus;
  int checks = 0, failures = 0;
  result_arbiter dut (.ld, .mul, .alu, .alu_grant, .bus);
  task automatic check(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  initial begin
    for (int n = 0; n < 500; n++) begin
      result_t exp [$];
      logic [3:0] g;
      exp.delete(); ld = '0; mul = '0; alu = '0; g = '0;
      ld.valid = $urandom % 2; ld.tag = 1; ld.value = $urandom;
      mul.valid = $urandom % 2; mul.tag = 2; mul.value = $urandom;
      for (int i = 0; i < 4; i++) begin alu[i].valid = $urandom % 2; alu[i].tag = tag_t'(3 + i); alu[i].value = $urandom; end
      if (ld.valid) exp.push_back(ld);
      if (mul.valid) exp.push_back(mul);
      for (int i = 0; i < 4; i++) if (alu[i].valid && exp.size() < 4) begin exp.push_back(alu[i]); g[i] = 1; end
      #1;
      check(alu_grant == g, $sformatf("grants %b exp %b", alu_grant, g));
      for (int c = 0; c < 4; c++)
        check(c < exp.size() ? bus[c] == exp[c] : !bus[c].valid, $sformatf("channel %0d", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin #100000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
