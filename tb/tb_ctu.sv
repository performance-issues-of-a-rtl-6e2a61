// tb_ctu: random branches and jumps; the outcome (taken, target, correct
// successor, mispredict against the supplied prediction) must come one
// cycle after issue and match a reference evaluation.
module tb_ctu;
  import sdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  issue_t iss; ctu_out_t out;
  int checks = 0, failures = 0, nmis = 0;
  ctu dut (.clk, .rst_n, .iss, .out, .flush(1'b0), .flush_tag('0), .head(4'd0));
  task automatic check(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  initial begin
    logic tk; pc_t tgt, act;
    iss = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      iss = '0; iss.valid = 1; iss.tag = tag_t'(n % 32);
      iss.dec.fu = FU_CTU; iss.dec.ct_op = ct_op_e'($urandom % 5);
      iss.a = $urandom % 4 - 2; iss.b = $urandom % 4 - 2;
      iss.pc = $urandom; iss.dec.imm = {{22{1'b1}}, 10'($urandom)};
      if (n % 2) iss.dec.imm = 32'($urandom % 500);
      case (iss.dec.ct_op)
        CT_BEQ: tk = iss.a == iss.b; CT_BNE: tk = iss.a != iss.b;
        CT_BLT: tk = $signed(iss.a) < $signed(iss.b); CT_BGE: tk = $signed(iss.a) >= $signed(iss.b);
        default: tk = 1;
      endcase
      tgt = iss.pc + pc_t'(iss.dec.imm);
      act = tk ? tgt : iss.pc + 1;
      iss.pred_next = ($urandom % 2) ? act : ((n % 3) ? tgt : iss.pc + 1);
      @(negedge clk);
      iss.valid = 0;
      check(out.valid && out.taken == tk && out.target == tgt && out.redirect_pc == act &&
            out.mispredict == (act != iss.pred_next) && out.tag == tag_t'(n % 32), $sformatf("branch %0d", n));
      nmis += out.mispredict;
    end
    check(nmis > 0, "some mispredicts seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
