// tb_register_file: random writes through four ports (later port wins on
// a clash, r0 stays zero) checked through all eight read ports against a
// reference array.
module tb_register_file;
  import sdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  reg_t [7:0] raddr; word_t [7:0] rdata; logic [3:0] we; reg_t [3:0] waddr; word_t [3:0] wdata;
  word_t model [32];
  int checks = 0, failures = 0;
  register_file dut (.clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata);
  task automatic check(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  initial begin
    for (int i = 0; i < 32; i++) model[i] = 0;
    we = 0; waddr = '0; wdata = '0; raddr = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      for (int p = 0; p < 4; p++) begin
        we[p] = $urandom % 2; waddr[p] = reg_t'($urandom % 8); wdata[p] = $urandom;
      end
      for (int p = 0; p < 4; p++) if (we[p] && waddr[p] != 0) model[waddr[p]] = wdata[p];
      @(negedge clk); we = 0;
      for (int p = 0; p < 8; p++) raddr[p] = reg_t'($urandom % 32);
      #1;
      for (int p = 0; p < 8; p++) check(rdata[p] == model[raddr[p]], $sformatf("r%0d port %0d", raddr[p], p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
