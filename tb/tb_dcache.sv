// tb_dcache: read miss penalty of exactly 6 cycles, read hits, stores
// written through to memory every time, cached lines updated on a write
// hit, no allocation on a write miss, and a store merged into a line being
// refilled.
module tb_dcache;
  import sdsp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_req, rd_hit, rd_miss, wr_en, mem_we; word_t rd_addr, rd_data, wr_addr, wr_data, mem_waddr, mem_wdata;
  blk_t mem_raddr; word_t [3:0] mem_rline;
  word_t mem [4096];
  int checks = 0, failures = 0, nwrites = 0;
  dcache dut (.*);
  always_comb for (int i = 0; i < 4; i++) mem_rline[i] = mem[(int'(mem_raddr) * 4 + i) % 4096];
  always_ff @(posedge clk) if (rst_n && mem_we) begin mem[(mem_waddr >> 2) % 4096] <= mem_wdata; nwrites <= nwrites + 1; end
  task automatic check(bit ok, string m); checks++; if (!ok) begin failures++; $display("FAIL: %s", m); end endtask
  task automatic load(word_t a, int exp_wait);
    int w;
    @(negedge clk); rd_req = 1; rd_addr = a; w = 0; #1;
    while (!rd_hit) begin @(negedge clk); w++; #1; end
    check(w == exp_wait, $sformatf("load %h waited %0d, expected %0d", a, w, exp_wait));
    check(rd_data == mem[(a >> 2) % 4096], $sformatf("load %h data %h exp %h", a, rd_data, mem[(a >> 2) % 4096]));
    @(negedge clk); rd_req = 0;
  endtask
  task automatic store(word_t a, word_t d);
    @(negedge clk); wr_en = 1; wr_addr = a; wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask
  initial begin
    int nw;
    for (int i = 0; i < 4096; i++) mem[i] = $urandom;
    rd_req = 0; rd_addr = '0; wr_en = 0; wr_addr = '0; wr_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    load(32'h100, 6);
    load(32'h104, 0);
    load(32'h10c, 0);
    nw = nwrites;
    store(32'h104, 32'hcafe_0001);
    check(nwrites == nw + 1 && mem[32'h104 >> 2] == 32'hcafe_0001, "write through");
    load(32'h104, 0);                       // hit returns new value
    store(32'h800, 32'hbeef_0002);          // write miss: memory only
    check(mem[32'h800 >> 2] == 32'hbeef_0002, "write miss reaches memory");
    load(32'h800, 6);                       // still a miss: no allocation
    load(32'h100 + 8192, 6);                // conflict evicts
    load(32'h100, 6);
    // store to the line while it is being refilled
    @(negedge clk); rd_req = 1; rd_addr = 32'h400; #1; check(rd_miss, "miss starts refill");
    @(negedge clk); rd_req = 0;
    repeat (4) @(negedge clk);   // the store lands in the install cycle
    wr_en = 1; wr_addr = 32'h408; wr_data = 32'h1234_5678; @(negedge clk); wr_en = 0;
    load(32'h408, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
