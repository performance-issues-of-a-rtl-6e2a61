// register_file: the SDSP architectural register file.
//
// Eight read ports serve the four decoders (two sources each) in the cycle
// a block is decoded; reads are combinational. Four write ports take the
// results of a committing block at the clock edge. When two commit writes
// name the same register the higher-numbered port (the later instruction
// in the block) wins. Register 0 always reads zero. The port count of
// eight is the document's; the split into eight reads plus four commit
// writes is this design's reading of it.
module register_file
  import sdsp_pkg::*;
#(
  parameter int unsigned NREAD  = 8,
  parameter int unsigned NWRITE = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  reg_t  [NREAD-1:0]  raddr,
  output word_t [NREAD-1:0]  rdata,
  input  logic  [NWRITE-1:0] we,
  input  reg_t  [NWRITE-1:0] waddr,
  input  word_t [NWRITE-1:0] wdata
);
  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < int'(NWRITE); p++)
        if (we[p] && waddr[p] != '0) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb
    for (int p = 0; p < int'(NREAD); p++)
      rdata[p] = (raddr[p] == '0) ? '0 : regs[raddr[p]];
endmodule
