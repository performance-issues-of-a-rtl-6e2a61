// result_arbiter: write-back arbitration of the SDSP execution unit.
//
// The scheduling unit accepts at most RESULT_WRITES results (value and
// destination tag) per cycle, but up to six can be ready: four ALU, one
// multiply and one load. Channels are filled in fixed priority order:
// load first, then multiply, then ALU1..ALU4. An ALU that gets no channel
// holds its result for a later cycle; its grant bit stays low.
// Purely combinational.
module result_arbiter
  import sdsp_pkg::*;
#(
  parameter int unsigned RESULT_WRITES = 4
) (
  input  result_t                     ld,
  input  result_t                     mul,
  input  result_t [3:0]               alu,
  output logic    [3:0]               alu_grant,
  output result_t [RESULT_WRITES-1:0] bus
);
  always_comb begin
    int unsigned n;
    n   = 0;
    bus = '0;
    alu_grant = '0;
    if (ld.valid && n < RESULT_WRITES)  begin bus[n] = ld;  n++; end
    if (mul.valid && n < RESULT_WRITES) begin bus[n] = mul; n++; end
    for (int i = 0; i < 4; i++)
      if (alu[i].valid && n < RESULT_WRITES) begin
        bus[n] = alu[i];
        alu_grant[i] = 1'b1;
        n++;
      end
  end
endmodule
