// load_unit: the SDSP load unit.
//
// A load issued in cycle t is latched; in t+1 it forms the byte address
// base + offset and looks it up in the store buffer and the data cache at
// the same time. Data from the youngest older store to the same word wins;
// otherwise a cache hit returns the word, so a load takes a single cycle
// when it hits. On a miss the unit waits for the refill and stays busy,
// which keeps the window from issuing another load. The result goes to
// write-back with the highest priority, so it is always granted.
// A load younger than a mispredicted branch is dropped. Word loads only.
module load_unit
  import sdsp_pkg::*;
#(
  parameter int unsigned SU_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  issue_t     iss,
  output logic       free,
  output result_t    res,
  // store buffer forwarding
  output word_t      fwd_addr,
  output tag_t       fwd_tag,
  input  logic       fwd_hit,
  input  word_t      fwd_data,
  // data cache
  output logic       dc_req,
  output word_t      dc_addr,
  input  logic       dc_hit,
  input  word_t      dc_data,
  output logic       forwarded,   // event: data came from the store buffer
  input  logic       flush,
  input  tag_t       flush_tag,
  input  logic [3:0] head
);
  logic  v_q;
  tag_t  tag_q;
  word_t addr_q;

  assign fwd_addr  = addr_q;
  assign fwd_tag   = tag_q;
  assign dc_addr   = addr_q;
  assign dc_req    = v_q && !fwd_hit;
  assign forwarded = v_q && fwd_hit;

  assign res.valid = v_q && (fwd_hit || dc_hit);
  assign res.tag   = tag_q;
  assign res.value = fwd_hit ? fwd_data : dc_data;
  assign free      = !v_q || res.valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0; tag_q <= '0; addr_q <= '0;
    end else if (free) begin
      v_q    <= iss.valid && !(flush && tag_younger(iss.tag, flush_tag, head, SU_DEPTH));
      tag_q  <= iss.tag;
      addr_q <= iss.a + iss.dec.imm;
    end else if (flush && tag_younger(tag_q, flush_tag, head, SU_DEPTH)) begin
      v_q <= 1'b0;
    end
  end
endmodule
