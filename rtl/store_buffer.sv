// store_buffer: the SDSP store unit and its store buffer.
//
// Stores are issued to it in program order, at most one per cycle. In the
// issue cycle the address base + offset is formed and, at the end of it,
// the store is appended to the buffer with its scheduling-unit tag; one
// cycle later its completion is reported to the reorder buffer (stores use
// none of the four result-write channels). Entries stay speculative until
// their scheduling-unit block commits: commit_cnt says how many stores
// committed this cycle, and since the buffer is in program order those are
// the oldest speculative entries. Committed entries drain to the data cache
// in order, one per cycle, so no store reaches memory before earlier
// branches are resolved. On a mispredict, speculative entries younger than
// the branch are removed. A load asks for the youngest entry to the same
// word that is older than itself and takes its data if there is one.
// The buffer holds SB_DEPTH entries (eight, as the document suggests).
// The assertion at the end is disabled during reset, so lint reports rst_n
// as used both asynchronously and synchronously; that is intended.
module store_buffer
  import sdsp_pkg::*;
#(
  parameter int unsigned SB_DEPTH = 8,
  parameter int unsigned SU_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  issue_t     iss,
  output logic       free,
  output logic       done_valid,
  output tag_t       done_tag,
  input  logic [2:0] commit_cnt,
  // load forwarding
  input  word_t      fwd_addr,
  input  tag_t       fwd_tag,
  output logic       fwd_hit,
  output word_t      fwd_data,
  // drain to data cache
  output logic       wr_en,
  output word_t      wr_addr,
  output word_t      wr_data,
  output logic [$clog2(SB_DEPTH+1)-1:0] count,
  input  logic       flush,
  input  tag_t       flush_tag,
  input  logic [3:0] head
);
  localparam int PW = $clog2(SB_DEPTH);
  localparam int CW = $clog2(SB_DEPTH + 1);

  typedef struct packed {
    tag_t  tag;
    word_t addr;
    word_t data;
  } sb_entry_t;

  sb_entry_t         ent [SB_DEPTH];
  logic [PW-1:0]     hd;
  logic [CW-1:0]     cnt, ncom;     // entries, committed entries (at the head)
  logic              push, pop;
  logic [CW-1:0]     keep;          // entries left after a flush
  logic [CW-1:0]     cnt_after_pop, ncom_after_pop;

  assign count   = cnt;
  assign free    = cnt < CW'(SB_DEPTH);
  assign push    = iss.valid && free && !(flush && tag_younger(iss.tag, flush_tag, head, SU_DEPTH));
  assign pop     = ncom != '0;
  assign wr_en   = pop;
  assign wr_addr = ent[hd].addr;
  assign wr_data = ent[hd].data;

  function automatic logic [PW-1:0] pos(int unsigned i);
    return PW'((int'(hd) + i) % SB_DEPTH);
  endfunction

  always_comb begin
    // flush: committed entries are older than any branch still in flight
    keep = cnt;
    if (flush)
      for (int i = int'(SB_DEPTH) - 1; i >= 0; i--)
        if (i < int'(cnt) && i >= int'(ncom) && tag_younger(ent[pos(i)].tag, flush_tag, head, SU_DEPTH))
          keep = CW'(i);
  end

  always_comb begin
    fwd_hit  = 1'b0;
    fwd_data = '0;
    for (int i = 0; i < int'(SB_DEPTH); i++)
      if (i < int'(cnt) && ent[pos(i)].addr[31:2] == fwd_addr[31:2] &&
          (i < int'(ncom) || tag_younger(fwd_tag, ent[pos(i)].tag, head, SU_DEPTH))) begin
        fwd_hit  = 1'b1;
        fwd_data = ent[pos(i)].data;
      end
  end

  always_comb begin
    cnt_after_pop  = keep - CW'(pop);
    ncom_after_pop = ncom - CW'(pop) + CW'(commit_cnt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hd <= '0; cnt <= '0; ncom <= '0; done_valid <= 1'b0; done_tag <= '0;
    end else begin
      if (push) ent[PW'((int'(hd) + int'(keep)) % SB_DEPTH)] <= '{tag: iss.tag, addr: iss.a + iss.dec.imm, data: iss.b};
      if (pop) hd <= PW'((int'(hd) + 1) % SB_DEPTH);
      cnt        <= cnt_after_pop + CW'(push);
      ncom       <= ncom_after_pop;
      done_valid <= push;
      done_tag   <= iss.tag;
    end
  end

  // A committing store must already be in the buffer.
  a_commit_buffered: assert property (@(posedge clk) disable iff (!rst_n) ncom_after_pop <= cnt_after_pop + CW'(push))
    else $error("store_buffer: more stores committed than buffered");
endmodule
