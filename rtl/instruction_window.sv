// instruction_window: the central instruction window of the SDSP
// scheduling unit.
//
// The window moves through the scheduling unit together with the reorder
// buffer: entry {block, word} of both describe the same instruction. An
// entry holds the decoded operation, its two source operands (a value, or
// the tag that will produce it), its PC and the successor the fetch unit
// predicted for it. Entries wait until issued.
//
// Issue, each cycle, walks the entries from the oldest block to the newest
// ("oldest first") and grants every instruction whose operands are ready,
// up to four ALU operations (to free ALUs), one multiply, one load, one
// store and one control transfer, and no more than ISSUE_LIMIT in all.
// With BYPASS set, an operand that appears on the result bus this cycle
// counts as ready and its value goes straight to the functional unit
// (complete bypassing, so dependent single-cycle operations issue back to
// back); without it, an operand is usable only the cycle after it was
// written. Stores issue in program order. A load waits until every older
// store has issued, then may pass stores that are not yet in memory; the
// store buffer supplies their data. Results on the bus are captured by
// waiting entries each cycle. On a mispredict, entries younger than the
// branch are cancelled. With DECODE_ISSUE set (the default), the block
// being decoded in this cycle also takes part in selection, as the
// youngest entries, so an instruction whose operands are already available
// can issue in the cycle it enters the window.
// The issue-limit assertion at the end is disabled during reset, so lint
// reports rst_n as used both asynchronously and synchronously; that is intended.
module instruction_window
  import sdsp_pkg::*;
#(
  parameter int unsigned SU_DEPTH    = 8,
  parameter int unsigned ISSUE_LIMIT = 8,
  parameter bit          BYPASS      = 1'b1,
  parameter bit          DECODE_ISSUE = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  // allocation
  input  logic                alloc_valid,
  input  logic     [3:0]      alloc_idx,      // block slot (reorder buffer tail)
  input  decoded_t [3:0]      alloc_dec,
  input  opnd_t    [7:0]      alloc_opnd,
  input  pc_t      [3:0]      alloc_pc,
  input  pc_t      [3:0]      alloc_pred_next,
  input  logic     [3:0]      head,
  // results
  input  result_t  [3:0]      bus,
  // functional unit availability
  input  logic     [3:0]      alu_free,
  input  logic                ld_free,
  input  logic                st_free,
  // issue
  output issue_t   [3:0]      iss_alu,
  output issue_t              iss_mul,
  output issue_t              iss_ld,
  output issue_t              iss_st,
  output issue_t              iss_ctu,
  output logic     [3:0]      issue_cnt,
  output logic                bypassed,       // event: an operand came off the bus
  // recovery
  input  logic                flush,
  input  tag_t                flush_tag
);
  localparam int unsigned N = SU_DEPTH * 4;

  typedef struct packed {
    logic     pending;
    decoded_t dec;
    opnd_t    s1;
    opnd_t    s2;
    pc_t      pc;
    pc_t      pred_next;
  } iw_entry_t;

  iw_entry_t   ent [N];
  logic [N-1:0] grant;
  logic [3:0]   grant_new;     // block being decoded: issued straight away

  // operand as seen at issue: stored value or the value on the bus now
  function automatic logic opnd_ready(opnd_t o, result_t [3:0] b);
    logic r;
    r = o.ready;
    if (BYPASS)
      for (int c = 0; c < 4; c++)
        if (b[c].valid && b[c].tag == o.tag) r = 1'b1;
    return r;
  endfunction

  function automatic word_t opnd_value(opnd_t o, result_t [3:0] b);
    word_t v;
    v = o.value;
    if (!o.ready)
      for (int c = 0; c < 4; c++)
        if (b[c].valid && b[c].tag == o.tag) v = b[c].value;
    return v;
  endfunction

  always_comb begin
    int unsigned n_alu, n_tot, n_free;
    int unsigned free_idx [4];
    logic mul_u, ld_u, st_u, ctu_u, older_store;
    issue_t pkt;

    issue_cnt = '0;
    iss_alu = '0; iss_mul = '0; iss_ld = '0; iss_st = '0; iss_ctu = '0;
    grant = '0;
    bypassed = 1'b0;
    n_alu = 0; n_tot = 0; n_free = 0;
    mul_u = 1'b0; ld_u = 1'b0; st_u = 1'b0; ctu_u = 1'b0; older_store = 1'b0;
    for (int i = 0; i < 4; i++) free_idx[i] = 0;
    for (int i = 0; i < 4; i++)
      if (alu_free[i]) begin free_idx[n_free] = i; n_free++; end

    for (int k = 0; k < int'(N); k++) begin
      int unsigned e;
      logic rdy, g;
      e = ((int'(head) + k / 4) % SU_DEPTH) * 4 + k % 4;
      g = 1'b0;
      rdy = 1'b0;
      pkt = '0;
      if (ent[e].pending) begin
        rdy = opnd_ready(ent[e].s1, bus) && opnd_ready(ent[e].s2, bus);
        pkt = '{valid: 1'b1, tag: tag_t'(e), dec: ent[e].dec,
                a: opnd_value(ent[e].s1, bus), b: opnd_value(ent[e].s2, bus),
                pc: ent[e].pc, pred_next: ent[e].pred_next};
        if (rdy && n_tot < ISSUE_LIMIT) begin
          unique case (ent[e].dec.fu)
            FU_ALU: if (n_alu < n_free) begin iss_alu[free_idx[n_alu]] = pkt; n_alu++; g = 1'b1; end
            FU_MUL: if (!mul_u) begin iss_mul = pkt; mul_u = 1'b1; g = 1'b1; end
            FU_LD:  if (!ld_u && ld_free && !older_store) begin iss_ld = pkt; ld_u = 1'b1; g = 1'b1; end
            FU_ST:  if (!st_u && st_free && !older_store) begin iss_st = pkt; st_u = 1'b1; g = 1'b1; end
            FU_CTU: if (!ctu_u) begin iss_ctu = pkt; ctu_u = 1'b1; g = 1'b1; end
            default: ;
          endcase
        end
        if (g) begin
          n_tot++;
          if (!ent[e].s1.ready || !ent[e].s2.ready) bypassed = 1'b1;
        end
        if (ent[e].dec.fu == FU_ST && !g) older_store = 1'b1;
      end
      grant[e] = g;
    end

    // The block being decoded is younger than everything in the window; with
    // DECODE_ISSUE its ready instructions compete in the same cycle.
    grant_new = '0;
    for (int s = 0; s < 4; s++) begin
      logic rdy, g;
      g = 1'b0;
      rdy = 1'b0;
      pkt = '0;
      if (DECODE_ISSUE && alloc_valid && !flush && alloc_dec[s].valid && alloc_dec[s].fu != FU_NONE) begin
        rdy = opnd_ready(alloc_opnd[2*s], bus) && opnd_ready(alloc_opnd[2*s+1], bus);
        pkt = '{valid: 1'b1, tag: make_tag(int'(alloc_idx), s), dec: alloc_dec[s],
                a: opnd_value(alloc_opnd[2*s], bus), b: opnd_value(alloc_opnd[2*s+1], bus),
                pc: alloc_pc[s], pred_next: alloc_pred_next[s]};
        if (rdy && n_tot < ISSUE_LIMIT) begin
          unique case (alloc_dec[s].fu)
            FU_ALU: if (n_alu < n_free) begin iss_alu[free_idx[n_alu]] = pkt; n_alu++; g = 1'b1; end
            FU_MUL: if (!mul_u) begin iss_mul = pkt; mul_u = 1'b1; g = 1'b1; end
            FU_LD:  if (!ld_u && ld_free && !older_store) begin iss_ld = pkt; ld_u = 1'b1; g = 1'b1; end
            FU_ST:  if (!st_u && st_free && !older_store) begin iss_st = pkt; st_u = 1'b1; g = 1'b1; end
            FU_CTU: if (!ctu_u) begin iss_ctu = pkt; ctu_u = 1'b1; g = 1'b1; end
            default: ;
          endcase
        end
        if (g) begin
          n_tot++;
          if (!alloc_opnd[2*s].ready || !alloc_opnd[2*s+1].ready) bypassed = 1'b1;
        end
        if (alloc_dec[s].fu == FU_ST && !g) older_store = 1'b1;
      end
      grant_new[s] = g;
    end
    issue_cnt = 4'(n_tot);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < int'(N); e++) ent[e] <= '0;
    end else begin
      for (int e = 0; e < int'(N); e++) begin
        // wake-up
        for (int c = 0; c < 4; c++) begin
          if (!ent[e].s1.ready && bus[c].valid && bus[c].tag == ent[e].s1.tag) begin
            ent[e].s1.ready <= 1'b1; ent[e].s1.value <= bus[c].value;
          end
          if (!ent[e].s2.ready && bus[c].valid && bus[c].tag == ent[e].s2.tag) begin
            ent[e].s2.ready <= 1'b1; ent[e].s2.value <= bus[c].value;
          end
        end
        if (grant[e]) ent[e].pending <= 1'b0;
        if (flush && tag_younger(tag_t'(e), flush_tag, head, SU_DEPTH)) ent[e].pending <= 1'b0;
      end
      if (alloc_valid && !flush)
        for (int s = 0; s < 4; s++)
          ent[int'(alloc_idx) * 4 + s] <= '{pending:   alloc_dec[s].valid && alloc_dec[s].fu != FU_NONE && !grant_new[s],
                                           dec:       alloc_dec[s],
                                           s1:        alloc_opnd[2*s],
                                           s2:        alloc_opnd[2*s+1],
                                           pc:        alloc_pc[s],
                                           pred_next: alloc_pred_next[s]};
    end
  end

  // No more than ISSUE_LIMIT issues per cycle.
  a_issue_limit: assert property (@(posedge clk) disable iff (!rst_n) issue_cnt <= 4'(ISSUE_LIMIT))
    else $error("instruction_window: issue limit exceeded");
endmodule
