// reorder_buffer: the reorder-buffer half of the SDSP scheduling unit.
//
// The scheduling unit (SU) is a FIFO of SU_DEPTH blocks of four entries;
// the reorder buffer and the instruction window move through it together.
// It is kept here as a circular queue of block slots: a fetched block
// enters at the top (tail) when a slot is free, and the bottom block (head)
// leaves when every instruction in it is done, writing its results to the
// register file in one step. Entry slot i of a block holds the instruction
// at word i of its fetch block; empty slots count as done. A tag is
// {block slot, word}, so it stays fixed while the entry is in the SU.
//
// Renaming: for each source of a block being decoded the buffer finds the
// newest older producer of that register - an earlier slot of the same
// block, else the youngest entry in the buffer. A finished producer gives
// its value (also when the value is on the result bus this very cycle), an
// unfinished one its tag; with no producer the register file value is used.
//
// Completion comes from the four result-bus channels, the store unit and
// the control transfer unit. When the control transfer unit reports a
// mispredict, all entries younger than the branch are dropped at once and
// the tail moves back to just after the branch's block. On commit the
// block's branch outcomes train the branch predictor and its stores are
// released to memory. An SU stall is a cycle in which the bottom block is
// present but not yet complete. A committing HALT stops the buffer; later
// slots of its block are not committed.
// The result-bus assertion at the end is disabled during reset, so lint
// reports rst_n as used both asynchronously and synchronously; that is intended.
module reorder_buffer
  import sdsp_pkg::*;
#(
  parameter int unsigned SU_DEPTH = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  // allocation (decode)
  input  logic                alloc_valid,
  input  blk_t                alloc_blk,
  input  decoded_t [3:0]      alloc_dec,
  input  word_t    [7:0]      rf_rdata,     // {slot3.rs2, slot3.rs1, ..., slot0.rs1}
  output logic                can_alloc,
  output logic     [3:0]      tail,
  output logic     [3:0]      head,
  output opnd_t    [7:0]      opnd,         // renamed sources, same order
  // completion
  input  result_t  [3:0]      bus,
  input  logic                st_done_valid,
  input  tag_t                st_done_tag,
  input  ctu_out_t            ctu,
  // commit
  output logic                commit_valid,
  output logic     [3:0]      rf_we,
  output reg_t     [3:0]      rf_waddr,
  output word_t    [3:0]      rf_wdata,
  output logic     [2:0]      commit_cnt,
  output logic     [2:0]      commit_stores,
  output blk_t                upd_blk,
  output logic     [3:0]      upd_branch,
  output logic     [3:0]      upd_taken,
  output pc_t      [3:0]      upd_target,
  output logic                halted,
  output logic                su_stall
);
  localparam int unsigned N  = SU_DEPTH * 4;
  localparam int          BW = $clog2(SU_DEPTH);
  localparam int          EW = $clog2(N);

  typedef struct packed {
    logic  valid;     // a real instruction to commit
    logic  done;
    reg_t  rd;
    word_t value;
    logic  is_ctrl;
    logic  is_store;
    logic  halt;
    logic  taken;
    pc_t   target;
  } rob_entry_t;

  rob_entry_t  ent [N];
  blk_t        bblk [SU_DEPTH];
  logic [BW-1:0] hd, tl;
  logic [BW:0]   cnt;
  logic          halted_q;
  logic          flush;
  logic [BW-1:0] fblk;
  logic [1:0]    fslot;
  logic          blk_done;
  logic [3:0]    cmask;      // slots committed (before and at a HALT)

  assign head      = 4'(hd);
  assign tail      = 4'(tl);
  assign halted    = halted_q;
  assign can_alloc = (cnt < (BW+1)'(SU_DEPTH)) && !halted_q;
  assign flush     = ctu.valid && ctu.mispredict;
  assign fblk      = BW'(ctu.tag[TAG_W-1:2]);
  assign fslot     = ctu.tag[1:0];

  function automatic int unsigned eidx(logic [BW-1:0] b, int unsigned s);
    return int'(b) * 4 + s;
  endfunction

  // ---------------- renaming ----------------
  always_comb begin
    for (int s = 0; s < 4; s++)
      for (int k = 0; k < 2; k++) begin
        reg_t        r;
        logic        found;
        int unsigned e;
        r = (k == 0) ? alloc_dec[s].rs1 : alloc_dec[s].rs2;
        opnd[2*s+k] = '{ready: 1'b1, tag: '0, value: rf_rdata[2*s+k]};
        found = 1'b0;
        e = 0;
        if (r != '0) begin
          // same block, earlier slot: newest wins
          for (int j = 0; j < 4; j++)
            if (j < s && alloc_dec[j].valid && alloc_dec[j].rd == r) begin
              opnd[2*s+k] = '{ready: 1'b0, tag: make_tag(int'(tl), j), value: '0};
              found = 1'b1;
            end
          // otherwise the youngest entry in the buffer
          if (!found)
            for (int a = 0; a < int'(N); a++)
              if (a < int'(cnt) * 4) begin
                e = eidx(BW'((int'(hd) + a / 4) % SU_DEPTH), a % 4);
                if (ent[e].valid && ent[e].rd == r) begin
                  opnd[2*s+k] = '{ready: ent[e].done, tag: tag_t'(e), value: ent[e].value};
                  for (int c = 0; c < 4; c++)
                    if (!ent[e].done && bus[c].valid && bus[c].tag == tag_t'(e))
                      opnd[2*s+k] = '{ready: 1'b1, tag: tag_t'(e), value: bus[c].value};
                end
              end
        end
      end
  end

  // ---------------- commit ----------------
  always_comb begin
    logic stop;
    blk_done = cnt != '0;
    for (int s = 0; s < 4; s++)
      if (!ent[eidx(hd, s)].done) blk_done = 1'b0;
    commit_valid = blk_done && !halted_q;
    su_stall     = (cnt != '0) && !blk_done && !halted_q;

    stop = 1'b0;
    cmask = '0;
    for (int s = 0; s < 4; s++) begin
      cmask[s] = !stop;
      if (ent[eidx(hd, s)].valid && ent[eidx(hd, s)].halt) stop = 1'b1;
    end

    commit_cnt = '0;
    commit_stores = '0;
    for (int s = 0; s < 4; s++) begin
      rob_entry_t e;
      e = ent[eidx(hd, s)];
      rf_we[s]      = commit_valid && cmask[s] && e.valid && e.rd != '0;
      rf_waddr[s]   = e.rd;
      rf_wdata[s]   = e.value;
      upd_branch[s] = commit_valid && cmask[s] && e.valid && e.is_ctrl;
      upd_taken[s]  = e.taken;
      upd_target[s] = e.target;
      if (commit_valid && cmask[s] && e.valid) commit_cnt = commit_cnt + 3'd1;
      if (commit_valid && cmask[s] && e.valid && e.is_store) commit_stores = commit_stores + 3'd1;
    end
    upd_blk = bblk[hd];
  end

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hd <= '0; tl <= '0; cnt <= '0; halted_q <= 1'b0;
      for (int e = 0; e < int'(N); e++) ent[e] <= '0;
      for (int b = 0; b < int'(SU_DEPTH); b++) bblk[b] <= '0;
    end else if (!halted_q) begin
      // completions
      for (int c = 0; c < 4; c++)
        if (bus[c].valid) begin
          ent[EW'(bus[c].tag)].done  <= 1'b1;
          ent[EW'(bus[c].tag)].value <= bus[c].value;
        end
      if (st_done_valid) ent[EW'(st_done_tag)].done <= 1'b1;
      if (ctu.valid) begin
        ent[EW'(ctu.tag)].done   <= 1'b1;
        ent[EW'(ctu.tag)].taken  <= ctu.taken;
        ent[EW'(ctu.tag)].target <= ctu.target;
      end
      // commit
      if (commit_valid) begin
        hd <= BW'((int'(hd) + 1) % SU_DEPTH);
        for (int s = 0; s < 4; s++) if (cmask[s] && ent[eidx(hd, s)].valid && ent[eidx(hd, s)].halt) halted_q <= 1'b1;
      end
      // recovery / allocation
      if (flush) begin
        for (int s = 0; s < 4; s++)
          if (s > int'(fslot)) ent[eidx(fblk, s)] <= '{valid: 1'b0, done: 1'b1, default: '0};
        tl  <= BW'((int'(fblk) + 1) % SU_DEPTH);
        cnt <= (BW+1)'((int'(fblk) + SU_DEPTH - int'(hd)) % SU_DEPTH + 1 - int'(commit_valid));
      end else begin
        if (alloc_valid && can_alloc) begin
          for (int s = 0; s < 4; s++)
            ent[eidx(tl, s)] <= '{valid:    alloc_dec[s].valid,
                                  done:     !alloc_dec[s].valid || alloc_dec[s].fu == FU_NONE,
                                  rd:       alloc_dec[s].rd,
                                  value:    '0,
                                  is_ctrl:  alloc_dec[s].fu == FU_CTU,
                                  is_store: alloc_dec[s].fu == FU_ST,
                                  halt:     alloc_dec[s].halt,
                                  taken:    1'b0,
                                  target:   '0};
          bblk[tl] <= alloc_blk;
          tl <= BW'((int'(tl) + 1) % SU_DEPTH);
        end
        cnt <= cnt + (BW+1)'(alloc_valid && can_alloc) - (BW+1)'(commit_valid);
      end
    end
  end

  // Every tag written back must name an entry that is waiting for it.
  for (genvar c = 0; c < 4; c++) begin : g_bus_check
    a_result_expected: assert property (@(posedge clk) disable iff (!rst_n)
        (bus[c].valid && !halted_q) |-> (ent[EW'(bus[c].tag)].valid && !ent[EW'(bus[c].tag)].done))
      else $error("reorder_buffer: result for tag %0d not expected", bus[c].tag);
  end
endmodule
