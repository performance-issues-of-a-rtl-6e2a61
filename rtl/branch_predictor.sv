// branch_predictor: the SDSP multiple-branch prediction buffer.
//
// A branch target buffer of ENTRIES entries indexed by the low bits of the
// fetch block address. Each entry has a tag (the remaining block address
// bits) and four branch fields, one per word of the block, each holding a
// valid bit, a 2-bit up-down saturating counter and a target. Lookup is
// combinational: all fields at or after the fetch word are examined at once
// and the first one predicted taken (counter >= 2) is reported, so up to
// four predictions are made per cycle and a not-taken branch needs no
// refetch. Updates come when the scheduling unit commits a block: every
// control transfer of that block counts its counter up (taken) or down
// (not taken) and stores its target. A block with no entry yet gets one,
// with counters starting at 2 (taken) or 1 (not taken).
// Counter width, threshold, tags and initial values are this design's.
module branch_predictor
  import sdsp_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  blk_t             lk_blk,
  input  logic [1:0]       lk_word,
  output logic             pred_taken,
  output logic [1:0]       pred_slot,
  output pc_t              pred_target,
  // update at commit
  input  logic             upd_valid,
  input  blk_t             upd_blk,
  input  logic [3:0]       upd_branch,  // slot held a committed control transfer
  input  logic [3:0]       upd_taken,
  input  pc_t  [3:0]       upd_target
);
  localparam int IDX_W = $clog2(ENTRIES);

  typedef struct packed {
    logic       valid;
    logic [1:0] ctr;
    pc_t        target;
  } field_t;

  typedef struct packed {
    logic                        valid;
    logic [BLOCK_ADDR_W-1:0]     tag;    // full block address
    field_t [3:0]                f;
  } entry_t;

  entry_t tbl [ENTRIES];
  entry_t e_lk, e_up, e_new;
  logic [IDX_W-1:0] lk_idx, up_idx;

  assign lk_idx = lk_blk[IDX_W-1:0];
  assign up_idx = upd_blk[IDX_W-1:0];

  always_comb begin
    e_lk = tbl[lk_idx];
    pred_taken  = 1'b0;
    pred_slot   = 2'd3;
    pred_target = '0;
    if (e_lk.valid && e_lk.tag == lk_blk)
      for (int i = 3; i >= 0; i--)
        if (2'(i) >= lk_word && e_lk.f[i].valid && e_lk.f[i].ctr[1]) begin
          pred_taken  = 1'b1;
          pred_slot   = 2'(i);
          pred_target = e_lk.f[i].target;
        end
  end

  always_comb begin
    e_up  = tbl[up_idx];
    e_new = e_up;
    if (!(e_up.valid && e_up.tag == upd_blk)) begin
      e_new = '0;
      e_new.valid = 1'b1;
      e_new.tag   = upd_blk;
    end
    for (int i = 0; i < 4; i++)
      if (upd_branch[i]) begin
        if (!e_new.f[i].valid) begin
          e_new.f[i].ctr = upd_taken[i] ? 2'd2 : 2'd1;
        end else if (upd_taken[i]) begin
          if (e_new.f[i].ctr != 2'd3) e_new.f[i].ctr = e_new.f[i].ctr + 2'd1;
        end else begin
          if (e_new.f[i].ctr != 2'd0) e_new.f[i].ctr = e_new.f[i].ctr - 2'd1;
        end
        e_new.f[i].valid  = 1'b1;
        e_new.f[i].target = upd_target[i];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(ENTRIES); k++) tbl[k] <= '0;
    end else if (upd_valid && upd_branch != '0) begin
      tbl[up_idx] <= e_new;
    end
  end
endmodule
