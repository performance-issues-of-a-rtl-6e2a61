// sdsp: top level of the SDSP superscalar processor core.
//
// Three units, as in the SDSP organisation:
//  * Instruction Unit - program counter, multiple-branch predictor and
//    instruction cache. Every cycle one block of four instructions is
//    fetched; slots before the fetch word and after the first predicted-
//    taken branch are invalid.
//  * Scheduling Unit - four instruction decoders, the 8-port register file,
//    the reorder buffer and the central instruction window. A fetched block
//    is decoded and renamed in its fetch cycle and enters the top of the SU
//    at the end of it, if the SU has a free block slot. Issue is out of
//    order, oldest first, up to eight per cycle, and a ready instruction
//    may issue in its decode cycle (DECODE_ISSUE); the bottom block commits
//    to the register file once all of it is done.
//  * Execution Unit - four single-cycle ALUs, a two-stage 16-bit multiplier,
//    a load unit with the data cache, the store unit/store buffer and the
//    control transfer unit. Up to four results per cycle are written back
//    (load, then multiply, then ALUs) and bypassed to instructions issuing
//    in the same cycle.
// A mispredicted branch is repaired as soon as the control transfer unit
// resolves it: younger SU entries, functional-unit work and speculative
// stores are dropped and fetch restarts at the right address the next cycle.
//
// Memory sits outside: the instruction cache refills a 16-byte line through
// imem_*, the data cache refills through dmem_r* and writes every store
// through dmem_w*. Both line-read ports must answer combinationally; each
// cache counts the miss penalty itself. `halted` rises when a HALT
// instruction commits. `perf` carries one-cycle event strobes.
// The organisation, widths, issue and write-back limits, latencies and
// sizes follow the document; the instruction encoding, the single
// fetch/decode cycle and the memory ports are this design's.
// Lint reports rst_n as used both asynchronously and synchronously: the
// reset also disables the assertions inside the reorder buffer, window and
// store buffer, which is intended.
module sdsp
  import sdsp_pkg::*;
#(
  parameter int unsigned SU_DEPTH      = 8,
  parameter int unsigned ISSUE_LIMIT   = 8,
  parameter int unsigned RESULT_WRITES = 4,
  parameter bit          BYPASS        = 1'b1,
  parameter bit          DECODE_ISSUE  = 1'b1,
  parameter int unsigned BTB_ENTRIES   = 64,
  parameter int unsigned SB_DEPTH      = 8,
  parameter int unsigned ICACHE_BYTES  = 8192,
  parameter int unsigned DCACHE_BYTES  = 8192,
  parameter int unsigned MISS_PENALTY  = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  output blk_t        imem_addr,
  input  word_t [3:0] imem_line,
  output blk_t        dmem_raddr,
  input  word_t [3:0] dmem_rline,
  output logic        dmem_we,
  output word_t       dmem_waddr,
  output word_t       dmem_wdata,
  output logic        halted,
  output perf_t       perf
);
  // ---------------- instruction unit ----------------
  pc_t         fetch_pc, next_pc;
  blk_t        fetch_blk;
  logic [3:0]  slot_valid;
  pc_t  [3:0]  slot_pc, pred_next;
  logic        pred_taken;
  logic [1:0]  pred_slot;
  pc_t         pred_target;
  logic        ic_hit, ic_miss;
  word_t [3:0] ic_line;
  logic        advance;

  // scheduling unit
  decoded_t [3:0] dec;
  reg_t  [7:0]    rf_raddr;
  word_t [7:0]    rf_rdata;
  opnd_t [7:0]    opnd;
  logic           can_alloc;
  logic [3:0]     tail, head;
  logic           commit_valid;
  logic [3:0]     rf_we;
  reg_t  [3:0]    rf_waddr;
  word_t [3:0]    rf_wdata;
  logic [2:0]     commit_cnt, commit_stores;
  blk_t           upd_blk;
  logic [3:0]     upd_branch, upd_taken;
  pc_t  [3:0]     upd_target;
  logic           su_stall;

  // execution unit
  issue_t  [3:0]  iss_alu;
  issue_t         iss_mul, iss_ld, iss_st, iss_ctu;
  logic    [3:0]  alu_free, alu_grant, issue_cnt;
  logic           ld_free, st_free, bypassed;
  result_t [3:0]  alu_res;
  result_t        mul_res, ld_res;
  result_t [RESULT_WRITES-1:0] wb;
  result_t [3:0]  bus;
  ctu_out_t       ctu_out;
  logic           flush;
  tag_t           flush_tag;
  logic           st_done_valid;
  tag_t           st_done_tag;
  word_t          fwd_addr, fwd_data, dc_addr, dc_data;
  tag_t           fwd_tag;
  logic           fwd_hit, dc_req, dc_hit, dc_miss, forwarded;
  logic           sb_wr_en;
  word_t          sb_wr_addr, sb_wr_data;
  logic [$clog2(SB_DEPTH+1)-1:0] sb_count;

  assign flush     = ctu_out.valid && ctu_out.mispredict;
  assign flush_tag = ctu_out.tag;
  assign advance   = ic_hit && can_alloc && !flush && !halted;

  program_counter u_pc (
    .clk, .rst_n, .advance,
    .redirect_valid(flush), .redirect_pc(ctu_out.redirect_pc),
    .pred_taken, .pred_slot, .pred_target,
    .fetch_pc, .fetch_blk, .slot_valid, .slot_pc, .pred_next, .next_pc);

  branch_predictor #(.ENTRIES(BTB_ENTRIES)) u_bp (
    .clk, .rst_n,
    .lk_blk(fetch_blk), .lk_word(fetch_pc[1:0]),
    .pred_taken, .pred_slot, .pred_target,
    .upd_valid(commit_valid), .upd_blk, .upd_branch, .upd_taken, .upd_target);

  icache #(.SIZE_BYTES(ICACHE_BYTES), .MISS_PENALTY(MISS_PENALTY)) u_icache (
    .clk, .rst_n, .req(!halted), .blk(fetch_blk), .hit(ic_hit), .line(ic_line),
    .miss(ic_miss), .mem_addr(imem_addr), .mem_line(imem_line));

  // ---------------- scheduling unit ----------------
  for (genvar s = 0; s < 4; s++) begin : g_dec
    instruction_decoder u_dec (.valid(slot_valid[s] && ic_hit), .instr(ic_line[s]), .dec(dec[s]));
    assign rf_raddr[2*s]   = dec[s].rs1;
    assign rf_raddr[2*s+1] = dec[s].rs2;
  end

  register_file #(.NREAD(8), .NWRITE(4)) u_rf (
    .clk, .rst_n, .raddr(rf_raddr), .rdata(rf_rdata),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata));

  reorder_buffer #(.SU_DEPTH(SU_DEPTH)) u_rob (
    .clk, .rst_n,
    .alloc_valid(advance), .alloc_blk(fetch_blk), .alloc_dec(dec), .rf_rdata,
    .can_alloc, .tail, .head, .opnd,
    .bus, .st_done_valid, .st_done_tag, .ctu(ctu_out),
    .commit_valid, .rf_we, .rf_waddr, .rf_wdata, .commit_cnt, .commit_stores,
    .upd_blk, .upd_branch, .upd_taken, .upd_target, .halted, .su_stall);

  instruction_window #(.SU_DEPTH(SU_DEPTH), .ISSUE_LIMIT(ISSUE_LIMIT), .BYPASS(BYPASS),
                     .DECODE_ISSUE(DECODE_ISSUE)) u_iw (
    .clk, .rst_n,
    .alloc_valid(advance), .alloc_idx(tail), .alloc_dec(dec), .alloc_opnd(opnd),
    .alloc_pc(slot_pc), .alloc_pred_next(pred_next), .head,
    .bus, .alu_free, .ld_free, .st_free,
    .iss_alu, .iss_mul, .iss_ld, .iss_st, .iss_ctu, .issue_cnt, .bypassed,
    .flush, .flush_tag);

  // ---------------- execution unit ----------------
  for (genvar i = 0; i < 4; i++) begin : g_alu
    alu #(.SU_DEPTH(SU_DEPTH)) u_alu (
      .clk, .rst_n, .iss(iss_alu[i]), .free(alu_free[i]), .res(alu_res[i]),
      .grant(alu_grant[i]), .flush, .flush_tag, .head);
  end

  multiplier #(.SU_DEPTH(SU_DEPTH)) u_mul (
    .clk, .rst_n, .iss(iss_mul), .res(mul_res), .flush, .flush_tag, .head);

  load_unit #(.SU_DEPTH(SU_DEPTH)) u_ld (
    .clk, .rst_n, .iss(iss_ld), .free(ld_free), .res(ld_res),
    .fwd_addr, .fwd_tag, .fwd_hit, .fwd_data,
    .dc_req, .dc_addr, .dc_hit, .dc_data, .forwarded,
    .flush, .flush_tag, .head);

  store_buffer #(.SB_DEPTH(SB_DEPTH), .SU_DEPTH(SU_DEPTH)) u_sb (
    .clk, .rst_n, .iss(iss_st), .free(st_free),
    .done_valid(st_done_valid), .done_tag(st_done_tag), .commit_cnt(commit_stores),
    .fwd_addr, .fwd_tag, .fwd_hit, .fwd_data,
    .wr_en(sb_wr_en), .wr_addr(sb_wr_addr), .wr_data(sb_wr_data), .count(sb_count),
    .flush, .flush_tag, .head);

  dcache #(.SIZE_BYTES(DCACHE_BYTES), .MISS_PENALTY(MISS_PENALTY)) u_dcache (
    .clk, .rst_n,
    .rd_req(dc_req), .rd_addr(dc_addr), .rd_hit(dc_hit), .rd_data(dc_data), .rd_miss(dc_miss),
    .wr_en(sb_wr_en), .wr_addr(sb_wr_addr), .wr_data(sb_wr_data),
    .mem_raddr(dmem_raddr), .mem_rline(dmem_rline),
    .mem_we(dmem_we), .mem_waddr(dmem_waddr), .mem_wdata(dmem_wdata));

  ctu #(.SU_DEPTH(SU_DEPTH)) u_ctu (
    .clk, .rst_n, .iss(iss_ctu), .out(ctu_out), .flush, .flush_tag, .head);

  result_arbiter #(.RESULT_WRITES(RESULT_WRITES)) u_arb (
    .ld(ld_res), .mul(mul_res), .alu(alu_res), .alu_grant, .bus(wb));

  always_comb begin
    bus = '0;
    for (int c = 0; c < int'(RESULT_WRITES) && c < 4; c++) bus[c] = wb[c];
  end

  // ---------------- events ----------------
  always_comb begin
    perf = '0;
    perf.commit_cnt   = commit_cnt;
    perf.fetch_block  = advance;
    perf.fetch_cnt    = '0;
    for (int s = 0; s < 4; s++) if (advance && dec[s].valid) perf.fetch_cnt = perf.fetch_cnt + 3'd1;
    perf.su_stall     = su_stall;
    perf.su_full      = ic_hit && !can_alloc && !halted;
    perf.mispredict   = flush;
    perf.pred_taken   = advance && pred_taken;
    perf.icache_miss  = ic_miss && !halted;
    perf.dcache_miss  = dc_miss;
    perf.bypass_issue = bypassed;
    perf.wb_conflict  = (|({alu_res[3].valid, alu_res[2].valid, alu_res[1].valid, alu_res[0].valid} & ~alu_grant));
    perf.sb_forward   = forwarded;
    perf.issue_cnt    = issue_cnt;
  end
endmodule
