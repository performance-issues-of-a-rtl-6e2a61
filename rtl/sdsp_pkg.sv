// sdsp_pkg: types and constants shared by the SDSP core.
//
// The SDSP is a 32-bit, four-wide superscalar processor. Instructions are
// fetched a block of four at a time; a block address is the byte address
// with its low four bits removed (28-bit block address, 2-bit word address,
// 2-bit byte address). The program counter is kept as a 30-bit word address.
//
// The instruction encoding below is this design's own, a small RISC set:
//   [31:26] opcode  [25:21] rd  [20:16] rs1  [15:11] rs2  [15:0] imm16
//   OP_ALU   rd = rs1 <funct[3:0]> rs2
//   OP_ADDI/ANDI/ORI/XORI/SLTI  rd = rs1 op imm (ANDI/ORI/XORI zero-extend)
//   OP_LUI   rd = imm << 16
//   OP_MUL   rd = signed(rs1[15:0]) * signed(rs2[15:0])   (16-bit multiplier)
//   OP_LW    rd = mem[rs1 + sext(imm)]
//   OP_SW    mem[rs1 + sext(imm)] = r[rd-field]
//   OP_BEQ/BNE/BLT/BGE  compare rs1 with r[rd-field]; target = pc + sext(imm)
//   OP_J     target = pc + sext(imm26)   (word offsets from the branch itself)
//   OP_HALT  stops the core when it commits; all-zero word is a no-op.
//
// Scheduling-unit (SU) tags name an entry by its block slot and its word
// position: tag = {block, slot}. Age is measured from the oldest block (head).
package sdsp_pkg;

  localparam int XLEN         = 32;
  localparam int DECODE       = 4;    // instructions per fetch block
  localparam int PC_W         = 30;   // word address
  localparam int BLOCK_ADDR_W = 28;
  localparam int NREGS        = 32;
  localparam int REG_W        = 5;

  typedef logic [XLEN-1:0]         word_t;
  typedef logic [PC_W-1:0]         pc_t;
  typedef logic [BLOCK_ADDR_W-1:0] blk_t;
  typedef logic [REG_W-1:0]        reg_t;
  // Tags are sized for the largest SU depth (16 blocks); smaller SUs leave
  // the upper block bits at zero.
  localparam int TAG_W = 6;
  typedef logic [TAG_W-1:0]        tag_t;

  typedef enum logic [5:0] {
    OP_NOP  = 6'h00, OP_ALU  = 6'h01, OP_ADDI = 6'h02, OP_ANDI = 6'h03,
    OP_ORI  = 6'h04, OP_XORI = 6'h05, OP_SLTI = 6'h06, OP_LUI  = 6'h07,
    OP_MUL  = 6'h08, OP_LW   = 6'h09, OP_SW   = 6'h0A, OP_BEQ  = 6'h0B,
    OP_BNE  = 6'h0C, OP_BLT  = 6'h0D, OP_BGE  = 6'h0E, OP_J    = 6'h0F,
    OP_HALT = 6'h3F
  } opcode_e;

  typedef enum logic [3:0] {
    ALU_ADD = 4'd0, ALU_SUB = 4'd1, ALU_AND = 4'd2, ALU_OR  = 4'd3,
    ALU_XOR = 4'd4, ALU_SLL = 4'd5, ALU_SRL = 4'd6, ALU_SRA = 4'd7,
    ALU_SLT = 4'd8, ALU_SLTU = 4'd9, ALU_PASSB = 4'd10
  } alu_op_e;

  typedef enum logic [2:0] {
    CT_BEQ = 3'd0, CT_BNE = 3'd1, CT_BLT = 3'd2, CT_BGE = 3'd3, CT_J = 3'd4
  } ct_op_e;

  typedef enum logic [2:0] {
    FU_NONE = 3'd0, FU_ALU = 3'd1, FU_MUL = 3'd2, FU_LD = 3'd3,
    FU_ST = 3'd4, FU_CTU = 3'd5
  } fu_e;

  typedef struct packed {
    logic    valid;     // a real instruction (not a no-op, not an empty slot)
    fu_e     fu;
    alu_op_e alu_op;
    ct_op_e  ct_op;
    logic    use_rs1;
    logic    use_rs2;
    reg_t    rs1;
    reg_t    rs2;       // second source (rd field for stores and branches)
    reg_t    rd;        // 0: writes no register
    logic    use_imm;   // ALU second operand is the immediate
    word_t   imm;
    logic    halt;
  } decoded_t;

  // An operand as seen by the window: a value, or the tag that will send it.
  typedef struct packed {
    logic  ready;
    tag_t  tag;
    word_t value;
  } opnd_t;

  // What the window hands a functional unit.
  typedef struct packed {
    logic     valid;
    tag_t     tag;
    decoded_t dec;
    word_t    a;
    word_t    b;
    pc_t      pc;
    pc_t      pred_next;
  } issue_t;

  // One result-bus channel.
  typedef struct packed {
    logic  valid;
    tag_t  tag;
    word_t value;
  } result_t;

  // Branch outcome from the control transfer unit.
  typedef struct packed {
    logic valid;
    tag_t tag;
    logic taken;
    pc_t  target;
    logic mispredict;
    pc_t  redirect_pc;
  } ctu_out_t;

  // Per-cycle event strobes of the core, for performance counting.
  typedef struct packed {
    logic [2:0] commit_cnt;     // instructions committed this cycle
    logic [2:0] fetch_cnt;      // valid instructions entering the SU
    logic       fetch_block;    // a block entered the SU
    logic       su_stall;       // bottom block present but not complete
    logic       su_full;        // fetched block held back: SU full
    logic       mispredict;     // recovery started
    logic       pred_taken;     // fetch followed a predicted-taken branch
    logic       icache_miss;    // instruction fetch waiting on refill
    logic       dcache_miss;    // load waiting on refill
    logic       bypass_issue;   // an operand was taken off the result bus at issue
    logic       wb_conflict;    // an ALU result lost write-back arbitration
    logic       sb_forward;     // a load took its data from the store buffer
    logic [3:0] issue_cnt;      // instructions issued this cycle
  } perf_t;

  // Age of a tag: position counted from the oldest SU block.
  function automatic int unsigned tag_age(tag_t t, logic [3:0] head, int unsigned depth);
    int unsigned blk;
    blk = (int'(t[TAG_W-1:2]) + depth - int'(head)) % depth;
    return blk * DECODE + int'(t[1:0]);
  endfunction

  // True when tag a is younger (later in program order) than tag b.
  function automatic logic tag_younger(tag_t a, tag_t b, logic [3:0] head, int unsigned depth);
    return tag_age(a, head, depth) > tag_age(b, head, depth);
  endfunction

  function automatic tag_t make_tag(int unsigned blk, int unsigned slot);
    return tag_t'((blk << 2) | slot);
  endfunction

endpackage
