// program_counter: fetch address sequencing of the SDSP instruction unit.
//
// The PC is a 30-bit word address: its upper 28 bits are the block address
// that the instruction cache and branch predictor are indexed by, the low
// two bits the word within the four-instruction block. Each cycle the block
// holding the PC is fetched. Slots before the PC's word are invalid (an
// unaligned fetch), and so are slots after the first branch the predictor
// calls taken. The next fetch address is the predicted target, or the next
// block. For each slot the unit also hands on the successor it predicted
// for that instruction; the control transfer unit checks it later.
// The PC advances when the block is accepted (cache hit, room in the
// scheduling unit); a recovery redirect overrides everything. Resets to 0.
module program_counter
  import sdsp_pkg::*;
#(
  parameter pc_t RESET_PC = '0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        advance,        // fetched block accepted this cycle
  input  logic        redirect_valid, // mispredict recovery
  input  pc_t         redirect_pc,
  input  logic        pred_taken,     // from the branch predictor
  input  logic [1:0]  pred_slot,
  input  pc_t         pred_target,
  output pc_t         fetch_pc,
  output blk_t        fetch_blk,
  output logic [3:0]  slot_valid,
  output pc_t  [3:0]  slot_pc,
  output pc_t  [3:0]  pred_next,
  output pc_t         next_pc
);
  pc_t pc_q;

  assign fetch_pc  = pc_q;
  assign fetch_blk = pc_q[PC_W-1:2];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      slot_pc[i]    = {pc_q[PC_W-1:2], 2'(i)};
      slot_valid[i] = (2'(i) >= pc_q[1:0]) && (!pred_taken || 2'(i) <= pred_slot);
      pred_next[i]  = (pred_taken && 2'(i) == pred_slot) ? pred_target : slot_pc[i] + 1'b1;
    end
    next_pc = pred_taken ? pred_target : {pc_q[PC_W-1:2] + 1'b1, 2'b00};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              pc_q <= RESET_PC;
    else if (redirect_valid) pc_q <= redirect_pc;
    else if (advance)        pc_q <= next_pc;
  end
endmodule
