// icache: direct-mapped instruction cache of the SDSP.
//
// One line holds one fetch block of four instructions (16 bytes), so an
// 8 KB cache has 512 lines. Lookup is combinational on the block address.
// On a miss the cache starts a refill that lasts MISS_PENALTY cycles; at
// its end the line is read from the memory port (which must answer a line
// address combinationally) and installed, so the fetch that missed hits in
// the following cycle: a miss costs MISS_PENALTY cycles more than a hit
// (MISS_PENALTY must be at least 2). Reset clears all valid bits. Direct mapping, the
// 8 KB size and the 6-cycle penalty follow the document; the line size and
// the memory interface are this design's.
module icache
  import sdsp_pkg::*;
#(
  parameter int unsigned SIZE_BYTES   = 8192,
  parameter int unsigned MISS_PENALTY = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           req,
  input  blk_t           blk,
  output logic           hit,
  output word_t [3:0]    line,
  output logic           miss,       // req present and waiting on refill
  output blk_t           mem_addr,
  input  word_t [3:0]    mem_line
);
  localparam int unsigned LINES = SIZE_BYTES / 16;
  localparam int IDX_W = $clog2(LINES);
  localparam int CNT_W = $clog2(MISS_PENALTY + 1);

  logic [LINES-1:0]        vld;
  blk_t                    tags [LINES];
  word_t [3:0]             data [LINES];
  logic                    busy;
  logic [CNT_W-1:0]        cnt;
  blk_t                    fill_blk;
  logic [IDX_W-1:0]        idx, fidx;

  assign idx  = blk[IDX_W-1:0];
  assign fidx = fill_blk[IDX_W-1:0];
  assign hit  = req && vld[idx] && tags[idx] == blk;
  assign line = data[idx];
  assign miss = req && !hit;
  assign mem_addr = fill_blk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0; busy <= 1'b0; cnt <= '0; fill_blk <= '0;
    end else if (busy) begin
      if (cnt == '0) begin
        busy        <= 1'b0;
        vld[fidx]   <= 1'b1;
        tags[fidx]  <= fill_blk;
        data[fidx]  <= mem_line;
      end
      cnt <= cnt - 1'b1;
    end else if (miss) begin
      busy     <= 1'b1;
      cnt      <= CNT_W'(MISS_PENALTY - 2);
      fill_blk <= blk;
    end
  end
endmodule
