// dcache: direct-mapped, write-through data cache of the SDSP.
//
// Lines are 16 bytes (four words); an 8 KB cache has 512 lines. A load
// lookup is combinational on the byte address. On a read miss the cache
// counts out a refill of MISS_PENALTY cycles, reads the line from the
// memory port at its end (the port answers combinationally) and installs
// it, so the load hits MISS_PENALTY cycles after its first try. Stores come
// from the store buffer, one word per cycle: each is written straight
// through to memory and also into the line if it is present (no allocation
// on a write miss). A store to the line being installed is merged into it.
// Direct mapping, write-through, 8 KB and the 6-cycle penalty follow the
// document; line size, write-miss policy and the port protocol are this
// design's.
module dcache
  import sdsp_pkg::*;
#(
  parameter int unsigned SIZE_BYTES   = 8192,
  parameter int unsigned MISS_PENALTY = 6
) (
  input  logic           clk,
  input  logic           rst_n,
  // load port
  input  logic           rd_req,
  input  word_t          rd_addr,
  output logic           rd_hit,
  output word_t          rd_data,
  output logic           rd_miss,
  // store port (from the store buffer)
  input  logic           wr_en,
  input  word_t          wr_addr,
  input  word_t          wr_data,
  // memory
  output blk_t           mem_raddr,
  input  word_t [3:0]    mem_rline,
  output logic           mem_we,
  output word_t          mem_waddr,
  output word_t          mem_wdata
);
  localparam int unsigned LINES = SIZE_BYTES / 16;
  localparam int IDX_W = $clog2(LINES);
  localparam int CNT_W = $clog2(MISS_PENALTY + 1);

  logic [LINES-1:0]  vld;
  blk_t              tags [LINES];
  word_t [3:0]       data [LINES];
  logic              busy;
  logic [CNT_W-1:0]  cnt;
  blk_t              fill_blk;
  blk_t              rblk, wblk;
  logic [IDX_W-1:0]  ridx, widx, fidx;
  logic              wr_hit;
  word_t [3:0]       fill_line;

  assign rblk = rd_addr[31:4];
  assign wblk = wr_addr[31:4];
  assign ridx = rblk[IDX_W-1:0];
  assign widx = wblk[IDX_W-1:0];
  assign fidx = fill_blk[IDX_W-1:0];

  assign rd_hit  = rd_req && vld[ridx] && tags[ridx] == rblk;
  assign rd_data = data[ridx][rd_addr[3:2]];
  assign rd_miss = rd_req && !rd_hit;
  assign wr_hit  = wr_en && vld[widx] && tags[widx] == wblk;

  assign mem_raddr = fill_blk;
  assign mem_we    = wr_en;
  assign mem_waddr = wr_addr;
  assign mem_wdata = wr_data;

  always_comb begin
    fill_line = mem_rline;
    if (wr_en && wblk == fill_blk) fill_line[wr_addr[3:2]] = wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld <= '0; busy <= 1'b0; cnt <= '0; fill_blk <= '0;
    end else begin
      if (wr_hit) data[widx][wr_addr[3:2]] <= wr_data;
      if (busy) begin
        if (cnt == '0) begin
          busy       <= 1'b0;
          vld[fidx]  <= 1'b1;
          tags[fidx] <= fill_blk;
          data[fidx] <= fill_line;
        end
        cnt <= cnt - 1'b1;
      end else if (rd_miss) begin
        busy     <= 1'b1;
        cnt      <= CNT_W'(MISS_PENALTY - 2);
        fill_blk <= rblk;
      end
    end
  end
endmodule
