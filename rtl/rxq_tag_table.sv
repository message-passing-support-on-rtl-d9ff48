// rxq_tag_table - receive-queue cache tags.
//
// The NES has 512 logical receive queues but only NUM_EQ Express/Tag-On and
// NUM_BQ Basic hardware receive queues, used as a software-managed cache.
// Each hardware queue holds a tag: a valid bit and the logical queue name it
// currently caches. An arriving packet's receive queue name is compared
// against the tags of its class (Express/Tag-On or Basic); a hit names the
// resident hardware queue, a miss sends the packet to the miss queue.
//
// Entries 0..NUM_EQ-1 are the Express/Tag-On queues, NUM_EQ.. the Basic
// queues. One write port for the service processor, one fully associative,
// combinational lookup. Tags reset to invalid. If two valid tags of one
// class name the same queue, the lowest entry wins.
module rxq_tag_table
  import nes_pkg::*;
#(
  parameter int unsigned NE = NUM_EQ,
  parameter int unsigned NB = NUM_BQ
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        wr_en,
  input  logic [$clog2(NE+NB)-1:0]    wr_idx,
  input  logic                        wr_valid,
  input  logic [LQ_W-1:0]             wr_lq,
  input  logic [LQ_W-1:0]             lk_lq,
  input  logic                        lk_basic,   // 1: search Basic tags
  output logic                        lk_hit,
  output logic [$clog2(NE+NB)-1:0]    lk_idx,     // index into the whole table
  output logic [NE+NB-1:0]            tag_valid
);
  localparam int unsigned N = NE + NB;
  logic [LQ_W-1:0] tag [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_valid <= '0;
      for (int i = 0; i < int'(N); i++) tag[i] <= '0;
    end else if (wr_en) begin
      tag_valid[wr_idx] <= wr_valid;
      tag[wr_idx]       <= wr_lq;
    end
  end

  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    for (int i = int'(N) - 1; i >= 0; i--) begin
      if (tag_valid[i] && tag[i] == lk_lq && ((i >= int'(NE)) == lk_basic)) begin
        lk_hit = 1'b1;
        lk_idx = ($clog2(N))'(i);
      end
    end
  end
endmodule
