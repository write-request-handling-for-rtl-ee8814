// block_counter_table: the per-block counter words and the decisions made on them.
//
// One counter word per data block, in the published 14-bit format
// {Block ID[1:0], count[9:0], LINK[1:0]} (see wl_pkg). The count of word i
// is the number of write requests served into physical block i; the LINK
// of word i names the physical block that holds logical block i. After
// reset every LINK equals its Block ID (identity mapping) and every count
// is zero.
//
// Beside the published format the table keeps one "used" bit per physical
// block, set when the block holds data that must survive a swap; the
// controller's "check if not empty" step reads it. This bit, the reset
// values and the choice of the fresh block are this design's own.
//
// Combinational outputs:
//   entries    all four counter words
//   saturated  per physical block, count >= sat_level
//   fresh_blk  the block with the lowest count, excluding excl_blk (the
//              saturated block being left); ties go to the lowest index
//   fresh_sat  the fresh block is itself saturated: no block can take
//              the write
// Commands, applied on the rising clock edge:
//   inc_en/inc_blk          count[inc_blk]++ and mark the block used
//   swap_en/swap_la/swap_lb exchange the LINKs of logical blocks la and lb
//                           and the used bits of the two physical blocks
//                           they pointed at (their data were exchanged)
// inc and swap may be given in the same cycle; inc then applies to the
// physical index as it is addressed by inc_blk, before the swap.
module block_counter_table
  import wl_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  wcount_t                       sat_level,
  // increment
  input  logic                          inc_en,
  input  blk_id_t                       inc_blk,
  // link swap
  input  logic                          swap_en,
  input  blk_id_t                       swap_la,
  input  blk_id_t                       swap_lb,
  // fresh-block search
  input  blk_id_t                       excl_blk,
  output blk_id_t                       fresh_blk,
  output logic                          fresh_sat,
  // state
  output blk_counter_t [NUM_BLOCKS-1:0] entries,
  output logic         [NUM_BLOCKS-1:0] used,
  output logic         [NUM_BLOCKS-1:0] saturated
);

  blk_counter_t [NUM_BLOCKS-1:0] tbl_q;
  logic         [NUM_BLOCKS-1:0] used_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_BLOCKS; i++) begin
        tbl_q[i].id    <= blk_id_t'(i);
        tbl_q[i].count <= '0;
        tbl_q[i].link  <= blk_id_t'(i);
      end
      used_q <= '0;
    end else begin
      if (inc_en) begin
        tbl_q[inc_blk].count <= tbl_q[inc_blk].count + 1'b1;
      end
      if (swap_en) begin
        tbl_q[swap_la].link <= tbl_q[swap_lb].link;
        tbl_q[swap_lb].link <= tbl_q[swap_la].link;
      end
      // used bits: swap first, then the increment marks its block used
      for (int p = 0; p < NUM_BLOCKS; p++) begin
        logic u;
        u = used_q[p];
        if (swap_en && blk_id_t'(p) == tbl_q[swap_la].link) u = used_q[tbl_q[swap_lb].link];
        if (swap_en && blk_id_t'(p) == tbl_q[swap_lb].link) u = used_q[tbl_q[swap_la].link];
        if (inc_en && blk_id_t'(p) == inc_blk) u = 1'b1;
        used_q[p] <= u;
      end
    end
  end

  assign entries = tbl_q;
  assign used    = used_q;

  always_comb begin
    for (int i = 0; i < NUM_BLOCKS; i++) begin
      saturated[i] = (tbl_q[i].count >= sat_level);
    end
  end

  // Lowest count among the blocks other than excl_blk.
  always_comb begin
    logic    found;
    wcount_t best;
    found     = 1'b0;
    best      = '1;
    fresh_blk = '0;
    for (int i = 0; i < NUM_BLOCKS; i++) begin
      if (blk_id_t'(i) != excl_blk && (!found || tbl_q[i].count < best)) begin
        found     = 1'b1;
        best      = tbl_q[i].count;
        fresh_blk = blk_id_t'(i);
      end
    end
    fresh_sat = (best >= sat_level);
  end

  // The LINK fields always form a permutation of the physical blocks.
  for (genvar i = 0; i < NUM_BLOCKS; i++) begin : g_perm_i
    for (genvar j = i + 1; j < NUM_BLOCKS; j++) begin : g_perm_j
      a_links_distinct: assert property (@(posedge clk) disable iff (!rst_n)
                                         tbl_q[i].link != tbl_q[j].link)
        else $error("block_counter_table: logical blocks %0d and %0d share a block", i, j);
    end
  end

endmodule
