// wl_ssd_top: flash memory with static wear-leveling write request handling.
//
// A small SSD model: four data blocks of two 4-kB pages (32 kB) plus one
// dummy block, a 14-bit counter word per block, and the ten-state write
// controller that diverts writes away from a block whose count reached the
// saturation level. With saturation level S and four blocks, writes that
// all target one logical block are accepted S*4 times instead of S times.
//
//   wl_write_ctrl ---- counter commands ----> block_counter_table
//        |  <--- counter words, saturation, fresh block ---|
//        +---- byte read/write/copy ----> flash_array (4 blocks + dummy)
//
// Host interface (all synchronous to clk, active-low async reset rst_n):
//   wr_n, wr_addr, wr_data   write request, taken when wr_n = 0 and busy = 0;
//                            wr_addr is 25 bits, of which the low 13 select
//                            the byte in a block and the next 2 the block
//   busy                     a write is in progress; requests are ignored
//   wr_done / wr_missed      one-cycle pulse at the end of each request
//   rd_en, rd_addr           read request, served when idle; rd_data is
//                            valid with rd_valid one cycle later
//   sat_level                saturation level of every block counter
//                            (16 in the published evaluation)
//   counters, state, *_cnt   observation of the counter words, controller
//                            state and served / missed / swap totals
module wl_ssd_top
  import wl_pkg::*;
#(
  parameter int unsigned PAGE_BYTES      = 4096,
  parameter int unsigned PAGES_PER_BLOCK = 2,
  parameter int unsigned HOST_ADDR_W     = 25,
  parameter int unsigned DATA_W          = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  wcount_t                       sat_level,
  input  logic                          wr_n,
  input  logic [HOST_ADDR_W-1:0]        wr_addr,
  input  logic [DATA_W-1:0]             wr_data,
  output logic                          busy,
  output logic                          wr_done,
  output logic                          wr_missed,
  input  logic                          rd_en,
  input  logic [HOST_ADDR_W-1:0]        rd_addr,
  output logic [DATA_W-1:0]             rd_data,
  output logic                          rd_valid,
  output blk_counter_t [NUM_BLOCKS-1:0] counters,
  output wl_state_t                     state,
  output logic [15:0]                   done_cnt,
  output logic [15:0]                   miss_cnt,
  output logic [15:0]                   swap_cnt
);

  localparam int unsigned BLOCK_BYTES = PAGE_BYTES * PAGES_PER_BLOCK;
  localparam int unsigned MEM_ADDR_W  = PBLK_W + $clog2(BLOCK_BYTES);

  blk_counter_t [NUM_BLOCKS-1:0] tbl;
  logic         [NUM_BLOCKS-1:0] tbl_used, tbl_saturated;
  blk_id_t                       fresh_blk, excl_blk, inc_blk, swap_la, swap_lb;
  logic                          fresh_sat, inc_en, swap_en;
  logic                          mem_we;
  logic [MEM_ADDR_W-1:0]         mem_waddr, mem_raddr;
  logic [DATA_W-1:0]             mem_wdata, mem_rdata;

  wl_write_ctrl #(
    .PAGE_BYTES      (PAGE_BYTES),
    .PAGES_PER_BLOCK (PAGES_PER_BLOCK),
    .HOST_ADDR_W     (HOST_ADDR_W),
    .DATA_W          (DATA_W)
  ) u_ctrl (
    .clk, .rst_n,
    .wr_n, .wr_addr, .wr_data, .busy, .wr_done, .wr_missed,
    .rd_en, .rd_addr, .rd_data, .rd_valid,
    .state, .done_cnt, .miss_cnt, .swap_cnt,
    .tbl             (tbl),
    .tbl_used        (tbl_used),
    .tbl_saturated   (tbl_saturated),
    .tbl_fresh_blk   (fresh_blk),
    .tbl_fresh_sat   (fresh_sat),
    .tbl_excl_blk    (excl_blk),
    .tbl_inc_en      (inc_en),
    .tbl_inc_blk     (inc_blk),
    .tbl_swap_en     (swap_en),
    .tbl_swap_la     (swap_la),
    .tbl_swap_lb     (swap_lb),
    .mem_we, .mem_waddr, .mem_wdata, .mem_raddr, .mem_rdata
  );

  block_counter_table u_counters (
    .clk, .rst_n, .sat_level,
    .inc_en, .inc_blk,
    .swap_en, .swap_la, .swap_lb,
    .excl_blk, .fresh_blk, .fresh_sat,
    .entries   (tbl),
    .used      (tbl_used),
    .saturated (tbl_saturated)
  );

  flash_array #(
    .PAGE_BYTES      (PAGE_BYTES),
    .PAGES_PER_BLOCK (PAGES_PER_BLOCK),
    .DATA_W          (DATA_W)
  ) u_flash (
    .clk,
    .we    (mem_we),
    .waddr (mem_waddr),
    .wdata (mem_wdata),
    .raddr (mem_raddr),
    .rdata (mem_rdata)
  );

  assign counters = tbl;

endmodule
