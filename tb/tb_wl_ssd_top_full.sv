// tb_wl_ssd_top_full: the top level at its default size (four blocks of
// two 4-kB pages plus the dummy block), saturation level 16.
//
// Runs the 36-request evaluation workload and single-block endurance
// traffic (64 requests served, then misses), so that swaps copy whole
// 8-kB blocks into the empty fresh block and through the dummy block.
// Each request is checked against the reference model for outcome,
// latency and counter words, and the written bytes are read back.
module tb_wl_ssd_top_full;
  import wl_pkg::*;
  import wl_ref_pkg::*;

  localparam int unsigned BB    = 4096 * 2;
  localparam int unsigned OFF_W = $clog2(BB);

  logic                          clk = 1'b0, rst_n = 1'b0;
  wcount_t                       sat_level;
  logic                          wr_n, busy, wr_done, wr_missed, rd_en, rd_valid;
  logic [24:0]                   wr_addr, rd_addr;
  logic [7:0]                    wr_data, rd_data;
  blk_counter_t [NUM_BLOCKS-1:0] counters;
  wl_state_t                     state;
  logic [15:0]                   done_cnt, miss_cnt, swap_cnt;

  int checks = 0, failures = 0;
  wl_ref model;

  wl_ssd_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "wl_top_tasks.svh"

  initial begin
    wr_n = 1'b1; wr_addr = '0; wr_data = '0; rd_en = 1'b0; rd_addr = '0; sat_level = '0;
    for (int i = 0; i < 4; i++) n_outcome[i] = 0;
    run_table1();
    run_endurance(16);
    $display("mechanisms: in_place=%0d redirect=%0d swap_empty=%0d swap_dummy=%0d missed=%0d read_held=%0d",
             n_outcome[IN_PLACE], n_redirect, n_outcome[SWAP_EMPTY], n_outcome[SWAP_DUMMY],
             n_outcome[MISS], n_read_held);
    check(n_outcome[SWAP_EMPTY] > 0 && n_outcome[SWAP_DUMMY] > 0 && n_outcome[MISS] > 0 &&
          n_redirect > 0, "all mechanisms exercised at full size");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
