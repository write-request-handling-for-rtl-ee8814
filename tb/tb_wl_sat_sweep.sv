// tb_wl_sat_sweep: served requests and block swaps against the saturation level.
//
// For saturation levels 4, 8, 16 and 32 the top level (16-byte blocks) is
// reset and given a hot workload: 4*S + 8 write requests, three quarters
// of them to logical block 0 and the rest spread over all blocks. Each
// request is checked against the reference model; the run then checks
// that exactly 4*S requests were served (every block is driven to its
// threshold), that the missed and swap totals match the model, and prints
// served / missed / swaps per level so their dependence on S can be read.
module tb_wl_sat_sweep;
  import wl_pkg::*;
  import wl_ref_pkg::*;

  localparam int unsigned PAGE_BYTES = 8;
  localparam int unsigned PAGES      = 2;
  localparam int unsigned BB         = PAGE_BYTES * PAGES;
  localparam int unsigned OFF_W      = $clog2(BB);

  logic                          clk = 1'b0, rst_n = 1'b0;
  wcount_t                       sat_level;
  logic                          wr_n, busy, wr_done, wr_missed, rd_en, rd_valid;
  logic [24:0]                   wr_addr, rd_addr;
  logic [7:0]                    wr_data, rd_data;
  blk_counter_t [NUM_BLOCKS-1:0] counters;
  wl_state_t                     state;
  logic [15:0]                   done_cnt, miss_cnt, swap_cnt;

  localparam int LEVELS [4] = '{4, 8, 16, 32};

  int checks = 0, failures = 0;
  wl_ref model;

  wl_ssd_top #(.PAGE_BYTES(PAGE_BYTES), .PAGES_PER_BLOCK(PAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "wl_top_tasks.svh"

  initial begin

    wr_n = 1'b1; wr_addr = '0; wr_data = '0; rd_en = 1'b0; rd_addr = '0; sat_level = '0;
    for (int i = 0; i < 4; i++) n_outcome[i] = 0;
    foreach (LEVELS[j]) begin
      int sat, served_n, swaps0, misses0;
      bit s;
      sat      = LEVELS[j];
      swaps0   = n_outcome[SWAP_EMPTY] + n_outcome[SWAP_DUMMY];
      misses0  = n_outcome[MISS];
      restart(sat);
      served_n = 0;
      for (int k = 0; k < 4 * sat + 8; k++) begin
        int l;
        l = ($urandom_range(3) != 0) ? 0 : int'($urandom_range(3));
        write_req(l, int'($urandom_range(BB - 1)), byte'($urandom), s);
        served_n += int'(s);
      end
      check(served_n == 4 * sat, $sformatf("S=%0d: %0d served, want %0d", sat, served_n, 4 * sat));
      check(int'(swap_cnt) == n_outcome[SWAP_EMPTY] + n_outcome[SWAP_DUMMY] - swaps0,
            $sformatf("S=%0d: swap total", sat));
      check(int'(miss_cnt) == n_outcome[MISS] - misses0, $sformatf("S=%0d: miss total", sat));
      $display("S=%0d: requests=%0d served=%0d missed=%0d swaps=%0d",
               sat, 4 * sat + 8, served_n, miss_cnt, swap_cnt);
      readback(4 * BB);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
