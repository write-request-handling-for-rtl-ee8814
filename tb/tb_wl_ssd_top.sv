// tb_wl_ssd_top: end-to-end test of the wear-leveling flash memory.
//
// Runs the top level with 16-byte pages (32-byte blocks) and the
// published saturation level of 16 through the four published test cases,
// the 36-request workload of the evaluation and single-block endurance
// traffic. Every request is checked against the reference model
// (outcome, latency, counter words), and every written byte is read back
// through the logical address. It also counts each mechanism of the
// design (write in place, LINK redirection, swap into an empty block,
// swap through the dummy block, missed request, read held off while busy)
// and fails if one never happened.
module tb_wl_ssd_top;
  import wl_pkg::*;
  import wl_ref_pkg::*;

  localparam int unsigned PAGE_BYTES = 16;
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
    bit s;
    int served_n;
    wr_n = 1'b1; wr_addr = '0; wr_data = '0; rd_en = 1'b0; rd_addr = '0; sat_level = '0;
    for (int i = 0; i < 4; i++) n_outcome[i] = 0;

    // Case 1: one write request to every block.
    restart(16);
    for (int l = 0; l < 4; l++) write_req(l, 3 * l, byte'('h31 + l), s);
    check(done_cnt == 4 && swap_cnt == 0, "case 1: four writes in place");
    for (int l = 0; l < 4; l++)
      check(counters[l].count == 1 && counters[l].link == blk_id_t'(l) &&
            counters[l].id == blk_id_t'(l), $sformatf("case 1: counter word %0d", l));
    readback(64);

    // Case 2: one block up to its threshold, then one more request; the
    // extra request moves the block into an empty fresh block.
    restart(16);
    for (int k = 0; k < 17; k++) write_req(0, k, byte'('h50 + k), s);
    check(swap_cnt == 1 && counters[0].link == 2'd1 && counters[1].link == 2'd0,
          "case 2: logical block 0 moved to block 1");
    readback(64);

    // Cases 3 and 4: block 0 full, blocks 1..3 one short of the threshold;
    // further hot writes go through the dummy block until every block
    // saturates. All data of every block must survive the swaps.
    restart(16);
    for (int k = 0; k < 16; k++) write_req(0, k % BB, byte'('h70 + k), s);
    for (int l = 1; l < 4; l++)
      for (int k = 0; k < 15; k++) write_req(l, (k * 5 + l) % BB, byte'(l * 40 + k), s);
    served_n = 0;
    for (int k = 0; k < 6; k++) begin
      write_req(0, (k * 3) % BB, byte'('hE0 + k), s);
      served_n += int'(s);
    end
    check(served_n == 3, $sformatf("case 3: %0d extra writes served, want 3", served_n));
    check(int'(done_cnt) == 64, "case 3: S x B writes served in total");
    readback(4 * BB);

    run_table1();
    run_endurance(16);

    $display("mechanisms: in_place=%0d redirect=%0d swap_empty=%0d swap_dummy=%0d missed=%0d read_held=%0d",
             n_outcome[IN_PLACE], n_redirect, n_outcome[SWAP_EMPTY], n_outcome[SWAP_DUMMY],
             n_outcome[MISS], n_read_held);
    check(n_outcome[IN_PLACE] > 0, "mechanism: write in place");
    check(n_redirect > 0,           "mechanism: LINK redirection");
    check(n_outcome[SWAP_EMPTY] > 0, "mechanism: swap into an empty block");
    check(n_outcome[SWAP_DUMMY] > 0, "mechanism: swap through the dummy block");
    check(n_outcome[MISS] > 0,       "mechanism: missed request");
    check(n_read_held > 0,           "mechanism: read held off while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
