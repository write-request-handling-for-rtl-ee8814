// tb_block_counter_table: self-checking test of the counter words.
//
// Checks the reset format (Block ID = LINK = own index, count 0), the
// increment, the saturation flags against a programmable level, the
// fresh-block search (lowest count other than the excluded block, ties to
// the lowest index) and the LINK / used-bit exchange. A reference model of
// counts, links and used bits is kept in the testbench.
module tb_block_counter_table;
  import wl_pkg::*;

  logic                          clk = 1'b0, rst_n = 1'b0;
  wcount_t                       sat_level;
  logic                          inc_en, swap_en;
  blk_id_t                       inc_blk, swap_la, swap_lb, excl_blk, fresh_blk;
  logic                          fresh_sat;
  blk_counter_t [NUM_BLOCKS-1:0] entries;
  logic         [NUM_BLOCKS-1:0] used, saturated;

  int      checks = 0, failures = 0;
  int      m_cnt  [NUM_BLOCKS];
  int      m_link [NUM_BLOCKS];
  bit      m_used [NUM_BLOCKS];

  block_counter_table dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic compare_model();
    int  bi, best;
    #1;
    for (int i = 0; i < NUM_BLOCKS; i++) begin
      check(entries[i].id == blk_id_t'(i), $sformatf("id[%0d]", i));
      check(int'(entries[i].count) == m_cnt[i],
            $sformatf("count[%0d] got %0d want %0d", i, entries[i].count, m_cnt[i]));
      check(int'(entries[i].link) == m_link[i], $sformatf("link[%0d]", i));
      check(used[i] == m_used[i], $sformatf("used[%0d]", i));
      check(saturated[i] == (m_cnt[i] >= int'(sat_level)), $sformatf("saturated[%0d]", i));
    end
    for (int e = 0; e < NUM_BLOCKS; e++) begin
      excl_blk = blk_id_t'(e);
      #1;
      bi = -1; best = 1 << 30;
      for (int i = 0; i < NUM_BLOCKS; i++)
        if (i != e && m_cnt[i] < best) begin best = m_cnt[i]; bi = i; end
      check(int'(fresh_blk) == bi, $sformatf("fresh excl %0d got %0d want %0d", e, fresh_blk, bi));
      check(fresh_sat == (best >= int'(sat_level)), $sformatf("fresh_sat excl %0d", e));
    end
  endtask

  task automatic do_inc(input int b);
    @(negedge clk);
    inc_en = 1'b1; inc_blk = blk_id_t'(b);
    @(negedge clk);
    inc_en = 1'b0;
    m_cnt[b]++;
    m_used[b] = 1'b1;
  endtask

  task automatic do_swap(input int a, input int b);
    int pa, pb;
    bit t;
    @(negedge clk);
    swap_en = 1'b1; swap_la = blk_id_t'(a); swap_lb = blk_id_t'(b);
    @(negedge clk);
    swap_en = 1'b0;
    pa = m_link[a]; pb = m_link[b];
    m_link[a] = pb; m_link[b] = pa;
    t = m_used[pa]; m_used[pa] = m_used[pb]; m_used[pb] = t;
  endtask

  initial begin
    sat_level = 10'd16;
    inc_en = 1'b0; swap_en = 1'b0; inc_blk = '0; swap_la = '0; swap_lb = '0; excl_blk = '0;
    for (int i = 0; i < NUM_BLOCKS; i++) begin m_cnt[i] = 0; m_link[i] = i; m_used[i] = 1'b0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    compare_model();
    // fill block 0 to saturation, others partially
    for (int k = 0; k < 16; k++) do_inc(0);
    for (int k = 0; k < 5; k++)  do_inc(2);
    compare_model();
    do_inc(3);
    compare_model();
    do_swap(0, 1);
    compare_model();
    do_swap(2, 0);
    compare_model();
    // random traffic
    for (int k = 0; k < 200; k++) begin
      if ($urandom_range(3) == 0) begin
        int a, b;
        a = int'($urandom_range(NUM_BLOCKS - 1));
        b = (a + 1 + int'($urandom_range(NUM_BLOCKS - 2))) % NUM_BLOCKS;
        do_swap(a, b);
      end else do_inc(int'($urandom_range(NUM_BLOCKS - 1)));
      if (k % 20 == 0) begin
        sat_level = wcount_t'(10 + $urandom_range(60));
        compare_model();
      end
    end
    compare_model();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
