// tb_wl_write_ctrl: self-checking test of the ten-state write controller.
//
// The controller is run with the counter table and a small flash array
// (8-byte blocks, saturation level 5) so that swaps are short. Random
// writes, biased towards one hot logical block, are checked request by
// request against the reference model in wl_ref_pkg: the outcome (done or
// missed), the exact set of states visited, the latency in clock cycles,
// the counter words and the served / missed / swap totals. Reads are held
// high during every write to check that none is served while busy, and all
// written bytes are read back at the end through the logical mapping.
module tb_wl_write_ctrl;
  import wl_pkg::*;
  import wl_ref_pkg::*;

  localparam int unsigned PAGE_BYTES = 4;
  localparam int unsigned PAGES      = 2;
  localparam int unsigned BB         = PAGE_BYTES * PAGES;
  localparam int unsigned OFF_W      = $clog2(BB);
  localparam int unsigned MAW        = PBLK_W + OFF_W;
  localparam int          SAT        = 5;

  logic                          clk = 1'b0, rst_n = 1'b0;
  logic                          wr_n, busy, wr_done, wr_missed, rd_en, rd_valid;
  logic [24:0]                   wr_addr, rd_addr;
  logic [7:0]                    wr_data, rd_data;
  wl_state_t                     state;
  logic [15:0]                   done_cnt, miss_cnt, swap_cnt;
  blk_counter_t [NUM_BLOCKS-1:0] tbl;
  logic         [NUM_BLOCKS-1:0] tbl_used, tbl_saturated;
  blk_id_t                       fresh_blk, excl_blk, inc_blk, swap_la, swap_lb;
  logic                          fresh_sat, inc_en, swap_en, mem_we;
  logic [MAW-1:0]                mem_waddr, mem_raddr;
  logic [7:0]                    mem_wdata, mem_rdata;
  wcount_t                       sat_level;

  int checks = 0, failures = 0;
  int n_outcome [4];
  int n_redirect = 0;
  int path_mask;
  wl_ref model;

  wl_write_ctrl #(.PAGE_BYTES(PAGE_BYTES), .PAGES_PER_BLOCK(PAGES)) dut (
    .clk, .rst_n, .wr_n, .wr_addr, .wr_data, .busy, .wr_done, .wr_missed,
    .rd_en, .rd_addr, .rd_data, .rd_valid, .state, .done_cnt, .miss_cnt, .swap_cnt,
    .tbl, .tbl_used, .tbl_saturated, .tbl_fresh_blk(fresh_blk), .tbl_fresh_sat(fresh_sat),
    .tbl_excl_blk(excl_blk), .tbl_inc_en(inc_en), .tbl_inc_blk(inc_blk),
    .tbl_swap_en(swap_en), .tbl_swap_la(swap_la), .tbl_swap_lb(swap_lb),
    .mem_we, .mem_waddr, .mem_wdata, .mem_raddr, .mem_rdata);

  block_counter_table u_tbl (
    .clk, .rst_n, .sat_level, .inc_en, .inc_blk, .swap_en, .swap_la, .swap_lb,
    .excl_blk, .fresh_blk, .fresh_sat, .entries(tbl), .used(tbl_used), .saturated(tbl_saturated));

  flash_array #(.PAGE_BYTES(PAGE_BYTES), .PAGES_PER_BLOCK(PAGES)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata), .raddr(mem_raddr), .rdata(mem_rdata));

  always #5 clk = ~clk;

  always @(posedge clk) path_mask |= (1 << int'(state));

  initial begin
    repeat (200000) @(posedge clk);
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

  task automatic write_req(input int l, input int off, input byte d);
    int       lat, exp_lat, exp_path;
    outcome_e exp;
    bit       ended;
    exp = model.write(l, off, d, exp_lat, exp_path);
    n_outcome[exp]++;
    if (model.redirected) n_redirect++;
    @(negedge clk);
    wr_n    = 1'b0;
    wr_addr = 25'({l, OFF_W'(off)}) | 25'(32'h0100_0000 & $urandom); // upper bits ignored
    wr_data = d;
    rd_en   = 1'b1;
    rd_addr = wr_addr;
    path_mask = 0;
    @(posedge clk);
    lat = 1;
    #1 wr_n = 1'b1;
    ended = 1'b0;
    while (!ended) begin
      if (rd_valid) begin
        failures++;
        $display("FAIL: read served while a write was pending");
      end
      @(posedge clk);
      lat++;
      #1;
      ended = wr_done || wr_missed;
    end
    rd_en = 1'b0;
    check(wr_done == (exp != MISS) && wr_missed == (exp == MISS),
          $sformatf("outcome L%0d: done=%0b missed=%0b expected %s", l, wr_done, wr_missed, exp.name()));
    check(lat == exp_lat, $sformatf("latency L%0d got %0d want %0d (%s)", l, lat, exp_lat, exp.name()));
    check((path_mask | (1 << 1)) == exp_path,
          $sformatf("states L%0d got %b want %b", l, path_mask, exp_path));
    check(!busy, "busy still set after the request ended");
    for (int i = 0; i < NUM_BLOCKS; i++)
      check(int'(tbl[i].count) == model.cnt[i] && int'(tbl[i].link) == model.link[i] &&
            tbl[i].id == blk_id_t'(i), $sformatf("counter word %0d", i));
  endtask

  task automatic read_check(input int l, input int off);
    @(negedge clk);
    rd_en   = 1'b1;
    rd_addr = 25'({l, OFF_W'(off)});
    @(posedge clk);
    #1 rd_en = 1'b0;
    check(rd_valid, "read not served while idle");
    check(rd_data == 8'(model.data[l * BB + off]),
          $sformatf("read L%0d+%0d got %02x want %02x", l, off, rd_data, model.data[l * BB + off]));
  endtask

  initial begin
    wr_n = 1'b1; wr_addr = '0; wr_data = '0; rd_en = 1'b0; rd_addr = '0;
    sat_level = wcount_t'(SAT);
    model = new(BB, SAT);
    for (int i = 0; i < 4; i++) n_outcome[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // fill logical blocks 1..3 a little so that fresh blocks hold data
    for (int l = 1; l < 4; l++) write_req(l, l, byte'('h10 + l));
    // hot traffic: 80% to logical block 0, until everything saturates
    for (int k = 0; k < 4 * SAT + 6; k++) begin
      int l;
      l = ($urandom_range(9) < 8) ? 0 : int'($urandom_range(3));
      write_req(l, int'($urandom_range(BB - 1)), byte'($urandom));
    end
    check(int'(done_cnt) == n_outcome[IN_PLACE] + n_outcome[SWAP_EMPTY] + n_outcome[SWAP_DUMMY],
          "served total");
    check(int'(miss_cnt) == n_outcome[MISS], "missed total");
    check(int'(swap_cnt) == n_outcome[SWAP_EMPTY] + n_outcome[SWAP_DUMMY], "swap total");
    for (int a = 0; a < 4 * BB; a++)
      if (model.valid[a]) read_check(a / BB, a % BB);
    $display("in_place=%0d swap_empty=%0d swap_dummy=%0d missed=%0d redirected=%0d",
             n_outcome[IN_PLACE], n_outcome[SWAP_EMPTY], n_outcome[SWAP_DUMMY],
             n_outcome[MISS], n_redirect);
    check(n_outcome[SWAP_DUMMY] > 0 && n_outcome[MISS] > 0 && n_redirect > 0,
          "every path of the state machine was exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
