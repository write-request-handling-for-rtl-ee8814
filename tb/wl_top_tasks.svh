// wl_top_tasks.svh: request drivers and checks shared by the top-level
// testbenches. Included inside a testbench module that declares the DUT
// signals (clk, rst_n, wr_*, rd_*, busy, counters, *_cnt), the constants
// BB and OFF_W, the counters checks/failures, and "wl_ref model".
// Mechanism counters are kept here: in-place writes, LINK redirections,
// swaps into an empty fresh block, swaps through the dummy block, missed
// requests and reads held off while busy.

int n_outcome [4];
int n_redirect  = 0;
int n_read_held = 0;

task automatic check(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL: %s", what);
  end
endtask

// Reset the design and start a fresh reference model.
task automatic restart(input int sat);
  @(negedge clk);
  rst_n     = 1'b0;
  sat_level = wcount_t'(sat);
  model     = new(BB, sat);
  repeat (2) @(negedge clk);
  rst_n = 1'b1;
endtask

// One write request; returns 1 when it was served.
task automatic write_req(input int l, input int off, input byte d, output bit served);
  int       lat, exp_lat, exp_path;
  outcome_e exp;
  bit       ended;
  exp = model.write(l, off, d, exp_lat, exp_path);
  n_outcome[exp]++;
  if (model.redirected) n_redirect++;
  @(negedge clk);
  wr_n    = 1'b0;
  wr_addr = 25'(l) << OFF_W | 25'(off);
  wr_data = d;
  rd_en   = 1'b1;           // a read that must wait for the write
  rd_addr = wr_addr;
  @(posedge clk);
  lat = 1;
  #1 wr_n = 1'b1;
  ended = 1'b0;
  while (!ended) begin
    if (rd_valid) begin
      failures++;
      $display("FAIL: read served while a write was pending");
    end else if (busy) n_read_held++;
    @(posedge clk);
    lat++;
    #1;
    ended = wr_done || wr_missed;
  end
  rd_en  = 1'b0;
  served = wr_done;
  check(wr_done == (exp != MISS) && wr_missed == (exp == MISS),
        $sformatf("outcome L%0d: done=%0b missed=%0b expected %s", l, wr_done, wr_missed, exp.name()));
  check(lat == exp_lat, $sformatf("latency L%0d got %0d want %0d", l, lat, exp_lat));
  for (int i = 0; i < NUM_BLOCKS; i++)
    check(int'(counters[i].count) == model.cnt[i] && int'(counters[i].link) == model.link[i],
          $sformatf("counter word %0d", i));
endtask

// Read every byte written so far (at most max_reads of them, spread out).
task automatic readback(input int max_reads);
  int stride, n;
  n = 0;
  for (int a = 0; a < 4 * BB; a++) if (model.valid[a]) n++;
  stride = (n > max_reads) ? 2 : 1;
  n = 0;
  for (int a = 0; a < 4 * BB; a++) begin
    if (model.valid[a] && (n++ % stride == 0)) begin
      @(negedge clk);
      rd_en   = 1'b1;
      rd_addr = 25'(a);
      @(posedge clk);
      #1 rd_en = 1'b0;
      check(rd_valid && rd_data == 8'(model.data[a]),
            $sformatf("read L%0d+%0d got %02x want %02x", a / BB, a % BB, rd_data, model.data[a]));
    end
  end
endtask

// Write requests that a memory without wear leveling would serve: each
// block takes at most sat writes.
function automatic int served_without_leveling(input int reqs [$], input int sat);
  int c [4];
  int s;
  s = 0;
  for (int i = 0; i < 4; i++) c[i] = 0;
  foreach (reqs[i]) if (c[reqs[i]] < sat) begin c[reqs[i]]++; s++; end
  return s;
endfunction

// Table 1 workload: 36 write requests with sat level 16, 34 of them to
// logical blocks 0 and 1 (17 each, interleaved) and one each to 2 and 3.
task automatic run_table1();
  int reqs [$];
  int served_n;
  bit s;
  restart(16);
  reqs.push_back(2);
  reqs.push_back(3);
  for (int k = 0; k < 17; k++) begin reqs.push_back(0); reqs.push_back(1); end
  served_n = 0;
  foreach (reqs[i]) begin
    write_req(reqs[i], (i * 7) % BB, byte'(i + 1), s);
    served_n += int'(s);
  end
  check(served_n == 36, $sformatf("Table 1: %0d of 36 requests served", served_n));
  check(int'(done_cnt) == 36 && miss_cnt == 0, "Table 1: served/missed totals");
  $display("Table 1 workload: %0d of %0d served with wear leveling, %0d without, %0d swaps",
           served_n, reqs.size(), served_without_leveling(reqs, 16), swap_cnt);
  readback(64);
endtask

// Endurance: requests all to one logical block are served sat*4 times.
task automatic run_endurance(input int sat);
  int served_n;
  bit s;
  restart(sat);
  served_n = 0;
  for (int k = 0; k < 4 * sat + 3; k++) begin
    write_req(0, k % BB, byte'('hA0 + k), s);
    served_n += int'(s);
  end
  check(served_n == 4 * sat, $sformatf("endurance: %0d served, want %0d", served_n, 4 * sat));
  check(int'(miss_cnt) == 3, "endurance: three requests missed after all blocks saturate");
  $display("single-block traffic, S=%0d: %0d requests served (S x B = %0d)", sat, served_n, 4 * sat);
  readback(64);
endtask
