// tb_flash_array: self-checking test of the block storage.
//
// Writes a pattern into every block including the dummy block (a small
// block size keeps the run short), reads it back through the
// asynchronous read port, then overwrites a few bytes and checks that
// only those bytes changed. Expected data come from a shadow array kept
// by the testbench.
module tb_flash_array;
  import wl_pkg::*;

  localparam int unsigned PAGE_BYTES  = 8;
  localparam int unsigned PAGES       = 2;
  localparam int unsigned BB          = PAGE_BYTES * PAGES;
  localparam int unsigned OFF_W       = $clog2(BB);
  localparam int unsigned AW          = PBLK_W + OFF_W;

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [7:0]    wdata, rdata;
  logic [7:0]    shadow [(NUM_BLOCKS + 1) * BB];
  int            checks = 0, failures = 0;

  flash_array #(.PAGE_BYTES(PAGE_BYTES), .PAGES_PER_BLOCK(PAGES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_byte(input int blk, input int off, input logic [7:0] d);
    @(negedge clk);
    we    = 1'b1;
    waddr = {PBLK_W'(blk), OFF_W'(off)};
    wdata = d;
    @(negedge clk);
    we    = 1'b0;
    shadow[blk * BB + off] = d;
  endtask

  task automatic check_all();
    for (int b = 0; b <= NUM_BLOCKS; b++)
      for (int o = 0; o < BB; o++) begin
        raddr = {PBLK_W'(b), OFF_W'(o)};
        #1;
        checks++;
        if (rdata !== shadow[b * BB + o]) begin
          failures++;
          $display("mismatch blk %0d off %0d: got %02x want %02x", b, o, rdata, shadow[b * BB + o]);
        end
      end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    for (int b = 0; b <= NUM_BLOCKS; b++)
      for (int o = 0; o < BB; o++)
        write_byte(b, o, 8'((b * 37 + o * 11 + 5) ^ (o << 4)));
    check_all();
    for (int k = 0; k < 20; k++)
      write_byte(int'($urandom_range(NUM_BLOCKS)), int'($urandom_range(BB - 1)), 8'($urandom));
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
