// flash_array: byte-wide storage for the four data blocks and the dummy block.
//
// The array is organised as NUM_BLOCKS+1 blocks of PAGES_PER_BLOCK pages of
// PAGE_BYTES bytes: four blocks of two 4-kB pages (32 kB of user data) plus
// one dummy block of the same size, which the write controller uses as a
// scratch area while it swaps the contents of two blocks. Defaults follow
// the published memory organisation.
//
// The storage is modelled as a plain two-dimensional array, like the
// simplified memory the design was evaluated with: a write overwrites a
// byte in place and no erase is modelled. Erase-before-program and the
// page/block granularity of real NAND are outside this model.
//
// Interface and timing: one write port (we/waddr/wdata, written on the
// rising clock edge) and one asynchronous read port (raddr -> rdata in the
// same cycle), so a one-byte-per-cycle block copy can read the source and
// write the destination in one clock. An address is {physical block, byte
// offset inside the block}; physical block 4 is the dummy block. Contents
// are not initialised; the controller tracks which blocks hold data.
module flash_array
  import wl_pkg::*;
#(
  parameter int unsigned PAGE_BYTES      = 4096,
  parameter int unsigned PAGES_PER_BLOCK = 2,
  parameter int unsigned DATA_W          = 8,
  localparam int unsigned BLOCK_BYTES    = PAGE_BYTES * PAGES_PER_BLOCK,
  localparam int unsigned OFF_W          = $clog2(BLOCK_BYTES),
  localparam int unsigned ADDR_W         = PBLK_W + OFF_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned DEPTH = (NUM_BLOCKS + 1) * BLOCK_BYTES;

  logic [DATA_W-1:0] mem [DEPTH];

  // Flat word index of {block, offset}: block * BLOCK_BYTES + offset.
  function automatic int unsigned flat(input logic [ADDR_W-1:0] a);
    return int'(a[ADDR_W-1:OFF_W]) * BLOCK_BYTES + int'(a[OFF_W-1:0]);
  endfunction

  always_ff @(posedge clk) begin
    if (we) mem[flat(waddr)] <= wdata;
  end

  assign rdata = mem[flat(raddr)];

  // Only the data blocks and the dummy block exist.
  always_ff @(posedge clk) begin
    if (we) assert (waddr[ADDR_W-1:OFF_W] <= DUMMY_BLK)
      else $error("flash_array: write to nonexistent block %0d", waddr[ADDR_W-1:OFF_W]);
  end

endmodule
