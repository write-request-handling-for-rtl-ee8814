// wl_pkg: types and constants shared by the static wear-leveling write path.
//
// The memory holds four data blocks and one dummy (overprovisioning) block.
// Each data block owns a 14-bit counter word laid out as
//   [13:12] Block ID | [11:2] write count | [1:0] LINK
// Block ID is the block's own number and LINK names the physical block
// that currently holds the data of the logical block with that number.
// LINK equal to Block ID means the logical block has never been moved.
// The field widths and the ten controller states follow the published
// format and state diagram. The state encoding is this design's choice.
package wl_pkg;

  localparam int unsigned ID_W       = 2;               // Block ID / LINK width
  localparam int unsigned CNT_W      = 10;              // write count width
  localparam int unsigned NUM_BLOCKS = 1 << ID_W;       // data blocks (4)
  localparam int unsigned PBLK_W     = ID_W + 1;        // physical index incl. dummy
  localparam logic [PBLK_W-1:0] DUMMY_BLK = PBLK_W'(NUM_BLOCKS); // index 4

  typedef logic [ID_W-1:0]  blk_id_t;
  typedef logic [CNT_W-1:0] wcount_t;

  // One block counter word, MSB first as in the counter format.
  typedef struct packed {
    blk_id_t id;     // Block ID (2 MSBs)
    wcount_t count;  // write requests served into this physical block
    blk_id_t link;   // physical block holding this logical block (2 LSBs)
  } blk_counter_t;

  // The ten states of the write-request state machine.
  typedef enum logic [3:0] {
    S1_IDLE            = 4'd1,
    S2_COMPARE         = 4'd2,
    S3_CHANGE_BLOCK    = 4'd3,
    S4_SEE_COUNTER     = 4'd4,
    S5_CHECK_FRESH     = 4'd5,
    S6_CHECK_NOT_EMPTY = 4'd6,
    S7_FRESH_TO_DUMMY  = 4'd7,
    S8_OLD_TO_NEW      = 4'd8,
    S9_DUMMY_TO_OLD    = 4'd9,
    S10_WRITE_INC      = 4'd10
  } wl_state_t;

endpackage
