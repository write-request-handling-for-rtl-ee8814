// wl_write_ctrl: write-request state machine for static wear leveling.
//
// A write request (address, one data byte) is accepted in S1_IDLE when the
// active-low request wr_n is 0. The logical block number is taken from the
// two address bits just above the in-block offset; the address bits above
// those are ignored (the 25-bit request address is wider than the 32-kB
// memory needs). The machine then walks the published ten-state diagram:
//
//   S1  idle: wait for wr_n = 0, register address and data, set busy
//   S2  compare: LINK of the logical block's counter word against its ID
//         equal     -> S4 (the logical block still lives in its own block)
//         different -> S3
//   S3  change block: follow LINK to the block now holding the data -> S4
//   S4  see counter: sense whether that block's count reached saturation
//   S5  check fresh counter:
//         not saturated -> S10 (write in place)
//         saturated     -> pick the fresh block (lowest count) -> S6
//         fresh block saturated too -> request missed, back to S1
//   S6  check if not empty:
//         fresh block holds data -> S7 (three-way swap via the dummy block)
//         fresh block empty      -> S8
//   S7  copy fresh block -> dummy block
//   S8  copy old (saturated) block -> fresh block
//   S9  copy dummy block -> old block (only after S7)
//   S10 write the byte into the target block, increment its count, -> S1
//
// After a swap the hot logical block lives in the fresh block and the cold
// data that were there live in the worn block; both LINKs are exchanged in
// the counter table. Copies move one byte per clock, so S7, S8 and S9 each
// last BLOCK_BYTES cycles. Copies are not counted as write requests.
//
// Choices of this design, where the published diagram is not explicit:
// the missed-request exit from S5, the "fresh block is empty" path going
// through S8 (so the hot block's earlier data are carried over) before
// S10 instead of straight to S10, the fresh block being the lowest count
// other than the saturated block itself, and the read port.
//
// Reads (rd_en, rd_addr) are served only in S1 and only when no write is
// requested in the same cycle: while a write is being processed reads are
// held off, as the busy register indicates. A served read returns the
// byte of the logical address on rd_data with rd_valid one cycle later.
//
// Timing of one write, counted from the accepting S1 cycle to the S10
// cycle inclusive: 5 cycles in place, 6 when redirected by LINK;
// a swap adds 1 + BLOCK_BYTES (fresh block empty) or
// 1 + 3*BLOCK_BYTES (fresh block in use). wr_done or wr_missed pulses in
// the cycle after the request ends, together with busy falling.
module wl_write_ctrl
  import wl_pkg::*;
#(
  parameter int unsigned PAGE_BYTES      = 4096,
  parameter int unsigned PAGES_PER_BLOCK = 2,
  parameter int unsigned HOST_ADDR_W     = 25,
  parameter int unsigned DATA_W          = 8,
  localparam int unsigned BLOCK_BYTES    = PAGE_BYTES * PAGES_PER_BLOCK,
  localparam int unsigned OFF_W          = $clog2(BLOCK_BYTES),
  localparam int unsigned MEM_ADDR_W     = PBLK_W + OFF_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // host write request
  input  logic                          wr_n,
  input  logic [HOST_ADDR_W-1:0]        wr_addr,
  input  logic [DATA_W-1:0]             wr_data,
  output logic                          busy,
  output logic                          wr_done,
  output logic                          wr_missed,
  // host read request
  input  logic                          rd_en,
  input  logic [HOST_ADDR_W-1:0]        rd_addr,
  output logic [DATA_W-1:0]             rd_data,
  output logic                          rd_valid,
  // status
  output wl_state_t                     state,
  output logic [15:0]                   done_cnt,
  output logic [15:0]                   miss_cnt,
  output logic [15:0]                   swap_cnt,
  // counter table
  input  blk_counter_t [NUM_BLOCKS-1:0] tbl,
  input  logic         [NUM_BLOCKS-1:0] tbl_used,
  input  logic         [NUM_BLOCKS-1:0] tbl_saturated,
  input  blk_id_t                       tbl_fresh_blk,
  input  logic                          tbl_fresh_sat,
  output blk_id_t                       tbl_excl_blk,
  output logic                          tbl_inc_en,
  output blk_id_t                       tbl_inc_blk,
  output logic                          tbl_swap_en,
  output blk_id_t                       tbl_swap_la,
  output blk_id_t                       tbl_swap_lb,
  // flash array
  output logic                          mem_we,
  output logic [MEM_ADDR_W-1:0]         mem_waddr,
  output logic [DATA_W-1:0]             mem_wdata,
  output logic [MEM_ADDR_W-1:0]         mem_raddr,
  input  logic [DATA_W-1:0]             mem_rdata
);

  typedef logic [OFF_W-1:0] off_t;

  wl_state_t          state_q, state_d;
  logic               busy_q;
  blk_id_t            lblk_q;      // logical block of the request
  off_t               off_q;       // byte offset inside the block
  logic [DATA_W-1:0]  data_q;
  blk_id_t            pblk_q;      // physical block currently holding lblk
  blk_id_t            fblk_q;      // fresh block chosen in S5
  blk_id_t            mblk_q;      // logical block that lives in fblk
  logic               sat_q;       // pblk reached saturation (S4)
  logic               fused_q;     // fresh block held data (S6)
  off_t               idx_q;       // copy index
  logic               done_q, miss_q;
  logic [DATA_W-1:0]  rd_data_q;
  logic               rd_valid_q;
  logic [15:0]        done_cnt_q, miss_cnt_q, swap_cnt_q;

  wire copy_last = (idx_q == off_t'(BLOCK_BYTES - 1));
  wire wr_req    = (state_q == S1_IDLE) && !wr_n;
  wire rd_take   = (state_q == S1_IDLE) && wr_n && rd_en;

  function automatic blk_id_t blk_of(input logic [HOST_ADDR_W-1:0] a);
    return a[OFF_W +: ID_W];
  endfunction

  // Logical block whose LINK points at physical block p.
  function automatic blk_id_t owner_of(input blk_id_t p, input blk_counter_t [NUM_BLOCKS-1:0] t);
    blk_id_t o;
    o = '0;
    for (int i = 0; i < NUM_BLOCKS; i++)
      if (t[i].link == p) o = blk_id_t'(i);
    return o;
  endfunction

  // next state
  always_comb begin
    state_d = state_q;
    unique case (state_q)
      S1_IDLE:            if (!wr_n) state_d = S2_COMPARE;
      S2_COMPARE:         state_d = (tbl[lblk_q].link == tbl[lblk_q].id) ? S4_SEE_COUNTER
                                                                          : S3_CHANGE_BLOCK;
      S3_CHANGE_BLOCK:    state_d = S4_SEE_COUNTER;
      S4_SEE_COUNTER:     state_d = S5_CHECK_FRESH;
      S5_CHECK_FRESH:     if (!sat_q)             state_d = S10_WRITE_INC;
                          else if (tbl_fresh_sat) state_d = S1_IDLE;
                          else                    state_d = S6_CHECK_NOT_EMPTY;
      S6_CHECK_NOT_EMPTY: state_d = tbl_used[fblk_q] ? S7_FRESH_TO_DUMMY : S8_OLD_TO_NEW;
      S7_FRESH_TO_DUMMY:  if (copy_last) state_d = S8_OLD_TO_NEW;
      S8_OLD_TO_NEW:      if (copy_last) state_d = fused_q ? S9_DUMMY_TO_OLD : S10_WRITE_INC;
      S9_DUMMY_TO_OLD:    if (copy_last) state_d = S10_WRITE_INC;
      S10_WRITE_INC:      state_d = S1_IDLE;
      default:            state_d = S1_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S1_IDLE;
      busy_q     <= 1'b0;
      lblk_q     <= '0;
      off_q      <= '0;
      data_q     <= '0;
      pblk_q     <= '0;
      fblk_q     <= '0;
      mblk_q     <= '0;
      sat_q      <= 1'b0;
      fused_q    <= 1'b0;
      idx_q      <= '0;
      done_q     <= 1'b0;
      miss_q     <= 1'b0;
      rd_data_q  <= '0;
      rd_valid_q <= 1'b0;
      done_cnt_q <= '0;
      miss_cnt_q <= '0;
      swap_cnt_q <= '0;
    end else begin
      state_q    <= state_d;
      done_q     <= 1'b0;
      miss_q     <= 1'b0;
      rd_valid_q <= rd_take;
      if (rd_take) rd_data_q <= mem_rdata;

      unique case (state_q)
        S1_IDLE: if (wr_req) begin
          busy_q <= 1'b1;
          lblk_q <= blk_of(wr_addr);
          off_q  <= wr_addr[OFF_W-1:0];
          data_q <= wr_data;
        end
        S2_COMPARE:      pblk_q <= lblk_q;
        S3_CHANGE_BLOCK: pblk_q <= tbl[lblk_q].link;
        S4_SEE_COUNTER:  sat_q  <= tbl_saturated[pblk_q];
        S5_CHECK_FRESH: if (sat_q) begin
          if (tbl_fresh_sat) begin
            busy_q     <= 1'b0;
            miss_q     <= 1'b1;
            miss_cnt_q <= miss_cnt_q + 1'b1;
          end else begin
            fblk_q <= tbl_fresh_blk;
            mblk_q <= owner_of(tbl_fresh_blk, tbl);
          end
        end
        S6_CHECK_NOT_EMPTY: begin
          fused_q <= tbl_used[fblk_q];
          idx_q   <= '0;
        end
        S7_FRESH_TO_DUMMY, S8_OLD_TO_NEW, S9_DUMMY_TO_OLD: begin
          idx_q <= copy_last ? '0 : idx_q + 1'b1;
          if (state_d == S10_WRITE_INC) begin
            pblk_q     <= fblk_q;   // the write now goes to the fresh block
            swap_cnt_q <= swap_cnt_q + 1'b1;
          end
        end
        S10_WRITE_INC: begin
          busy_q     <= 1'b0;
          done_q     <= 1'b1;
          done_cnt_q <= done_cnt_q + 1'b1;
        end
        default: ;
      endcase
    end
  end

  // Datapath towards the flash array and the counter table.
  always_comb begin
    mem_we      = 1'b0;
    mem_waddr   = {PBLK_W'(pblk_q), off_q};
    mem_wdata   = data_q;
    mem_raddr   = {PBLK_W'(tbl[blk_of(rd_addr)].link), rd_addr[OFF_W-1:0]};
    tbl_inc_en  = 1'b0;
    tbl_swap_en = 1'b0;
    unique case (state_q)
      S7_FRESH_TO_DUMMY: begin
        mem_we    = 1'b1;
        mem_raddr = {PBLK_W'(fblk_q), idx_q};
        mem_waddr = {DUMMY_BLK, idx_q};
        mem_wdata = mem_rdata;
      end
      S8_OLD_TO_NEW: begin
        mem_we    = 1'b1;
        mem_raddr = {PBLK_W'(pblk_q), idx_q};
        mem_waddr = {PBLK_W'(fblk_q), idx_q};
        mem_wdata = mem_rdata;
      end
      S9_DUMMY_TO_OLD: begin
        mem_we    = 1'b1;
        mem_raddr = {DUMMY_BLK, idx_q};
        mem_waddr = {PBLK_W'(pblk_q), idx_q};
        mem_wdata = mem_rdata;
      end
      S10_WRITE_INC: begin
        mem_we     = 1'b1;
        tbl_inc_en = 1'b1;
      end
      default: ;
    endcase
    // exchange the two logical blocks' LINKs when the last copy finishes
    if ((state_q == S8_OLD_TO_NEW || state_q == S9_DUMMY_TO_OLD) &&
        state_d == S10_WRITE_INC)
      tbl_swap_en = 1'b1;
  end

  assign tbl_excl_blk = pblk_q;
  assign tbl_inc_blk  = pblk_q;
  assign tbl_swap_la  = lblk_q;
  assign tbl_swap_lb  = mblk_q;

  assign state     = state_q;
  assign busy      = busy_q;
  assign wr_done   = done_q;
  assign wr_missed = miss_q;
  assign rd_data   = rd_data_q;
  assign rd_valid  = rd_valid_q;
  assign done_cnt  = done_cnt_q;
  assign miss_cnt  = miss_cnt_q;
  assign swap_cnt  = swap_cnt_q;

  // The busy register is set exactly while a request is in progress,
  // and no read is served while it is set.
  a_busy_state: assert property (@(posedge clk) disable iff (!rst_n)
                                 busy_q == (state_q != S1_IDLE))
    else $error("wl_write_ctrl: busy does not match the state");
  a_no_read_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                        rd_valid_q |-> !busy_q)
    else $error("wl_write_ctrl: read served during a write");

endmodule
