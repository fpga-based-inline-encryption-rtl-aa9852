// xts_tweak_gen: tweak generation for XTS-AES (Tweak convert, Encrypt with
// Key2, Alpha mult).
//
// The sector number (LBA) is turned into a 16-byte little-endian value and
// encrypted with Key2 by a second AES-256 pipeline ("Enc2"), which gives the
// tweak of block 0 of that sector.  Each following 16-byte block of the
// 512-byte sector uses the previous tweak multiplied by alpha.  As the
// document requires, Enc2 runs ahead of the data: after `seq_start` it keeps
// encrypting the sector numbers LBA, LBA+1, ... and parks the results in a
// small FIFO (TFIFO_DEPTH entries), so that the data path finds the tweak of
// the next sector ready and does not stall.  The prefetch depth, the epoch
// tag used to drop results of a sequence that was restarted, and the
// valid/take handshake are this design's choices.
//
// Interface: seq_start (one cycle) restarts the sequence at seq_lba;
// seq_active is 1 from then on.  tweak/tweak_valid give the tweak of the next
// data block; `take` (only while tweak_valid) consumes it.  A block-0 tweak
// is available 15 clocks after its LBA enters Enc2.
module xts_tweak_gen
  import xts_pkg::*;
#(
  parameter int unsigned BLOCKS_PER_SECTOR = SECTOR_BYTES / BLOCK_BYTES,
  parameter int unsigned TFIFO_DEPTH       = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  round_keys_t rk2,
  input  logic        seq_start,
  input  lba_t        seq_lba,
  output logic        seq_active,
  output block_t      tweak,
  output logic        tweak_valid,
  input  logic        take
);

  localparam int unsigned EPOCH_W = 4;
  localparam int unsigned CNT_W   = $clog2(TFIFO_DEPTH + 1);
  localparam int unsigned PTR_W   = (TFIFO_DEPTH > 1) ? $clog2(TFIFO_DEPTH) : 1;
  localparam int unsigned BLK_W   = (BLOCKS_PER_SECTOR > 1) ? $clog2(BLOCKS_PER_SECTOR) : 1;

  logic [EPOCH_W-1:0] epoch;
  lba_t               next_lba;
  logic [CNT_W-1:0]   inflight, count;
  logic               issue;

  // Enc2: encryption of the sector number with Key2
  logic               e2_valid;
  block_t             e2_data;
  logic [EPOCH_W-1:0] e2_epoch;
  logic               e2_keep;

  assign issue = seq_active && (32'(inflight) + 32'(count) < TFIFO_DEPTH);

  aes256_enc_pipe #(.TAG_W(EPOCH_W)) u_enc2 (
    .clk, .rst_n, .en(1'b1), .rk(rk2),
    .in_valid(issue), .in_data(lba_to_tweak({16'h0, next_lba})), .in_tag(epoch),
    .out_valid(e2_valid), .out_data(e2_data), .out_tag(e2_epoch)
  );

  assign e2_keep = e2_valid && (e2_epoch == epoch) && !seq_start;

  // FIFO of block-0 tweaks
  block_t           fifo [TFIFO_DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;

  // per-block tweak
  logic [BLK_W-1:0] blk_idx;
  block_t           cur_t, alpha_in, alpha_out;
  logic             pop;

  assign tweak       = (blk_idx == '0) ? fifo[rd_ptr] : cur_t;
  assign tweak_valid = seq_active && ((blk_idx != '0) || (count != '0));
  assign pop         = take && tweak_valid && (blk_idx == '0);
  assign alpha_in    = tweak;

  xts_alpha_mult u_alpha (.t_in(alpha_in), .t_out(alpha_out));

  function automatic logic [PTR_W-1:0] ptr_inc(input logic [PTR_W-1:0] p);
    return (32'(p) == TFIFO_DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      epoch      <= '0;
      next_lba   <= '0;
      inflight   <= '0;
      count      <= '0;
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      blk_idx    <= '0;
      cur_t      <= '0;
      seq_active <= 1'b0;
    end else if (seq_start) begin
      epoch      <= epoch + 1'b1;
      next_lba   <= seq_lba;
      inflight   <= '0;
      count      <= '0;
      wr_ptr     <= '0;
      rd_ptr     <= '0;
      blk_idx    <= '0;
      seq_active <= 1'b1;
    end else begin
      if (issue) next_lba <= next_lba + 1'b1;
      inflight <= inflight + CNT_W'(issue) - CNT_W'(e2_keep);
      count    <= count + CNT_W'(e2_keep) - CNT_W'(pop);
      if (e2_keep) begin
        fifo[wr_ptr] <= e2_data;
        wr_ptr       <= ptr_inc(wr_ptr);
      end
      if (pop) rd_ptr <= ptr_inc(rd_ptr);
      if (take && tweak_valid) begin
        cur_t   <= alpha_out;
        blk_idx <= (32'(blk_idx) == BLOCKS_PER_SECTOR - 1) ? '0 : blk_idx + 1'b1;
      end
    end
  end

endmodule
