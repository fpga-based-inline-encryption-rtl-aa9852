// inline_crypt_bridge: inline AES-256-XTS encryption bridge between a PC's
// SATA port and a SATA SSD.
//
// Every frame (FIS) between the PC and the SSD passes through this block.
// Sector data written by the PC is enciphered with XTS-AES-256 before it
// reaches the SSD and sector data read from the SSD is deciphered before it
// reaches the PC; commands, status and all other FIS pass unchanged.  Neither
// the PC's software nor the SSD's firmware needs to know.
//
//   PC link layer  --rx-->  fis_xts_path (encrypt)  --> bridge_data --tx--> SSD link layer
//   PC link layer  <--tx--  bridge_data <--  fis_xts_path (decrypt) <--rx-- SSD link layer
//
// Blocks: ctrl_regs (processor registers: keys, mode, counters), two
// aes256_key_expand (Key1 for data, Key2 for tweaks; shared by both
// directions), lba_tracker (finds the sector number of the data from the
// command and DMA Setup FIS), two fis_xts_path (each an xts_core with its own
// Key1 AES pipeline and Key2 tweak pipeline), and bridge_data (one frame at a
// time, dual handshake, frame buffer).  The placement of the cipher units on
// the receive side of each link layer follows the document's block diagram;
// the SATA link and PHY layers are outside this block and connect through
// the h_* (PC side) and d_* (SSD side) ports.
//
// Timing: one 32-bit dword per clock (150 MHz gives SATA 3's 600 MB/s); a
// ciphered 16-byte block takes 16 clocks through the XTS pipeline.
// Encryption is active only when CTRL.crypt_en is set and both keys have
// been expanded; otherwise the bridge is transparent.  In addition each
// direction needs a cipher context, set by a read/write command (or DMA
// Setup) and dropped by any other command, so that e.g. IDENTIFY DEVICE data
// passes in clear (this design's own rule; the document only requires the
// drive to be detected through the bridge).
module inline_crypt_bridge
  import xts_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH        = 4096,
  parameter int unsigned BLOCKS_PER_SECTOR = SECTOR_BYTES / BLOCK_BYTES,
  parameter int unsigned TFIFO_DEPTH       = 4,
  parameter int unsigned NCQ_TAGS          = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor bus
  input  logic        reg_we,
  input  logic [7:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // PC-side link layer
  input  logic        h_rx_req,
  output logic        h_rx_ack,
  input  logic        h_rx_valid,
  output logic        h_rx_ready,
  input  fis_word_t   h_rx_word,
  output logic        h_rx_done,
  output logic        h_rx_ok,
  output logic        h_tx_req,
  input  logic        h_tx_rdy,
  output logic        h_tx_valid,
  input  logic        h_tx_ready,
  output fis_word_t   h_tx_word,
  input  logic        h_tx_done,
  input  logic        h_tx_ok,
  // SSD-side link layer
  input  logic        d_rx_req,
  output logic        d_rx_ack,
  input  logic        d_rx_valid,
  output logic        d_rx_ready,
  input  fis_word_t   d_rx_word,
  output logic        d_rx_done,
  output logic        d_rx_ok,
  output logic        d_tx_req,
  input  logic        d_tx_rdy,
  output logic        d_tx_valid,
  input  logic        d_tx_ready,
  output fis_word_t   d_tx_word,
  input  logic        d_tx_done,
  input  logic        d_tx_ok
);

  // ------------------------------------------------ processor registers, keys
  key256_t     key1, key2;
  logic        key_load, crypt_en, k1_ready, k2_ready, keys_ready, crypt_on;
  round_keys_t rk1, rk2;
  logic [9:0]  events;
  logic        busy;

  ctrl_regs u_regs (
    .clk, .rst_n, .reg_we, .reg_addr, .reg_wdata, .reg_rdata,
    .key1, .key2, .key_load, .crypt_en,
    .keys_ready, .bridge_busy(busy), .events
  );

  aes256_key_expand u_kx1 (.clk, .rst_n, .start(key_load), .key(key1), .rk(rk1), .ready(k1_ready));
  aes256_key_expand u_kx2 (.clk, .rst_n, .start(key_load), .key(key2), .rk(rk2), .ready(k2_ready));

  assign keys_ready = k1_ready && k2_ready;
  assign crypt_on   = crypt_en && keys_ready;

  // ------------------------------------------------ sector number tracking
  logic      enc_in_ready, dec_in_ready;
  logic      wr_seq_start, rd_seq_start, seq_stop, ev_command, ev_ncq_setup;
  lba_t      wr_lba, rd_lba;
  logic      wr_ctx, rd_ctx, wr_crypt, rd_crypt, enc_nctx, dec_nctx;

  lba_tracker #(.NCQ_TAGS(NCQ_TAGS)) u_lba (
    .clk, .rst_n,
    .h2d_valid(h_rx_valid && enc_in_ready), .h2d_word(h_rx_word),
    .d2h_valid(d_rx_valid && dec_in_ready), .d2h_word(d_rx_word),
    .wr_seq_start, .wr_lba, .rd_seq_start, .rd_lba, .seq_stop, .ev_command, .ev_ncq_setup
  );

  // Cipher context per direction: set by a read/write command (or DMA Setup),
  // dropped by any other command, whose data (IDENTIFY, SMART, ...) is not
  // sector data and passes in clear.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ctx <= 1'b0;
      rd_ctx <= 1'b0;
    end else begin
      if (wr_seq_start)  wr_ctx <= 1'b1;
      else if (seq_stop) wr_ctx <= 1'b0;
      if (rd_seq_start)  rd_ctx <= 1'b1;
      else if (seq_stop) rd_ctx <= 1'b0;
    end
  end

  assign wr_crypt = crypt_on && wr_ctx;
  assign rd_crypt = crypt_on && rd_ctx;
  // Data FIS that pass in clear for lack of a context while encryption is on
  assign enc_nctx = crypt_on && !wr_ctx && h_rx_valid && enc_in_ready && h_rx_word.sof &&
                    h_rx_word.data[7:0] == FIS_DATA;
  assign dec_nctx = crypt_on && !rd_ctx && d_rx_valid && dec_in_ready && d_rx_word.sof &&
                    d_rx_word.data[7:0] == FIS_DATA;

  // ------------------------------------------------ cipher paths
  logic      b_h_valid, b_h_ready, b_d_valid, b_d_ready;
  fis_word_t b_h_word, b_d_word;
  logic      enc_blk, enc_clear, enc_stall, dec_blk, dec_clear, dec_stall;

  fis_xts_path #(
    .DECRYPT(1'b0), .BLOCKS_PER_SECTOR(BLOCKS_PER_SECTOR), .TFIFO_DEPTH(TFIFO_DEPTH)
  ) u_encrypt (
    .clk, .rst_n, .crypt_en(wr_crypt), .rk1, .rk2,
    .seq_start(wr_seq_start), .seq_lba(wr_lba),
    .in_valid(h_rx_valid), .in_ready(enc_in_ready), .in_word(h_rx_word),
    .out_valid(b_h_valid), .out_ready(b_h_ready), .out_word(b_h_word),
    .ev_block(enc_blk), .ev_clear_fis(enc_clear), .ev_stall(enc_stall)
  );

  fis_xts_path #(
    .DECRYPT(1'b1), .BLOCKS_PER_SECTOR(BLOCKS_PER_SECTOR), .TFIFO_DEPTH(TFIFO_DEPTH)
  ) u_decrypt (
    .clk, .rst_n, .crypt_en(rd_crypt), .rk1, .rk2,
    .seq_start(rd_seq_start), .seq_lba(rd_lba),
    .in_valid(d_rx_valid), .in_ready(dec_in_ready), .in_word(d_rx_word),
    .out_valid(b_d_valid), .out_ready(b_d_ready), .out_word(b_d_word),
    .ev_block(dec_blk), .ev_clear_fis(dec_clear), .ev_stall(dec_stall)
  );

  assign h_rx_ready = enc_in_ready;
  assign d_rx_ready = dec_in_ready;

  // ------------------------------------------------ bridge
  logic ev_collision, ev_d2h_frame, ev_h2d_frame, ev_frame_err;

  bridge_data #(.FIFO_DEPTH(FIFO_DEPTH)) u_bridge (
    .clk, .rst_n,
    .h_rx_req, .h_rx_ack, .h_rx_valid(b_h_valid), .h_rx_ready(b_h_ready), .h_rx_word(b_h_word),
    .h_rx_done, .h_rx_ok,
    .h_tx_req, .h_tx_rdy, .h_tx_valid, .h_tx_ready, .h_tx_word, .h_tx_done, .h_tx_ok,
    .d_rx_req, .d_rx_ack, .d_rx_valid(b_d_valid), .d_rx_ready(b_d_ready), .d_rx_word(b_d_word),
    .d_rx_done, .d_rx_ok,
    .d_tx_req, .d_tx_rdy, .d_tx_valid, .d_tx_ready, .d_tx_word, .d_tx_done, .d_tx_ok,
    .busy, .ev_collision, .ev_d2h_frame, .ev_h2d_frame, .ev_frame_err
  );

  assign events = {ev_ncq_setup, ev_command, enc_clear || dec_clear || enc_nctx || dec_nctx, enc_stall || dec_stall, ev_collision,
                   ev_frame_err, ev_d2h_frame, ev_h2d_frame, dec_blk, enc_blk};

endmodule
