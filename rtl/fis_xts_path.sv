// fis_xts_path: the "Encrypt XTS-mode" / "Decrypt XTS-mode" unit that sits
// between one SATA link layer and the bridge, on the stream of received FIS.
//
// Every FIS passes through unchanged except the payload of a Data FIS
// (type 0x46), which is enciphered (DECRYPT = 0, the PC-to-SSD path) or
// deciphered (DECRYPT = 1, the SSD-to-PC path) with XTS-AES-256 when
// `crypt_en` is set and a command has given the sector number of the data
// (seq_active of the tweak generator).  Otherwise the Data FIS goes through in
// clear, which is the document's non-encrypted test mode.
//
// How it works: a small parser follows the FIS boundaries (sof/eof).  The
// header dword and all other FIS are forwarded directly, but only while no
// ciphered block is still inside the pipeline, so the order of dwords is
// kept.  Payload dwords are packed four at a time into a 128-bit block
// (payload byte 0 = bits [7:0] of the first dword = AES byte 0), sent through
// xts_core (16 clocks), and unpacked again into dwords; the eof mark travels
// with its block.  Consecutive blocks of a command use consecutive tweaks and
// every 32 blocks (512 bytes) the next sector number.  A payload that ends
// with 1-3 dwords short of a block sends that remainder through the pipeline
// as a bypass block, i.e. in clear (ciphertext stealing is not implemented;
// sector data always comes in whole 16-byte blocks).  The packing, ordering
// and the handling of short payloads are this design's choices.
//
// Interface: in_* and out_* are valid/ready streams of fis_word_t.  One
// dword per clock in steady state (32 bits at 150 MHz is the 600 MB/s of
// SATA 3).  ev_block pulses for each ciphered block, ev_clear_fis for a Data
// FIS forwarded in clear while crypt_en is set, ev_stall while a block waits
// for its tweak.
module fis_xts_path
  import xts_pkg::*;
#(
  parameter bit          DECRYPT           = 1'b0,
  parameter int unsigned BLOCKS_PER_SECTOR = SECTOR_BYTES / BLOCK_BYTES,
  parameter int unsigned TFIFO_DEPTH       = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        crypt_en,
  input  round_keys_t rk1,
  input  round_keys_t rk2,
  input  logic        seq_start,
  input  lba_t        seq_lba,
  input  logic        in_valid,
  output logic        in_ready,
  input  fis_word_t   in_word,
  output logic        out_valid,
  input  logic        out_ready,
  output fis_word_t   out_word,
  output logic        ev_block,
  output logic        ev_clear_fis,
  output logic        ev_stall
);

  typedef enum logic [1:0] {S_IDLE, S_PASS, S_PAYLOAD} state_t;
  state_t state;

  // tag carried through the core: {eof, number of dwords - 1}
  localparam int unsigned TAG_W = 3;

  function automatic dword_t bswap(input dword_t d);
    return {d[7:0], d[15:8], d[23:16], d[31:24]};
  endfunction

  // ---------------------------------------------------------------- core
  logic             c_in_valid, c_in_ready, c_bypass;
  block_t           c_in_data;
  logic [TAG_W-1:0] c_in_tag;
  logic             c_out_valid, c_out_ready;
  block_t           c_out_data;
  logic [TAG_W-1:0] c_out_tag;
  logic             seq_active;

  xts_core #(
    .DECRYPT          (DECRYPT),
    .TAG_W            (TAG_W),
    .BLOCKS_PER_SECTOR(BLOCKS_PER_SECTOR),
    .TFIFO_DEPTH      (TFIFO_DEPTH)
  ) u_core (
    .clk, .rst_n, .rk1, .rk2, .seq_start, .seq_lba, .seq_active,
    .in_valid(c_in_valid), .in_ready(c_in_ready), .in_data(c_in_data),
    .in_tag(c_in_tag), .in_bypass(c_bypass),
    .out_valid(c_out_valid), .out_ready(c_out_ready), .out_data(c_out_data),
    .out_tag(c_out_tag), .tweak_stall(ev_stall)
  );

  // ---------------------------------------------------------------- unpacker
  logic       u_busy, u_last;
  block_t     u_blk;
  logic [1:0] u_idx, u_num;
  logic       u_eof;

  assign u_last      = (u_idx == u_num);
  assign c_out_ready = !u_busy || (out_ready && u_last);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_busy <= 1'b0;
      u_blk  <= '0;
      u_idx  <= '0;
      u_num  <= '0;
      u_eof  <= 1'b0;
    end else begin
      if (c_out_valid && c_out_ready) begin
        u_busy <= 1'b1;
        u_blk  <= c_out_data;
        u_idx  <= '0;
        u_num  <= c_out_tag[1:0];
        u_eof  <= c_out_tag[2];
      end else if (u_busy && out_ready) begin
        if (u_last) u_busy <= 1'b0;
        else        u_idx  <= u_idx + 2'd1;
      end
    end
  end

  // blocks inside the core
  logic [5:0] inflight;
  logic       pipe_empty;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else inflight <= inflight + 6'(c_in_valid && c_in_ready) - 6'(c_out_valid && c_out_ready);
  end
  assign pipe_empty = (inflight == '0) && !u_busy;

  // ---------------------------------------------------------------- parser
  dword_t     g_buf [3];
  logic [1:0] g_cnt;
  logic       g_done;    // this payload dword completes a block
  logic       fwd;       // direct forwarding of the current input dword
  logic       is_data_hdr;

  assign is_data_hdr = in_word.sof && (in_word.data[7:0] == FIS_DATA);
  assign g_done      = (g_cnt == 2'd3) || in_word.eof;
  assign fwd         = (state != S_PAYLOAD);

  always_comb begin
    c_in_data = '0;
    for (int w = 0; w < 3; w++)
      if (w < int'(g_cnt)) c_in_data[127-32*w -: 32] = bswap(g_buf[w]);
    c_in_data[127-32*int'(g_cnt) -: 32] = bswap(in_word.data);
  end
  assign c_in_tag   = {in_word.eof, g_cnt};
  assign c_bypass   = (g_cnt != 2'd3);
  assign c_in_valid = (state == S_PAYLOAD) && in_valid && g_done;

  always_comb begin
    if (u_busy) begin
      out_valid     = 1'b1;
      out_word.sof  = 1'b0;
      out_word.eof  = u_eof && u_last;
      out_word.data = bswap(u_blk[127-32*int'(u_idx) -: 32]);
    end else begin
      out_valid = fwd && in_valid && pipe_empty;
      out_word  = in_word;
    end
    if (fwd)         in_ready = out_ready && pipe_empty;
    else if (g_done) in_ready = c_in_ready;
    else             in_ready = 1'b1;
  end

  assign ev_block     = c_in_valid && c_in_ready && !c_bypass;
  assign ev_clear_fis = fwd && in_valid && in_ready && (state == S_IDLE) && is_data_hdr &&
                        !in_word.eof && crypt_en && !seq_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      g_cnt <= '0;
      for (int w = 0; w < 3; w++) g_buf[w] <= '0;
    end else if (in_valid && in_ready) begin
      case (state)
        S_IDLE: begin
          g_cnt <= '0;
          if (!in_word.eof)
            state <= (is_data_hdr && crypt_en && seq_active) ? S_PAYLOAD : S_PASS;
        end
        S_PASS: if (in_word.eof) state <= S_IDLE;
        default: begin
          if (g_done) begin
            g_cnt <= '0;
            if (in_word.eof) state <= S_IDLE;
          end else begin
            g_buf[g_cnt] <= in_word.data;
            g_cnt        <= g_cnt + 2'd1;
          end
        end
      endcase
    end
  end

endmodule
