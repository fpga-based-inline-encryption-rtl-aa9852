// xts_core: XTS-AES-256 block pipeline for one direction (IEEE Std 1619).
//
// Encryption (DECRYPT = 0):  C = E_K1(P xor T) xor T
// Decryption (DECRYPT = 1):  P = D_K1(C xor T) xor T
// where T is the tweak of the block from xts_tweak_gen (sector number
// encrypted with Key2, then multiplied by alpha once per block).
//
// Structure: an input register holding (data xor T) and T, the 14-stage
// AES-256 pipeline with Key1 (aes256_enc_pipe or aes256_dec_pipe), which
// carries T beside each block, and an output register that applies the
// second XOR.  Latency is 16 clocks from acceptance to out_valid, one block
// per clock.  All stages advance together while the output register is empty
// or being read (out_ready), so back-pressure freezes the whole pipeline.
// The pre/post XOR with the same tweak, the 14 round stages and the tweak
// path are the document's; the stage registers around the XORs, the
// handshake, and the per-block `in_bypass` (block travels in the tweak slot
// and leaves unchanged, used for data that is not to be ciphered) are this
// design's own.
//
// Interface: in_valid/in_ready/in_data/in_tag/in_bypass (valid-ready),
// out_valid/out_ready/out_data/out_tag.  A ciphered block is accepted only
// when its tweak is ready; `tweak_stall` flags a cycle in which a ciphered
// block waits for its tweak.
module xts_core
  import xts_pkg::*;
#(
  parameter bit          DECRYPT           = 1'b0,
  parameter int unsigned TAG_W             = 1,
  parameter int unsigned BLOCKS_PER_SECTOR = SECTOR_BYTES / BLOCK_BYTES,
  parameter int unsigned TFIFO_DEPTH       = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  round_keys_t      rk1,
  input  round_keys_t      rk2,
  input  logic             seq_start,
  input  lba_t             seq_lba,
  output logic             seq_active,
  input  logic             in_valid,
  output logic             in_ready,
  input  block_t           in_data,
  input  logic [TAG_W-1:0] in_tag,
  input  logic             in_bypass,
  output logic             out_valid,
  input  logic             out_ready,
  output block_t           out_data,
  output logic [TAG_W-1:0] out_tag,
  output logic             tweak_stall
);

  localparam int unsigned SIDE_W = 1 + TAG_W + 128;   // bypass, tag, tweak

  logic   en;
  block_t tweak;
  logic   tweak_valid, take;

  assign en          = !out_valid || out_ready;
  assign in_ready    = en && (in_bypass || tweak_valid);
  assign take        = in_valid && in_ready && !in_bypass;
  assign tweak_stall = in_valid && !in_bypass && !tweak_valid;

  xts_tweak_gen #(
    .BLOCKS_PER_SECTOR(BLOCKS_PER_SECTOR),
    .TFIFO_DEPTH      (TFIFO_DEPTH)
  ) u_tweak (
    .clk, .rst_n, .rk2, .seq_start, .seq_lba, .seq_active,
    .tweak, .tweak_valid, .take
  );

  // input stage: first XOR
  logic              a_valid;
  block_t            a_data;
  logic [SIDE_W-1:0] a_side;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0;
      a_data  <= '0;
      a_side  <= '0;
    end else if (en) begin
      a_valid <= in_valid && in_ready;
      a_data  <= in_data ^ tweak;
      a_side  <= {in_bypass, in_tag, in_bypass ? in_data : tweak};
    end
  end

  // AES-256 with Key1
  logic              c_valid;
  block_t            c_data;
  logic [SIDE_W-1:0] c_side;

  if (DECRYPT) begin : g_dec
    aes256_dec_pipe #(.TAG_W(SIDE_W)) u_aes (
      .clk, .rst_n, .en, .rk(rk1),
      .in_valid(a_valid), .in_data(a_data), .in_tag(a_side),
      .out_valid(c_valid), .out_data(c_data), .out_tag(c_side)
    );
  end else begin : g_enc
    aes256_enc_pipe #(.TAG_W(SIDE_W)) u_aes (
      .clk, .rst_n, .en, .rk(rk1),
      .in_valid(a_valid), .in_data(a_data), .in_tag(a_side),
      .out_valid(c_valid), .out_data(c_data), .out_tag(c_side)
    );
  end

  // output stage: second XOR
  logic   c_bypass;
  block_t c_tweak;
  assign c_bypass = c_side[SIDE_W-1];
  assign c_tweak  = c_side[127:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      out_tag   <= '0;
    end else if (en) begin
      out_valid <= c_valid;
      out_data  <= c_bypass ? c_tweak : (c_data ^ c_tweak);
      out_tag   <= c_side[128 +: TAG_W];
    end
  end

endmodule
