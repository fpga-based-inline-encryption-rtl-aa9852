// aes256_dec_pipe: AES-256 decryption (inverse cipher), fully unrolled and
// pipelined.
//
// Mirror of aes256_enc_pipe for the read path.  The first AddRoundKey uses
// round key 14; stage k (k = 1..14) applies InvShiftRows, InvSubBytes and
// AddRoundKey with round key 14-k, then InvMixColumns except in the last
// stage, and is followed by a register.  A block enters every clock and
// leaves 14 clocks later.  The document gives the decryption pipeline only by
// name and function ("Decrypt ECB Pipeline"); the straightforward inverse
// cipher with the encryption round keys used in reverse order is this
// design's choice, as are `en` and the `tag` sideband.
//
// Interface: identical to aes256_enc_pipe.
module aes256_dec_pipe
  import xts_pkg::*;
#(
  parameter int unsigned TAG_W = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  round_keys_t      rk,
  input  logic             in_valid,
  input  block_t           in_data,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output block_t           out_data,
  output logic [TAG_W-1:0] out_tag
);

  block_t           st  [AES256_ROUNDS+1];
  logic             vld [AES256_ROUNDS+1];
  logic [TAG_W-1:0] tag [AES256_ROUNDS+1];

  assign st[0]  = in_data ^ rk[AES256_ROUNDS];
  assign vld[0] = in_valid;
  assign tag[0] = in_tag;

  for (genvar k = 1; k <= AES256_ROUNDS; k++) begin : g_round
    block_t nxt;
    always_comb begin
      nxt = inv_sub_bytes(inv_shift_rows(st[k-1])) ^ rk[AES256_ROUNDS-k];
      if (k != AES256_ROUNDS) nxt = inv_mix_columns(nxt);
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[k]  <= '0;
        vld[k] <= 1'b0;
        tag[k] <= '0;
      end else if (en) begin
        st[k]  <= nxt;
        vld[k] <= vld[k-1];
        tag[k] <= tag[k-1];
      end
    end
  end

  assign out_valid = vld[AES256_ROUNDS];
  assign out_data  = st[AES256_ROUNDS];
  assign out_tag   = tag[AES256_ROUNDS];

endmodule
