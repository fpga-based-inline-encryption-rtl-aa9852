// aes256_enc_pipe: AES-256 encryption, fully unrolled and pipelined.
//
// Each of the 14 AES-256 rounds (SubBytes, ShiftRows, MixColumns and
// AddRoundKey; the last round without MixColumns) is one pipeline stage
// followed by a register, so a new 128-bit block can enter every clock and
// leaves 14 clocks later.  The initial AddRoundKey with round key 0 is
// combinational in front of the first round.  This structure and the stage
// count are the document's; the `en` input, which freezes every stage at once
// when the consumer cannot take a result, and the `tag` sideband carried
// along with each block are this design's own.
//
// Interface: in_valid/in_data/in_tag are sampled when en=1; out_valid,
// out_data and out_tag are the registered output of round 14.  rk holds the
// 15 round keys (from aes256_key_expand) and must be stable while blocks are
// in flight.
module aes256_enc_pipe
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

  assign st[0]  = in_data ^ rk[0];
  assign vld[0] = in_valid;
  assign tag[0] = in_tag;

  for (genvar k = 1; k <= AES256_ROUNDS; k++) begin : g_round
    block_t nxt;
    always_comb begin
      nxt = shift_rows(sub_bytes(st[k-1]));
      if (k != AES256_ROUNDS) nxt = mix_columns(nxt);
      nxt = nxt ^ rk[k];
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
