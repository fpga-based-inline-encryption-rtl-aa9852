// aes256_key_expand: AES-256 key expansion (FIPS-197) for one key.
//
// The keys of the bridge are static while it runs (the processor loads them
// at start-up), so the expansion is done once, iteratively, and the 15 round
// keys are then held in registers for the unrolled round pipeline.  Round
// keys 0 and 1 are the two halves of the key; each further round key is made
// in one clock from the two before it: for even index i the last word of the
// previous round key goes through RotWord, SubWord and Rcon = 2^(i/2-1), for
// odd index through SubWord only.
//
// Interface: a one-cycle `start` samples `key`; `ready` falls at once and
// rises 14 clocks later (one to load, 13 to compute round keys 2..14; this
// timing is this design's choice), from then on
// `rk` holds the round keys.  After reset `ready` is 0.
module aes256_key_expand
  import xts_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  key256_t     key,
  output round_keys_t rk,
  output logic        ready
);

  logic [3:0] idx;      // index of the round key made next
  logic       busy;

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  block_t prev2, next_rk;
  logic [31:0] last_w;   // last word of the previous round key
  logic [31:0] temp, w0, w1, w2, w3;
  logic [7:0]  rcon;

  always_comb begin
    prev2 = rk[idx - 4'd2];
    last_w = rk[idx - 4'd1][31:0];
    rcon  = 8'h01 << (idx[3:1] - 3'd1);
    if (!idx[0]) temp = sub_word({last_w[23:0], last_w[31:24]}) ^ {rcon, 24'h0};
    else         temp = sub_word(last_w);
    w0 = prev2[127:96] ^ temp;
    w1 = prev2[95:64]  ^ w0;
    w2 = prev2[63:32]  ^ w1;
    w3 = prev2[31:0]   ^ w2;
    next_rk = {w0, w1, w2, w3};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rk    <= '0;
      idx   <= 4'd2;
      busy  <= 1'b0;
      ready <= 1'b0;
    end else if (start) begin
      rk[0] <= key[255:128];
      rk[1] <= key[127:0];
      idx   <= 4'd2;
      busy  <= 1'b1;
      ready <= 1'b0;
    end else if (busy) begin
      rk[idx] <= next_rk;
      if (idx == 4'(AES256_ROUNDS)) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end else begin
        idx <= idx + 4'd1;
      end
    end
  end

endmodule
