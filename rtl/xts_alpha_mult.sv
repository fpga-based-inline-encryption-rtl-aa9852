// xts_alpha_mult: multiplication of an XTS tweak by the primitive element
// alpha of GF(2^128) (the "Alpha mult" box of the XTS data path).
//
// Follows the document's Eq. (1): viewed as bytes a[0..15] (a[0] is the
// first byte of the block), every byte is doubled and takes the top bit of
// the byte below as its new low bit; the top bit of a[15] is folded back into
// a[0] as 135 (0x87), the reduction by x^128 + x^7 + x^2 + x + 1.  Purely
// combinational: one shift and one conditional XOR.  Only byte a[0]
// takes the 0x87 feedback; the other 120 output bits are input bits wired
// to a new position, with no gate at all.
//
// Interface: t_in, t_out are blocks with byte 0 in bits [127:120].
module xts_alpha_mult
  import xts_pkg::*;
(
  input  block_t t_in,
  output block_t t_out
);

  logic [7:0] a [16];
  logic [7:0] b [16];

  always_comb begin
    for (int l = 0; l < 16; l++) a[l] = t_in[127-8*l -: 8];
    b[0] = {a[0][6:0], 1'b0} ^ (a[15][7] ? 8'd135 : 8'd0);
    for (int l = 1; l < 16; l++) b[l] = {a[l][6:0], a[l-1][7]};
    for (int l = 0; l < 16; l++) t_out[127-8*l -: 8] = b[l];
  end

endmodule
