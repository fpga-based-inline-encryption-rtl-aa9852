// xts_pkg: types, constants and pure functions shared by the AES-XTS inline
// encryption bridge.
//
// Byte order: a 128-bit AES block is held with byte 0 in bits [127:120]
// (the order in which AES test vectors are written).  The XTS tweak is a
// little-endian number in GF(2^128) (byte 0 is the least significant), so the
// alpha multiplication byte-swaps, shifts and swaps back.
//
// The AES S-box and its inverse are not typed in as tables: they are computed
// at elaboration from the definition (multiplicative inverse in GF(2^8) with
// the polynomial x^8+x^4+x^3+x+1, followed by the affine transform with
// constant 0x63).
//
// SATA constants (FIS types, ATA command codes) are the values of the SATA
// and ATA standards; the document names the FIS but does not list them.
package xts_pkg;

  typedef logic [127:0] block_t;
  typedef logic [255:0] key256_t;
  typedef logic [31:0]  dword_t;
  typedef logic [47:0]  lba_t;

  localparam int unsigned AES256_ROUNDS = 14;   // stages of the round pipeline
  localparam int unsigned SECTOR_BYTES  = 512;  // SATA sector
  localparam int unsigned BLOCK_BYTES   = 16;

  // Round keys of AES-256, index 0 = initial AddRoundKey.
  typedef block_t [AES256_ROUNDS:0] round_keys_t;

  // One dword of a FIS on a link-layer interface.
  typedef struct packed {
    logic   sof;   // first dword of a FIS
    logic   eof;   // last dword of a FIS
    dword_t data;
  } fis_word_t;

  // FIS types (SATA 3.x, Serial ATA transport layer)
  localparam logic [7:0] FIS_REG_H2D   = 8'h27;
  localparam logic [7:0] FIS_REG_D2H   = 8'h34;
  localparam logic [7:0] FIS_DMA_ACT   = 8'h39;
  localparam logic [7:0] FIS_DMA_SETUP = 8'h41;
  localparam logic [7:0] FIS_DATA      = 8'h46;
  localparam logic [7:0] FIS_PIO_SETUP = 8'h5F;
  localparam logic [7:0] FIS_SDB       = 8'hA1;

  // ATA commands that move sector data
  localparam logic [7:0] ATA_READ_DMA       = 8'hC8;
  localparam logic [7:0] ATA_WRITE_DMA      = 8'hCA;
  localparam logic [7:0] ATA_READ_DMA_EXT   = 8'h25;
  localparam logic [7:0] ATA_WRITE_DMA_EXT  = 8'h35;
  localparam logic [7:0] ATA_READ_FPDMA_Q   = 8'h60;
  localparam logic [7:0] ATA_WRITE_FPDMA_Q  = 8'h61;

  // ---------------------------------------------------------------- GF(2^8)
  function automatic logic [7:0] xtime(input logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  // S-box entry computed from its definition
  function automatic logic [7:0] sbox_calc(input logic [7:0] a);
    logic [7:0] inv, r;
    logic [7:0] sq;
    // inverse as a^254 (a^-1 for a != 0, and 0 for a == 0)
    inv = 8'h01;
    sq  = a;
    for (int i = 1; i < 8; i++) begin
      sq  = gmul(sq, sq);     // a^(2^i)
      inv = gmul(inv, sq);    // product over i=1..7 gives a^254
    end
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  typedef logic [7:0] byte_table_t [256];

  function automatic byte_table_t make_sbox();
    byte_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(8'(i));
    return t;
  endfunction

  function automatic byte_table_t make_inv_sbox();
    byte_table_t t, s;
    s = make_sbox();
    for (int i = 0; i < 256; i++) t[s[i]] = 8'(i);
    return t;
  endfunction

  localparam byte_table_t SBOX     = make_sbox();
  localparam byte_table_t INV_SBOX = make_inv_sbox();

  // ---------------------------------------------------------------- AES round
  // State byte n of a block sits in bits [127-8n -: 8]; column c holds bytes
  // 4c..4c+3 (row r = n mod 4).
  function automatic block_t sub_bytes(input block_t s);
    block_t r;
    for (int n = 0; n < 16; n++) r[127-8*n -: 8] = SBOX[s[127-8*n -: 8]];
    return r;
  endfunction

  function automatic block_t inv_sub_bytes(input block_t s);
    block_t r;
    for (int n = 0; n < 16; n++) r[127-8*n -: 8] = INV_SBOX[s[127-8*n -: 8]];
    return r;
  endfunction

  // row r is rotated left by r bytes
  function automatic block_t shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127-8*(4*c+row) -: 8] = s[127-8*(4*((c+row)%4)+row) -: 8];
    return r;
  endfunction

  function automatic block_t inv_shift_rows(input block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int row = 0; row < 4; row++)
        r[127-8*(4*((c+row)%4)+row) -: 8] = s[127-8*(4*c+row) -: 8];
    return r;
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t r;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = s[127-8*(4*c+0) -: 8];
      a1 = s[127-8*(4*c+1) -: 8];
      a2 = s[127-8*(4*c+2) -: 8];
      a3 = s[127-8*(4*c+3) -: 8];
      r[127-8*(4*c+0) -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      r[127-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      r[127-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      r[127-8*(4*c+3) -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  function automatic block_t inv_mix_columns(input block_t s);
    block_t r;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = s[127-8*(4*c+0) -: 8];
      a1 = s[127-8*(4*c+1) -: 8];
      a2 = s[127-8*(4*c+2) -: 8];
      a3 = s[127-8*(4*c+3) -: 8];
      r[127-8*(4*c+0) -: 8] = gmul(a0,8'h0e) ^ gmul(a1,8'h0b) ^ gmul(a2,8'h0d) ^ gmul(a3,8'h09);
      r[127-8*(4*c+1) -: 8] = gmul(a0,8'h09) ^ gmul(a1,8'h0e) ^ gmul(a2,8'h0b) ^ gmul(a3,8'h0d);
      r[127-8*(4*c+2) -: 8] = gmul(a0,8'h0d) ^ gmul(a1,8'h09) ^ gmul(a2,8'h0e) ^ gmul(a3,8'h0b);
      r[127-8*(4*c+3) -: 8] = gmul(a0,8'h0b) ^ gmul(a1,8'h0d) ^ gmul(a2,8'h09) ^ gmul(a3,8'h0e);
    end
    return r;
  endfunction

  // ---------------------------------------------------------------- XTS
  function automatic block_t byte_swap(input block_t b);
    block_t r;
    for (int n = 0; n < 16; n++) r[8*n +: 8] = b[127-8*n -: 8];
    return r;
  endfunction

  // Tweak convert: the sector number as a 16-byte little-endian value.
  function automatic block_t lba_to_tweak(input logic [63:0] lba);
    return byte_swap({64'h0, lba});
  endfunction

  // Multiplication by alpha, Eq. (1): each byte shifted left by one with the
  // carry from the byte below; the carry out of byte 15 folds back into
  // byte 0 as 135 (0x87).
  function automatic block_t alpha_mul(input block_t t);
    block_t le;
    le = byte_swap(t);
    le = {le[126:0], 1'b0} ^ (le[127] ? 128'h87 : 128'h0);
    return byte_swap(le);
  endfunction

endpackage
