// xts_ref_pkg: behavioural reference model of AES-256 and XTS-AES-256 for
// the testbenches.  Written independently of the RTL: the state is a 4x4
// byte matrix, the S-box is found by brute-force inversion in GF(2^8), the
// key schedule works on 32-bit words w[0..59], and the XTS tweak is kept as a
// 128-bit little-endian integer.  Blocks use byte 0 in bits [127:120].
package xts_ref_pkg;

  typedef logic [7:0] st_t [4][4];   // [row][col]

  function automatic logic [7:0] m2(input logic [7:0] b);
    return (b << 1) ^ ((b & 8'h80) != 0 ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r = 0;
    logic [7:0] x = a;
    logic [7:0] y = b;
    while (y != 0) begin
      if (y[0]) r ^= x;
      x = m2(x);
      y = y >> 1;
    end
    return r;
  endfunction

  function automatic logic [7:0] sb(input logic [7:0] a);
    logic [7:0] inv = 0, s;
    for (int c = 1; c < 256; c++) if (mul(a, 8'(c)) == 1) inv = 8'(c);
    s = inv;
    for (int k = 1; k <= 4; k++) s ^= (inv << k) | (inv >> (8 - k));
    return s ^ 8'h63;
  endfunction

  logic [7:0] SB [256];
  logic [7:0] ISB [256];
  bit ready = 0;

  function automatic void init();
    if (ready) return;
    for (int i = 0; i < 256; i++) begin
      SB[i] = sb(8'(i));
      ISB[SB[i]] = 8'(i);
    end
    ready = 1;
  endfunction

  function automatic void expand(input logic [255:0] key, output logic [127:0] rk [15]);
    logic [31:0] w [60];
    logic [31:0] t;
    logic [7:0]  rc = 1;
    init();
    for (int i = 0; i < 8; i++) w[i] = key[255-32*i -: 32];
    for (int i = 8; i < 60; i++) begin
      t = w[i-1];
      if (i % 8 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {SB[t[31:24]], SB[t[23:16]], SB[t[15:8]], SB[t[7:0]]} ^ {rc, 24'h0};
        rc = m2(rc);
      end else if (i % 8 == 4) begin
        t = {SB[t[31:24]], SB[t[23:16]], SB[t[15:8]], SB[t[7:0]]};
      end
      w[i] = w[i-8] ^ t;
    end
    for (int r = 0; r < 15; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic st_t to_st(input logic [127:0] b);
    st_t s;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) s[r][c] = b[127-8*(4*c+r) -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(input st_t s);
    logic [127:0] b;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) b[127-8*(4*c+r) -: 8] = s[r][c];
    return b;
  endfunction

  function automatic logic [127:0] aes_enc(input logic [255:0] key, input logic [127:0] pt);
    logic [127:0] rk [15];
    st_t s, t;
    expand(key, rk);
    s = to_st(pt ^ rk[0]);
    for (int rnd = 1; rnd <= 14; rnd++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[r][c] = SB[s[r][(c + r) % 4]];
      if (rnd < 14)
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            s[r][c] = mul(t[r][c], 2) ^ mul(t[(r+1)%4][c], 3) ^ t[(r+2)%4][c] ^ t[(r+3)%4][c];
      else s = t;
      s = to_st(from_st(s) ^ rk[rnd]);
    end
    return from_st(s);
  endfunction

  function automatic logic [127:0] aes_dec(input logic [255:0] key, input logic [127:0] ct);
    logic [127:0] rk [15];
    st_t s, t;
    expand(key, rk);
    s = to_st(ct);
    for (int rnd = 14; rnd >= 1; rnd--) begin
      s = to_st(from_st(s) ^ rk[rnd]);
      if (rnd < 14) begin
        t = s;
        for (int c = 0; c < 4; c++)
          for (int r = 0; r < 4; r++)
            s[r][c] = mul(t[r][c], 14) ^ mul(t[(r+1)%4][c], 11) ^ mul(t[(r+2)%4][c], 13) ^ mul(t[(r+3)%4][c], 9);
      end
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[r][(c + r) % 4] = ISB[s[r][c]];
      s = t;
    end
    return from_st(s) ^ rk[0];
  endfunction

  function automatic logic [127:0] rev16(input logic [127:0] b);
    logic [127:0] r;
    for (int i = 0; i < 16; i++) r[8*i +: 8] = b[127-8*i -: 8];
    return r;
  endfunction

  // XTS-AES-256 on block j of sector `sector`
  function automatic logic [127:0] xts(input bit dec, input logic [255:0] k1, input logic [255:0] k2,
                                       input logic [63:0] sector, input int j, input logic [127:0] d);
    logic [127:0] tle;   // tweak as a little-endian integer
    logic [127:0] t;
    tle = rev16(aes_enc(k2, rev16({64'h0, sector})));
    for (int i = 0; i < j; i++) tle = (tle << 1) ^ (tle[127] ? 128'h87 : 128'h0);
    t = rev16(tle);
    return (dec ? aes_dec(k1, d ^ t) : aes_enc(k1, d ^ t)) ^ t;
  endfunction

endpackage
