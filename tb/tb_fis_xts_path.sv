// tb_fis_xts_path: self-checking test of the FIS-level XTS unit.
// An encrypting and a decrypting instance each receive a sequence of FIS
// (register FIS, Data FIS of one and two sectors, a Data FIS with a short
// tail, a Data FIS before any command, one with encryption switched off)
// with random input gaps and random output back-pressure.  The expected
// output stream is built with the reference model: header and non-data FIS
// unchanged, payload blocks XTS-ciphered with consecutive tweaks starting at
// the commanded sector, short tails in clear.  Also checks one dword per
// clock through the unit and counts each mechanism.
module tb_fis_xts_path;
  import xts_pkg::*;
  import xts_ref_pkg::*;

  logic clk = 0, rst_n = 0, crypt_en = 0, seq_start = 0;
  lba_t seq_lba = '0;
  round_keys_t rk1, rk2;
  logic [255:0] k1, k2;
  int checks = 0, failures = 0;

  logic      in_valid [2], in_ready [2], out_valid [2], out_ready [2];
  fis_word_t in_word [2], out_word [2];
  logic      ev_block [2], ev_clear [2], ev_stall [2];

  for (genvar d = 0; d < 2; d++) begin : g_dut
    fis_xts_path #(.DECRYPT(d == 1)) dut (
      .clk, .rst_n, .crypt_en, .rk1, .rk2, .seq_start, .seq_lba,
      .in_valid(in_valid[d]), .in_ready(in_ready[d]), .in_word(in_word[d]),
      .out_valid(out_valid[d]), .out_ready(out_ready[d]), .out_word(out_word[d]),
      .ev_block(ev_block[d]), .ev_clear_fis(ev_clear[d]), .ev_stall(ev_stall[d]));
  end

  always #5 clk = ~clk;

  fis_word_t tx_q [2][$];    // words to send
  fis_word_t exp_q [2][$];   // words expected
  int n_block [2], n_clear [2], n_stall [2], n_out [2];
  int cyc = 0;
  int out_cyc [$];   // clock of each output word of path 0
  always @(negedge clk) cyc++;
  bit rand_ready = 1, rand_valid = 1;

  function automatic dword_t bs(input dword_t x);
    return {x[7:0], x[15:8], x[23:16], x[31:24]};
  endfunction

  // queue one FIS for both instances; blk0 = index of its first payload block
  // in the command; cipher = payload expected ciphered
  task automatic add_fis(input dword_t words [$], input bit cipher, input logic [63:0] lba, inout int blk);
    int jn = blk;
    for (int d = 0; d < 2; d++) begin
      int n = words.size();
      int j = blk;
      for (int i = 0; i < n; i++) tx_q[d].push_back('{sof: i == 0, eof: i == n - 1, data: words[i]});
      exp_q[d].push_back(tx_q[d][tx_q[d].size() - n]);
      for (int i = 1; i < n; i += 4) begin
        if (cipher && i + 3 < n) begin
          logic [127:0] b, r;
          b = {bs(words[i]), bs(words[i+1]), bs(words[i+2]), bs(words[i+3])};
          r = xts(d == 1, k1, k2, lba + 64'(j / 32), j % 32, b);
          for (int w = 0; w < 4; w++)
            exp_q[d].push_back('{sof: 0, eof: i + w == n - 1, data: bs(r[127-32*w -: 32])});
          j++;
        end else begin
          for (int w = i; w < n && w < i + 4; w++)
            exp_q[d].push_back('{sof: 0, eof: w == n - 1, data: words[w]});
        end
      end
      jn = j;
    end
    blk = jn;
  endtask

  function automatic void mk_data(output dword_t w [$], input int payload_dwords);
    w = {};
    w.push_back(32'h0000_0046);
    for (int i = 0; i < payload_dwords; i++) w.push_back($urandom);
  endfunction

  // drivers and checkers
  // At each falling edge: settle the handshakes recorded at the previous
  // falling edge (they were sampled by the rising edge in between), then
  // drive new values and record what the next rising edge will see.
  for (genvar d = 0; d < 2; d++) begin : g_tb
    bit fire_in, fire_out, e_blk, e_clr, e_stl;
    fis_word_t rec;
    initial begin fire_in = 0; fire_out = 0; e_blk = 0; e_clr = 0; e_stl = 0; end
    always @(negedge clk) begin
      if (fire_out) begin
        checks++;
        n_out[d]++;
        if (d == 0) out_cyc.push_back(cyc);
        if (exp_q[d].size() == 0 || rec !== exp_q[d][0]) begin
          failures++;
          $display("FAIL path %0d word %h exp %h", d, rec, exp_q[d].size() ? exp_q[d][0] : '0);
        end
        if (exp_q[d].size() != 0) void'(exp_q[d].pop_front());
      end
      if (fire_in) void'(tx_q[d].pop_front());
      n_block[d] += int'(e_blk);
      n_clear[d] += int'(e_clr);
      n_stall[d] += int'(e_stl);
      in_valid[d]  = (tx_q[d].size() != 0) && (!rand_valid || $urandom_range(0, 4) != 0);
      in_word[d]   = (tx_q[d].size() != 0) ? tx_q[d][0] : '0;
      out_ready[d] = !rand_ready || ($urandom_range(0, 3) != 0);
      #1;
      fire_in  = rst_n && in_valid[d] && in_ready[d];
      fire_out = rst_n && out_valid[d] && out_ready[d];
      rec      = out_word[d];
      e_blk    = rst_n && ev_block[d];
      e_clr    = rst_n && ev_clear[d];
      e_stl    = rst_n && ev_stall[d];
    end
  end

  task automatic drain();
    while (tx_q[0].size() != 0 || tx_q[1].size() != 0 || exp_q[0].size() != 0 || exp_q[1].size() != 0)
      @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] r [15];
    dword_t w [$];
    int blk, t0;
    logic [63:0] lba;
    k1 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    k2 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    expand(k1, r); for (int i = 0; i < 15; i++) rk1[i] = r[i];
    expand(k2, r); for (int i = 0; i < 15; i++) rk2[i] = r[i];
    repeat (3) @(negedge clk);
    rst_n = 1;
    crypt_en = 1;
    // a Data FIS before any command: forwarded in clear
    blk = 0;
    mk_data(w, 8); add_fis(w, 0, 0, blk);
    drain();
    // command for sector lba
    lba = 64'h0000_1234_5678;
    seq_lba = lba[47:0]; seq_start = 1;
    @(negedge clk);
    seq_start = 0;
    blk = 0;
    w = {32'h0035_8027, 32'he000_0000 | 32'(lba[23:0]), 32'(lba[47:24]), 32'h3, 32'h0};
    add_fis(w, 0, 0, blk);                       // register FIS: unchanged
    mk_data(w, 128); add_fis(w, 1, lba, blk);    // one sector
    mk_data(w, 256); add_fis(w, 1, lba, blk);    // two sectors
    w = {32'h0050_0034, 32'h0, 32'h0, 32'h0, 32'h0};
    add_fis(w, 0, 0, blk);                       // status FIS: unchanged
    mk_data(w, 6); add_fis(w, 1, lba, blk);      // short tail: 1 block + 2 dwords in clear
    drain();
    // full rate: no gaps, no back-pressure, 1 sector must take ~129 clocks
    rand_ready = 0; rand_valid = 0;
    lba = 64'h77;
    seq_lba = lba[47:0]; seq_start = 1;
    @(negedge clk);
    seq_start = 0;
    repeat (20) @(negedge clk);
    blk = 0;
    mk_data(w, 128); add_fis(w, 1, lba, blk);
    t0 = n_out[0];
    drain();
    // the 128 payload dwords must leave on 128 consecutive clocks
    checks++;
    if (out_cyc[t0 + 128] - out_cyc[t0 + 1] != 127) begin
      failures++; $display("FAIL full rate: 128 dwords in %0d clocks", out_cyc[t0 + 128] - out_cyc[t0 + 1] + 1);
    end
    // encryption off: all in clear
    rand_ready = 1; rand_valid = 1;
    crypt_en = 0;
    mk_data(w, 64); add_fis(w, 0, 0, blk);
    drain();
    repeat (5) @(negedge clk);
    for (int d = 0; d < 2; d++) begin
      checks += 3;
      if (n_block[d] != 32 + 64 + 1 + 32) begin failures++; $display("FAIL blocks %0d", n_block[d]); end
      if (n_clear[d] != 1) begin failures++; $display("FAIL clear FIS %0d", n_clear[d]); end
      if (n_stall[d] == 0) begin failures++; $display("FAIL no tweak stall seen"); end
    end
    $display("blocks %0d clear %0d stall cycles %0d", n_block[0], n_clear[0], n_stall[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
