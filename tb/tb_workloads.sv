// tb_workloads: the bridge under the kinds of traffic its evaluation uses,
// at the top's default sizes, with link-layer models that are always ready
// so that the bridge itself sets the pace.
//
//  - sequential write and read (as in a SEQ1M test): one 48-bit DMA command
//    of 64 sectors moved as four 8 KiB Data FIS, the largest a Data FIS may
//    carry; every word is checked against the reference XTS model and the
//    rate is measured, from the PC's request for the Data FIS to its final
//    ACK, against the 400 MB/s sequential threshold at the 150 MHz clock;
//  - random 4 KiB transfers with 32 queued commands outstanding (as in
//    RND4K Q32 and a 70/30 read/write mix): 22 reads and 10 writes on tags
//    0..31 at random sector numbers, served by the SSD in a random order,
//    each announced by a DMA Setup FIS.
// Rates are printed in MB/s assuming a 150 MHz clock (6.667 ns per clock).
module tb_workloads;
  import xts_pkg::*;
  import xts_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic reg_we = 0;
  logic [7:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  logic h_rx_req = 0, h_rx_ack, h_rx_valid = 0, h_rx_ready, h_rx_done, h_rx_ok;
  fis_word_t h_rx_word = '0, h_tx_word, d_rx_word = '0, d_tx_word;
  logic h_tx_req, h_tx_rdy = 0, h_tx_valid, h_tx_ready = 0, h_tx_done = 0, h_tx_ok = 0;
  logic d_rx_req = 0, d_rx_ack, d_rx_valid = 0, d_rx_ready, d_rx_done, d_rx_ok;
  logic d_tx_req, d_tx_rdy = 0, d_tx_valid, d_tx_ready = 0, d_tx_done = 0, d_tx_ok = 0;
  int checks = 0, failures = 0;

  inline_crypt_bridge dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  localparam logic [255:0] K1 = 256'h6a09e667bb67ae853c6ef372a54ff53a510e527f9b05688c1f83d9ab5be0cd19;
  localparam logic [255:0] K2 = 256'h428a2f9871374491b5c0fbcfe9b5dba53956c25b59f111f1923f82a4ab1c5ed5;

  typedef dword_t frame_t [$];
  frame_t h_got [$], d_got [$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic reg_write(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk);
    reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_we = 0;
  endtask

  task automatic reg_read(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk);
    reg_addr = a;
    #1 d = reg_rdata;
  endtask

  // one frame from the PC (side 0) or the SSD (side 1), one word per clock
  // when accepted; returns the clocks from request to final ACK
  task automatic send_frame(input int side, input frame_t f, output int clocks);
    int t0;
    @(negedge clk);
    t0 = cyc;
    if (side == 0) h_rx_req = 1; else d_rx_req = 1;
    do @(negedge clk); while (!(side == 0 ? h_rx_ack : d_rx_ack));
    if (side == 0) h_rx_req = 0; else d_rx_req = 0;
    for (int i = 0; i < f.size(); i++) begin
      fis_word_t w;
      w = '{sof: i == 0, eof: i == f.size() - 1, data: f[i]};
      if (side == 0) begin h_rx_valid = 1; h_rx_word = w; end
      else           begin d_rx_valid = 1; d_rx_word = w; end
      #1;
      while (!(side == 0 ? h_rx_ready : d_rx_ready)) begin @(negedge clk); #1; end
      @(negedge clk);
      if (side == 0) h_rx_valid = 0; else d_rx_valid = 0;
    end
    while (!(side == 0 ? h_rx_done : d_rx_done)) @(negedge clk);
    clocks = cyc - t0;
  endtask

  // receiving link layer: ready at once, takes a word every clock
  task automatic receiver(input int side);
    forever begin
      frame_t got;
      while (!(side == 0 ? h_tx_req : d_tx_req)) @(negedge clk);
      if (side == 0) begin h_tx_rdy = 1; h_tx_ready = 1; end
      else           begin d_tx_rdy = 1; d_tx_ready = 1; end
      got = {};
      forever begin
        #1;
        if (side == 0 ? h_tx_valid : d_tx_valid) begin
          fis_word_t w;
          w = (side == 0) ? h_tx_word : d_tx_word;
          got.push_back(w.data);
          @(negedge clk);
          if (w.eof) break;
        end else @(negedge clk);
      end
      if (side == 0) begin h_tx_ready = 0; h_tx_rdy = 0; h_got.push_back(got); end
      else           begin d_tx_ready = 0; d_tx_rdy = 0; d_got.push_back(got); end
      if (side == 0) begin h_tx_done = 1; h_tx_ok = 1; end
      else           begin d_tx_done = 1; d_tx_ok = 1; end
      @(negedge clk);
      if (side == 0) h_tx_done = 0; else d_tx_done = 0;
    end
  endtask

  task automatic wait_frame(input int side, output frame_t f);
    int t = 0;
    while ((side == 0 ? h_got.size() : d_got.size()) == 0 && t < 20000) begin @(negedge clk); t++; end
    if (t >= 20000) begin f = {}; check(0, "frame did not arrive"); end
    else f = (side == 0) ? h_got.pop_front() : d_got.pop_front();
  endtask

  // ------------------------------------------------ FIS builders
  function automatic frame_t reg_h2d(input logic [7:0] cmd, input lba_t lba, input logic [15:0] cnt);
    frame_t f;
    dword_t d0, d1, d2, d3;
    d0 = 32'h0000_8027 | (dword_t'(cmd) << 16);
    d1 = 32'h4000_0000 | dword_t'(lba[23:0]);
    d2 = dword_t'(lba[47:24]);
    d3 = dword_t'(cnt);
    f = {d0, d1, d2, d3, 32'h0};
    return f;
  endfunction

  function automatic frame_t dma_setup(input bit d2h, input int tag, input int len);
    frame_t f;
    dword_t d0;
    d0 = 32'h0000_0041 | (d2h ? 32'h2000 : 32'h0);
    f = {d0, dword_t'(tag), 32'h0, 32'h0, 32'h0, dword_t'(len), 32'h0};
    return f;
  endfunction

  // plaintext of sector `lba`: a pattern that differs per sector and word
  function automatic frame_t plain_fis(input lba_t lba, input int sectors);
    frame_t f;
    f.push_back(32'h0000_0046);
    for (int s = 0; s < sectors; s++)
      for (int i = 0; i < 128; i++)
        f.push_back(dword_t'(lba + lba_t'(s)) * 32'h9e37_79b9 ^ dword_t'(i) * 32'h0101_0101);
    return f;
  endfunction

  // the same sectors as XTS ciphertext (byte 0 of a block = bits [7:0] of its first dword)
  function automatic frame_t cipher_fis(input frame_t p, input lba_t lba);
    frame_t f;
    f.push_back(32'h0000_0046);
    for (int b = 0; b < (p.size() - 1) / 4; b++) begin
      logic [127:0] blk, r;
      for (int k = 0; k < 16; k++) blk[127-8*k -: 8] = p[1 + 4*b + k/4][8*(k%4) +: 8];
      r = xts(0, K1, K2, 64'(lba) + 64'(b / 32), b % 32, blk);
      for (int w = 0; w < 4; w++)
        f.push_back({r[127-8*(4*w+3) -: 8], r[127-8*(4*w+2) -: 8], r[127-8*(4*w+1) -: 8], r[127-8*(4*w) -: 8]});
    end
    return f;
  endfunction

  function automatic int mbps(input int bytes, input int clocks);
    return int'(real'(bytes) * 150.0 / real'(clocks));
  endfunction

  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  localparam int SEQ_SECTORS = 64;     // 32 KiB, four 8 KiB Data FIS
  localparam int FIS_SECTORS = 16;     // 8 KiB, the largest Data FIS
  localparam int NQ          = 32;     // queued commands outstanding
  localparam int RND_SECTORS = 8;      // 4 KiB

  initial begin
    logic [31:0] v;
    frame_t f, g, e;
    int clocks, words, total;
    lba_t seq_lba;
    lba_t q_lba [NQ];
    bit   q_rd [NQ];
    int   order [NQ];
    int   n_rd;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork receiver(0); receiver(1); join_none

    for (int i = 0; i < 8; i++) reg_write(8'h10 + 8'(i), K1[255-32*i -: 32]);
    for (int i = 0; i < 8; i++) reg_write(8'h18 + 8'(i), K2[255-32*i -: 32]);
    reg_write(8'h00, 32'h3);
    do reg_read(8'h01, v); while (!v[0]);

    // ---------------------------------------------- sequential write
    seq_lba = 48'h0000_1000_0000;
    send_frame(0, reg_h2d(ATA_WRITE_DMA_EXT, seq_lba, 16'(SEQ_SECTORS)), clocks);
    wait_frame(1, g);
    total = 0;
    for (int n = 0; n < SEQ_SECTORS / FIS_SECTORS; n++) begin
      lba_t l;
      l = seq_lba + lba_t'(n * FIS_SECTORS);
      send_frame(1, {32'h0000_0039}, clocks);          // DMA Activate
      wait_frame(0, g);
      f = plain_fis(l, FIS_SECTORS);
      send_frame(0, f, clocks);
      total += clocks;
      wait_frame(1, g);
      check(g == cipher_fis(f, l), $sformatf("sequential write, Data FIS %0d stored as ciphertext", n));
      check(mbps(FIS_SECTORS * 512, clocks) >= 400,
            $sformatf("sequential write FIS %0d: %0d MB/s", n, mbps(FIS_SECTORS * 512, clocks)));
    end
    $display("sequential write: %0d bytes in %0d clocks of Data FIS = %0d MB/s at 150 MHz",
             SEQ_SECTORS * 512, total, mbps(SEQ_SECTORS * 512, total));

    // ---------------------------------------------- sequential read
    send_frame(0, reg_h2d(ATA_READ_DMA_EXT, seq_lba, 16'(SEQ_SECTORS)), clocks);
    wait_frame(1, g);
    total = 0;
    for (int n = 0; n < SEQ_SECTORS / FIS_SECTORS; n++) begin
      lba_t l;
      l = seq_lba + lba_t'(n * FIS_SECTORS);
      f = plain_fis(l, FIS_SECTORS);
      send_frame(1, cipher_fis(f, l), clocks);
      total += clocks;
      wait_frame(0, g);
      check(g == f, $sformatf("sequential read, Data FIS %0d deciphered", n));
      check(mbps(FIS_SECTORS * 512, clocks) >= 400,
            $sformatf("sequential read FIS %0d: %0d MB/s", n, mbps(FIS_SECTORS * 512, clocks)));
    end
    $display("sequential read:  %0d bytes in %0d clocks of Data FIS = %0d MB/s at 150 MHz",
             SEQ_SECTORS * 512, total, mbps(SEQ_SECTORS * 512, total));

    // ---------------------------------------------- random 4 KiB, 32 queued
    n_rd = 0;
    for (int t = 0; t < NQ; t++) begin
      q_rd[t]  = (t % 16) < 11;                       // 22 reads, 10 writes
      q_lba[t] = lba_t'({$urandom, $urandom}) & 48'h0000_1fff_fff8;
      n_rd += int'(q_rd[t]);
      send_frame(0, reg_h2d(q_rd[t] ? ATA_READ_FPDMA_Q : ATA_WRITE_FPDMA_Q, q_lba[t],
                            16'(t << 3)), clocks);
      wait_frame(1, g);
      order[t] = t;
    end
    order.shuffle();
    words = 0;
    total = cyc;
    for (int k = 0; k < NQ; k++) begin
      int t;
      t = order[k];
      f = plain_fis(q_lba[t], RND_SECTORS);
      e = cipher_fis(f, q_lba[t]);
      send_frame(1, dma_setup(q_rd[t], t, RND_SECTORS * 512), clocks);
      wait_frame(0, g);
      if (q_rd[t]) begin
        send_frame(1, e, clocks);
        wait_frame(0, g);
        check(g == f, $sformatf("queued read tag %0d deciphered", t));
      end else begin
        send_frame(1, {32'h0000_0039}, clocks);
        wait_frame(0, g);
        send_frame(0, f, clocks);
        wait_frame(1, g);
        check(g == e, $sformatf("queued write tag %0d stored as ciphertext", t));
      end
      words += RND_SECTORS * 128;
    end
    total = cyc - total;
    $display("random 4 KiB, %0d queued (%0d reads, %0d writes): %0d bytes in %0d clocks = %0d MB/s at 150 MHz",
             NQ, n_rd, NQ - n_rd, words * 4, total, mbps(words * 4, total));
    check(n_rd == 22, "70/30 read/write mix");

    repeat (10) @(negedge clk);
    reg_read(8'h02, v); $display("encrypted blocks     %0d", v);
    check(v == 32 * (SEQ_SECTORS + (NQ - n_rd) * RND_SECTORS), "every written block encrypted");
    reg_read(8'h03, v); $display("decrypted blocks     %0d", v);
    check(v == 32 * (SEQ_SECTORS + n_rd * RND_SECTORS), "every read block decrypted");
    reg_read(8'h0B, v); $display("NCQ DMA setups       %0d", v);
    check(v == NQ, "one DMA Setup per queued command");
    reg_read(8'h09, v); check(v == 0, "no Data FIS passed in clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
