// tb_inline_crypt_bridge: end-to-end test of the inline encryption bridge at
// its default parameters (4096-dword frame buffer, 512-byte sectors).
//
// Behavioural models of the PC's and the SSD's SATA link layers surround the
// bridge; a processor model programs it over the register bus with the keys
// of IEEE Std 1619 XTS-AES-256 vector 10.  The SSD model keeps written
// sectors in an associative array, so data written through the bridge and
// read back through it must come back as written while the stored copy is
// the XTS ciphertext computed by the reference model.  Scenarios:
//  - vector 10 written to sector 0xff with WRITE DMA EXT: stored ciphertext
//    starts with the published bytes;
//  - a 2-sector write and read-back with 48-bit DMA commands;
//  - queued (NCQ) write and read using DMA Setup FIS with a byte offset;
//  - a read with the Data FIS right after the command (tweak stall);
//  - the transparent mode (0x11 pattern stored unchanged);
//  - simultaneous requests from both sides; IDENTIFY data passing in clear
//    after a non-data command; an error status from the SSD.
// Each mechanism is counted from the bridge's own counters and must occur.
module tb_inline_crypt_bridge;
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

  localparam logic [255:0] K1 = 256'h2718281828459045235360287471352662497757247093699959574966967627;
  localparam logic [255:0] K2 = 256'h3141592653589793238462643383279502884197169399375105820974944592;

  typedef dword_t frame_t [$];
  frame_t h_got [$], d_got [$];      // frames received by the PC / the SSD
  bit     d_ok_next = 1;             // status the SSD gives to the next frame

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // ------------------------------------------------ processor model
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

  // ------------------------------------------------ link-layer models
  // send one frame from the PC (side 0) or the SSD (side 1); returns the
  // final status
  task automatic send_frame(input int side, input frame_t f, output bit ok);
    @(negedge clk);
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
    ok = (side == 0) ? h_rx_ok : d_rx_ok;
  endtask

  task automatic receiver(input int side);
    forever begin
      frame_t got;
      bit ok;
      while (!(side == 0 ? h_tx_req : d_tx_req)) @(negedge clk);
      repeat ($urandom_range(0, 4)) @(negedge clk);
      if (side == 0) h_tx_rdy = 1; else d_tx_rdy = 1;
      got = {};
      forever begin
        bit r;
        r = ($urandom_range(0, 7) != 0);
        if (side == 0) h_tx_ready = r; else d_tx_ready = r;
        #1;
        if (side == 0 ? (h_tx_valid && h_tx_ready) : (d_tx_valid && d_tx_ready)) begin
          fis_word_t w;
          w = (side == 0) ? h_tx_word : d_tx_word;
          got.push_back(w.data);
          @(negedge clk);
          if (w.eof) break;
        end else @(negedge clk);
      end
      if (side == 0) begin h_tx_ready = 0; h_tx_rdy = 0; end
      else           begin d_tx_ready = 0; d_tx_rdy = 0; end
      ok = (side == 0) ? 1'b1 : d_ok_next;
      if (side == 0) h_got.push_back(got); else d_got.push_back(got);
      repeat ($urandom_range(1, 4)) @(negedge clk);
      if (side == 0) begin h_tx_done = 1; h_tx_ok = ok; end
      else           begin d_tx_done = 1; d_tx_ok = ok; end
      @(negedge clk);
      if (side == 0) h_tx_done = 0; else d_tx_done = 0;
    end
  endtask

  task automatic wait_frame(input int side, output frame_t f);
    int t = 0;
    while ((side == 0 ? h_got.size() : d_got.size()) == 0 && t < 5000) begin @(negedge clk); t++; end
    if (t >= 5000) begin f = {}; check(0, "frame did not arrive"); end
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

  function automatic frame_t dma_setup(input bit d2h, input int tag, input int offset, input int len);
    frame_t f;
    dword_t d0;
    d0 = 32'h0000_0041 | (d2h ? 32'h2000 : 32'h0);
    f = {d0, dword_t'(tag), 32'h0, 32'h0, dword_t'(offset), dword_t'(len), 32'h0};
    return f;
  endfunction

  // Data FIS from sector bytes (byte 0 in bits [7:0] of the first dword)
  function automatic frame_t data_fis(input logic [7:0] bytes [$]);
    frame_t f;
    f.push_back(32'h0000_0046);
    for (int i = 0; i < bytes.size(); i += 4)
      f.push_back({bytes[i+3], bytes[i+2], bytes[i+1], bytes[i]});
    return f;
  endfunction

  // expected ciphertext bytes of `bytes` stored from sector `lba` on
  function automatic frame_t cipher_fis(input logic [7:0] bytes [$], input logic [63:0] lba, input bit dec);
    logic [7:0] out [$];
    for (int b = 0; b < bytes.size() / 16; b++) begin
      logic [127:0] blk, r;
      for (int k = 0; k < 16; k++) blk[127-8*k -: 8] = bytes[16*b + k];
      r = xts(dec, K1, K2, lba + 64'(b / 32), b % 32, blk);
      for (int k = 0; k < 16; k++) out.push_back(r[127-8*k -: 8]);
    end
    return data_fis(out);
  endfunction

  function automatic void rnd_bytes(output logic [7:0] b [$], input int n);
    b = {};
    for (int i = 0; i < n; i++) b.push_back(8'($urandom));
  endfunction

  // ------------------------------------------------ scenarios
  task automatic write_cmd(input logic [7:0] cmd, input lba_t lba, input logic [7:0] bytes [$],
                           input bit encrypted, output frame_t stored);
    frame_t f, g, e;
    bit ok;
    f = reg_h2d(cmd, lba, 16'(bytes.size() / 512));
    send_frame(0, f, ok);
    wait_frame(1, g);
    check(g == f, "command FIS reaches the SSD unchanged");
    f = {32'h0000_0039};                       // DMA Activate from the SSD
    send_frame(1, f, ok);
    wait_frame(0, g);
    check(g == f, "DMA Activate reaches the PC unchanged");
    f = data_fis(bytes);
    send_frame(0, f, ok);
    wait_frame(1, stored);
    e = encrypted ? cipher_fis(bytes, 64'(lba), 0) : f;
    check(stored == e, encrypted ? "SSD stores the XTS ciphertext" : "SSD stores the data unchanged");
    check(ok, "final ACK of the write is OK");
  endtask

  task automatic read_cmd(input logic [7:0] cmd, input lba_t lba, input frame_t stored,
                          input frame_t expect_pc);
    frame_t f, g;
    bit ok;
    f = reg_h2d(cmd, lba, 16'((stored.size() - 1) / 128));
    send_frame(0, f, ok);
    wait_frame(1, g);
    check(g == f, "read command reaches the SSD unchanged");
    send_frame(1, stored, ok);
    wait_frame(0, g);
    check(g == expect_pc, "PC reads back the plaintext");
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [31:0] v;
    logic [7:0] bytes [$];
    frame_t stored, f, g, plain;
    bit ok, ok2;
    int stalls_before;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork receiver(0); receiver(1); join_none

    // processor: keys, expansion, encryption on
    for (int i = 0; i < 8; i++) reg_write(8'h10 + 8'(i), K1[255-32*i -: 32]);
    for (int i = 0; i < 8; i++) reg_write(8'h18 + 8'(i), K2[255-32*i -: 32]);
    reg_write(8'h00, 32'h3);
    do reg_read(8'h01, v); while (!v[0]);
    check(v[2], "encryption active after key load");

    // IEEE 1619 vector 10 through the bridge
    bytes = {};
    for (int i = 0; i < 512; i++) bytes.push_back(8'(i));
    write_cmd(ATA_WRITE_DMA_EXT, 48'hff, bytes, 1, stored);
    check(stored.size() > 4 && stored[1] == 32'h103a3b1c && stored[2] == 32'h8603772f &&
          stored[3] == 32'h996c83e4 && stored[4] == 32'h9bcf70e3, "vector 10 ciphertext on the SSD");
    read_cmd(ATA_READ_DMA_EXT, 48'hff, stored, data_fis(bytes));

    // two sectors at a 48-bit LBA
    rnd_bytes(bytes, 1024);
    write_cmd(ATA_WRITE_DMA_EXT, 48'h0123_4567_89ab, bytes, 1, stored);
    plain = data_fis(bytes);
    read_cmd(ATA_READ_DMA_EXT, 48'h0123_4567_89ab, stored, plain);
    // reading it as if it were another sector must not give the plaintext
    begin
      frame_t wrong;
      f = reg_h2d(ATA_READ_DMA_EXT, 48'h0123_4567_89ac, 2);
      send_frame(0, f, ok); wait_frame(1, g);
      send_frame(1, stored, ok); wait_frame(0, wrong);
      check(wrong != plain, "wrong sector number gives other data");
    end

    // queued commands: write tag 3 at 0x5000, 4 sectors; data of the last two
    // sectors via a DMA Setup with offset 1024
    rnd_bytes(bytes, 1024);
    f = reg_h2d(ATA_WRITE_FPDMA_Q, 48'h5000, 16'(3 << 3));
    send_frame(0, f, ok); wait_frame(1, g);
    f = reg_h2d(ATA_READ_FPDMA_Q, 48'h9000, 16'(7 << 3));
    send_frame(0, f, ok); wait_frame(1, g);
    f = dma_setup(0, 3, 1024, 1024);
    send_frame(1, f, ok); wait_frame(0, g);
    check(g == f, "DMA Setup reaches the PC unchanged");
    send_frame(0, data_fis(bytes), ok); wait_frame(1, stored);
    check(stored == cipher_fis(bytes, 64'h5002, 0), "queued write stored as ciphertext of sectors 0x5002..");
    // queued read, tag 7, stored data is the ciphertext of sector 0x9000
    f = dma_setup(1, 7, 0, 1024);
    send_frame(1, f, ok); wait_frame(0, g);
    send_frame(1, cipher_fis(bytes, 64'h9000, 0), ok); wait_frame(0, g);
    check(g == data_fis(bytes), "queued read deciphered");

    // a Data FIS right after its command: the tweak is not ready yet
    reg_read(8'h08, v);
    stalls_before = int'(v);
    rnd_bytes(bytes, 512);
    f = reg_h2d(ATA_READ_DMA_EXT, 48'h777, 1);
    fork
      begin send_frame(0, f, ok); end
      begin
        // the SSD answers the moment the command has left the bridge
        wait (d_got.size() != 0);
        send_frame(1, cipher_fis(bytes, 64'h777, 0), ok2);
      end
    join
    wait_frame(1, g);
    wait_frame(0, g);
    check(g == data_fis(bytes), "read right after its command deciphered");

    // simultaneous requests: SSD status and PC command in the same clock
    fork
      begin f = {32'h0000_50a1, 32'h0}; send_frame(1, f, ok); end
      begin g = reg_h2d(8'hEC, 48'h0, 0); send_frame(0, g, ok2); end
    join
    wait_frame(0, plain); check(plain == f, "SDB FIS arrives at the PC");
    wait_frame(1, plain); check(plain == g, "IDENTIFY arrives at the SSD");

    // IDENTIFY data is not sector data: after the non-data command the
    // cipher context is dropped and the PIO Data FIS passes in clear
    f = {32'h0000_005f, 32'h0, 32'h0, 32'h0, 32'h0000_0200};
    send_frame(1, f, ok); wait_frame(0, g);
    check(g == f, "PIO Setup reaches the PC unchanged");
    rnd_bytes(bytes, 512);
    send_frame(1, data_fis(bytes), ok); wait_frame(0, g);
    check(g == data_fis(bytes), "IDENTIFY data reaches the PC in clear");

    // an error status from the SSD is passed back to the PC
    d_ok_next = 0;
    rnd_bytes(bytes, 512);
    f = reg_h2d(ATA_WRITE_DMA_EXT, 48'h10, 1);
    send_frame(0, f, ok);
    check(!ok, "SSD error status reaches the PC");
    wait_frame(1, g);
    d_ok_next = 1;

    // transparent mode: 0x11 pattern stored unchanged
    reg_write(8'h00, 32'h0);
    bytes = {};
    for (int i = 0; i < 512; i++) bytes.push_back(8'h11);
    write_cmd(ATA_WRITE_DMA_EXT, 48'h0, bytes, 0, stored);
    read_cmd(ATA_READ_DMA_EXT, 48'h0, stored, data_fis(bytes));

    // mechanism counters
    repeat (10) @(negedge clk);
    reg_read(8'h02, v); check(v == 32 * (1 + 2 + 2), $sformatf("encrypted blocks %0d", v));
    $display("encrypted blocks     %0d", v);
    reg_read(8'h03, v); check(v == 32 * (1 + 2 + 2 + 2 + 1), $sformatf("decrypted blocks %0d", v));
    $display("decrypted blocks     %0d", v);
    reg_read(8'h04, v); $display("PC->SSD frames       %0d", v); check(v > 0, "PC->SSD frames");
    reg_read(8'h05, v); $display("SSD->PC frames       %0d", v); check(v > 0, "SSD->PC frames");
    reg_read(8'h06, v); $display("frame errors         %0d", v); check(v == 1, "one error status");
    reg_read(8'h07, v); $display("collisions           %0d", v); check(v > 0, "collision happened");
    reg_read(8'h08, v); $display("tweak stall cycles   %0d", v); check(int'(v) > stalls_before, "tweak stall happened");
    reg_read(8'h09, v); $display("clear Data FIS       %0d", v); check(v == 1, "one Data FIS without context");
    reg_read(8'h0A, v); $display("data commands        %0d", v); check(v > 0, "commands seen");
    reg_read(8'h0B, v); $display("NCQ DMA setups       %0d", v); check(v == 2, "NCQ setups");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
