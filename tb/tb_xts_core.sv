// tb_xts_core: self-checking test of the XTS-AES-256 block pipeline.
// An encrypting and a decrypting instance get the same input stream.
//  1. IEEE Std 1619-2007 XTS-AES-256 vector 10 (sector 0xff, data bytes
//     00..ff repeated): first two ciphertext blocks against the published
//     values, all 32 blocks against the reference model, latency 16 clocks
//     and one block per clock.
//  2. Three sectors of random data with random gaps, random output
//     back-pressure and random bypass blocks, against the reference model.
module tb_xts_core;
  import xts_pkg::*;
  import xts_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  round_keys_t rk1, rk2;
  logic seq_start = 0;
  lba_t seq_lba = '0;
  logic in_valid = 0, in_bypass = 0, out_ready = 1;
  block_t in_data = '0;
  logic [7:0] in_tag = '0;
  logic e_active, e_in_ready, e_out_valid, e_stall;
  logic d_active, d_in_ready, d_out_valid, d_stall;
  block_t e_out, d_out;
  logic [7:0] e_tag, d_tag;
  logic [255:0] k1, k2;
  int checks = 0, failures = 0;

  xts_core #(.DECRYPT(1'b0), .TAG_W(8)) u_enc (
    .clk, .rst_n, .rk1, .rk2, .seq_start, .seq_lba, .seq_active(e_active),
    .in_valid, .in_ready(e_in_ready), .in_data, .in_tag, .in_bypass,
    .out_valid(e_out_valid), .out_ready, .out_data(e_out), .out_tag(e_tag), .tweak_stall(e_stall));
  xts_core #(.DECRYPT(1'b1), .TAG_W(8)) u_dec (
    .clk, .rst_n, .rk1, .rk2, .seq_start, .seq_lba, .seq_active(d_active),
    .in_valid, .in_ready(d_in_ready), .in_data, .in_tag, .in_bypass,
    .out_valid(d_out_valid), .out_ready, .out_data(d_out), .out_tag(d_tag), .tweak_stall(d_stall));

  always #5 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  block_t exp_e [$], exp_d [$];
  logic [7:0] exp_t [$];
  int t_acc [$];
  int lat_max = 0;
  block_t enc_seen [$];

  always @(negedge clk) begin
    if (e_out_valid && out_ready) begin
      checks += 3;
      if (e_out !== exp_e[0]) begin failures++; $display("FAIL enc %h exp %h", e_out, exp_e[0]); end
      if (d_out !== exp_d[0]) begin failures++; $display("FAIL dec %h exp %h", d_out, exp_d[0]); end
      if (e_tag !== exp_t[0] || d_tag !== exp_t[0]) begin failures++; $display("FAIL tag"); end
      enc_seen.push_back(e_out);
      if (cyc - t_acc[0] > lat_max) lat_max = cyc - t_acc[0];
      void'(exp_e.pop_front()); void'(exp_d.pop_front());
      void'(exp_t.pop_front()); void'(t_acc.pop_front());
    end
    checks++;
    if (e_out_valid !== d_out_valid || e_in_ready !== d_in_ready) begin
      failures++; $display("FAIL instances out of step");
    end
  end

  // offer one block, wait until accepted
  task automatic send(input block_t d, input bit byp, input logic [63:0] s, input int j);
    in_valid = 1; in_data = d; in_bypass = byp; in_tag = 8'($urandom);
    exp_e.push_back(byp ? d : xts(0, k1, k2, s, j, d));
    exp_d.push_back(byp ? d : xts(1, k1, k2, s, j, d));
    exp_t.push_back(in_tag);
    @(posedge clk);
    while (!e_in_ready) @(posedge clk);
    t_acc.push_back(cyc);
    @(negedge clk);
    in_valid = 0;
  endtask

  task automatic set_keys(input logic [255:0] a, input logic [255:0] b);
    logic [127:0] r [15];
    k1 = a; k2 = b;
    expand(a, r); for (int i = 0; i < 15; i++) rk1[i] = r[i];
    expand(b, r); for (int i = 0; i < 15; i++) rk2[i] = r[i];
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    block_t first2 [2];
    int t0, t1, j;
    logic [63:0] s;
    set_keys(256'h2718281828459045235360287471352662497757247093699959574966967627,
             256'h3141592653589793238462643383279502884197169399375105820974944592);
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // ---- 1: IEEE 1619 vector 10
    seq_lba = 48'hff; seq_start = 1;
    @(negedge clk);
    seq_start = 0;
    repeat (20) @(negedge clk);
    t0 = cyc;
    for (int b = 0; b < 32; b++) begin
      block_t d;
      for (int k = 0; k < 16; k++) d[127-8*k -: 8] = 8'((16*b + k) % 256);
      send(d, 0, 64'hff, b);
    end
    t1 = cyc;
    checks++;
    if (t1 - t0 != 32) begin failures++; $display("FAIL 32 blocks took %0d clocks", t1 - t0); end
    repeat (40) @(negedge clk);
    first2[0] = enc_seen[0];
    first2[1] = enc_seen[1];
    checks += 2;
    if (first2[0] !== 128'h1c3b3a102f770386e4836c99e370cf9b) begin failures++; $display("FAIL vector 10 block 0"); end
    if (first2[1] !== 128'hea00803f5e482357a4ae12d414a3e63b) begin failures++; $display("FAIL vector 10 block 1"); end
    checks++;
    if (lat_max != 16) begin failures++; $display("FAIL latency %0d", lat_max); end
    // ---- 2: random traffic with back-pressure and bypass blocks
    set_keys({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom},
             {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    s = 64'({$urandom, $urandom} & 48'hffff_ffff_ffff);
    seq_lba = 48'(s); seq_start = 1;
    @(negedge clk);
    seq_start = 0;
    fork
      begin
        j = 0;
        while (j < 96) begin
          bit byp;
          byp = ($urandom_range(0, 9) == 0);
          send({$urandom, $urandom, $urandom, $urandom}, byp, s + 64'(j / 32), j % 32);
          if (!byp) j++;
          repeat ($urandom_range(0, 2)) @(negedge clk);
        end
      end
      begin
        repeat (600) begin
          out_ready = ($urandom_range(0, 3) != 0);
          @(negedge clk);
        end
        out_ready = 1;
      end
    join
    repeat (40) @(negedge clk);
    checks++;
    if (exp_e.size() != 0) begin failures++; $display("FAIL %0d blocks missing", exp_e.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
