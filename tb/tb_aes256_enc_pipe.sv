// tb_aes256_enc_pipe: self-checking test of the AES-256 encryption pipeline.
// Checks the FIPS-197 appendix C.3 vector, 200 random blocks against the
// behavioural reference model (xts_ref_pkg), the 14-clock latency, one block
// per clock, and that a stall (en = 0) holds every stage.
module tb_aes256_enc_pipe;
  import xts_pkg::*;
  import xts_ref_pkg::*;

  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  block_t in_data = '0, out_data;
  logic [15:0] in_tag = '0, out_tag;
  logic out_valid;
  round_keys_t rk;
  logic [255:0] key;
  int checks = 0, failures = 0;

  aes256_enc_pipe #(.TAG_W(16)) dut (.*);

  always #5 clk = ~clk;

  block_t exp_q [$];
  int     t_in  [$];
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (out_valid && en) begin
    block_t e;
    int t0;
    e  = exp_q.pop_front();
    t0 = t_in.pop_front();
    checks++;
    if (out_data !== e) begin failures++; $display("FAIL data %h exp %h", out_data, e); end
    checks++;
    if (cyc - t0 != 14) begin failures++; $display("FAIL latency %0d", cyc - t0); end
  end

  task automatic load_key(input logic [255:0] k);
    logic [127:0] r [15];
    key = k;
    expand(k, r);
    for (int i = 0; i < 15; i++) rk[i] = r[i];
  endtask

  task automatic send(input block_t d);
    in_valid = 1; in_data = d; in_tag = 16'(cyc);
    exp_q.push_back(aes_enc(key, d));
    t_in.push_back(cyc);
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load_key(256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f);
    repeat (3) @(negedge clk);
    rst_n <= 1;
    @(negedge clk);
    send(128'h00112233445566778899aabbccddeeff);
    repeat (16) @(negedge clk);
    checks++;
    if (out_data !== 128'h8ea2b7ca516745bfeafc49904b496089) begin failures++; $display("FAIL FIPS-197 vector"); end
    // back-to-back random blocks, one per clock
    load_key({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    for (int i = 0; i < 200; i++) send({$urandom, $urandom, $urandom, $urandom});
    repeat (20) @(negedge clk);
    // stall: freeze the pipeline for 5 clocks with blocks in flight
    send(128'h1); send(128'h2); send(128'h3);
    en = 0;
    repeat (5) @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL output moved while stalled"); end
    foreach (t_in[i]) t_in[i] += 5;
    en = 1;
    repeat (20) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d blocks lost", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
