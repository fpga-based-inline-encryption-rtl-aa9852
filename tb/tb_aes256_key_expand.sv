// tb_aes256_key_expand: self-checking test of the AES-256 key expansion.
// Checks the last round key of the FIPS-197 appendix A.3 key, all 15 round
// keys of random keys against the reference key schedule (xts_ref_pkg), the
// ready timing (14 clocks after start) and that ready is low during a reload.
module tb_aes256_key_expand;
  import xts_pkg::*;
  import xts_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, ready;
  key256_t key = '0;
  round_keys_t rk;
  int checks = 0, failures = 0;

  aes256_key_expand dut (.*);

  always #5 clk = ~clk;

  task automatic check_key(input key256_t k);
    logic [127:0] r [15];
    int n;
    key = k; start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (ready) begin failures++; $display("FAIL ready during expansion"); end
    n = 1;
    while (!ready) begin @(negedge clk); n++; end
    checks++;
    if (n != 14) begin failures++; $display("FAIL ready after %0d clocks", n); end
    expand(k, r);
    for (int i = 0; i < 15; i++) begin
      checks++;
      if (rk[i] !== r[i]) begin failures++; $display("FAIL rk[%0d] %h exp %h", i, rk[i], r[i]); end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (ready) begin failures++; $display("FAIL ready after reset"); end
    check_key(256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4);
    // FIPS-197 A.3: w[56..59] = fe4890d1 e6188d0b 046df344 706c631e
    checks++;
    if (rk[14] !== 128'hfe4890d1e6188d0b046df344706c631e) begin failures++; $display("FAIL FIPS-197 A.3"); end
    for (int i = 0; i < 20; i++)
      check_key({$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
