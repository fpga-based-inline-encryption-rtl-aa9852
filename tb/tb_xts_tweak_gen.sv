// tb_xts_tweak_gen: self-checking test of the tweak generator.
// Starts a sequence at a random sector number, consumes 3 sectors of
// tweaks (32 per sector) with random gaps and compares each with the
// reference (sector number encrypted with Key2, times alpha^j).  Checks that
// the first tweak is ready 16 clocks after seq_start, that the prefetch hides
// Enc2 at a sector boundary (no wait when tweaks are taken every clock), and
// that a restart drops the results of the old sequence.
module tb_xts_tweak_gen;
  import xts_pkg::*;
  import xts_ref_pkg::*;

  logic clk = 0, rst_n = 0, seq_start = 0, seq_active, tweak_valid, take = 0;
  lba_t seq_lba = '0;
  block_t tweak;
  round_keys_t rk2;
  logic [255:0] k2;
  int checks = 0, failures = 0;

  xts_tweak_gen dut (.*);

  always #5 clk = ~clk;

  function automatic block_t ref_tweak(input logic [63:0] s, input int j);
    logic [127:0] le;
    le = rev16(aes_enc(k2, rev16({64'h0, s})));
    for (int i = 0; i < j; i++) le = (le << 1) ^ (le[127] ? 128'h87 : 128'h0);
    return rev16(le);
  endfunction

  task automatic start_seq(input lba_t l);
    seq_lba = l; seq_start = 1;
    @(negedge clk);
    seq_start = 0;
  endtask

  // take n tweaks of sector s starting at block j0; gap=0 means every clock
  task automatic take_n(input logic [63:0] s, input int j0, input int n, input bit gaps,
                        output int waits);
    waits = 0;
    for (int j = j0; j < j0 + n; j++) begin
      while (!tweak_valid) begin @(negedge clk); waits++; end
      checks++;
      if (tweak !== ref_tweak(s, j)) begin
        failures++; $display("FAIL sector %0h block %0d: %h", s, j, tweak);
      end
      take = 1;
      @(negedge clk);
      take = 0;
      if (gaps) repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    logic [127:0] r [15];
    lba_t l;
    int n, w;
    k2 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    expand(k2, r);
    for (int i = 0; i < 15; i++) rk2[i] = r[i];
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (tweak_valid || seq_active) begin failures++; $display("FAIL active after reset"); end
    // first tweak latency
    l = {$urandom, 16'h0} | 48'(32'hfffffffe);
    start_seq(l);
    n = 1;
    while (!tweak_valid) begin @(negedge clk); n++; end
    checks++;
    if (n != 16) begin failures++; $display("FAIL first tweak after %0d clocks", n); end
    // 3 sectors with random gaps (crosses a 32-bit carry of the LBA)
    for (int s = 0; s < 3; s++) take_n(64'(l) + 64'(s), 0, 32, 1, w);
    // sector boundary taken every clock: prefetch must hide Enc2
    take_n(64'(l) + 3, 0, 32, 0, w);
    take_n(64'(l) + 4, 0, 32, 0, w);
    checks++;
    if (w != 0) begin failures++; $display("FAIL %0d waits at a sector boundary", w); end
    // restart in the middle of a sector and right after a first restart
    take_n(64'(l) + 5, 0, 5, 0, w);
    start_seq(48'h123456);
    repeat (3) @(negedge clk);
    start_seq(48'h777);
    take_n(64'h777, 0, 32, 1, w);
    take_n(64'h778, 0, 3, 1, w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
