// tb_ctrl_regs: self-checking test of the processor register block.
// Writes both keys word by word and checks the key outputs, checks that key
// registers read as zero, that key_load is a one-clock pulse, the CTRL and
// STATUS bits, that each event counter counts its own pulses only and is
// cleared by a write, and that reset clears the keys.
module tb_ctrl_regs;
  import xts_pkg::*;

  logic clk = 0, rst_n = 0, reg_we = 0;
  logic [7:0] reg_addr = '0;
  logic [31:0] reg_wdata = '0, reg_rdata;
  key256_t key1, key2;
  logic key_load, crypt_en, keys_ready = 0, bridge_busy = 0;
  logic [9:0] events = '0;
  int checks = 0, failures = 0;

  ctrl_regs dut (.*);

  always #5 clk = ~clk;

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    reg_we = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_we = 0;
  endtask

  task automatic rd_check(input logic [7:0] a, input logic [31:0] e, input string what);
    reg_addr = a;
    #1;
    checks++;
    if (reg_rdata !== e) begin failures++; $display("FAIL %s: %h exp %h", what, reg_rdata, e); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    key256_t k1, k2;
    int n [10];
    repeat (3) @(negedge clk);
    rst_n = 1;
    k1 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    k2 = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 8; i++) wr(8'h10 + 8'(i), k1[255-32*i -: 32]);
    for (int i = 0; i < 8; i++) wr(8'h18 + 8'(i), k2[255-32*i -: 32]);
    checks += 2;
    if (key1 !== k1) begin failures++; $display("FAIL key1"); end
    if (key2 !== k2) begin failures++; $display("FAIL key2"); end
    for (int i = 0; i < 16; i++) rd_check(8'h10 + 8'(i), 0, "key readback");
    // key_load pulse and crypt_en
    reg_we = 1; reg_addr = 0; reg_wdata = 3;
    @(posedge clk); #1;
    checks++;
    if (!key_load || !crypt_en) begin failures++; $display("FAIL key_load/crypt_en"); end
    @(negedge clk); reg_we = 0;
    @(negedge clk);
    checks++;
    if (key_load) begin failures++; $display("FAIL key_load not a pulse"); end
    rd_check(0, 1, "CTRL");
    rd_check(1, 0, "STATUS not ready");
    keys_ready = 1; bridge_busy = 1;
    rd_check(1, 7, "STATUS ready, busy, active");
    // event counters
    foreach (n[i]) n[i] = 0;
    repeat (300) begin
      events = 10'($urandom);
      for (int i = 0; i < 10; i++) n[i] += int'(events[i]);
      @(negedge clk);
    end
    events = '0;
    for (int i = 0; i < 10; i++) rd_check(8'(2 + i), n[i], $sformatf("counter %0d", i));
    wr(8'h04, 0);
    rd_check(8'h04, 0, "cleared counter");
    rd_check(8'h05, n[3], "other counter kept");
    // reset clears keys
    rst_n = 0; #1; rst_n = 1;
    checks++;
    if (key1 !== '0 || key2 !== '0 || crypt_en) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
