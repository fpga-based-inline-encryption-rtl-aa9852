// tb_xts_alpha_mult: self-checking test of the multiplication by alpha.
// Compares with the reference definition (little-endian 128-bit shift with
// the 0x87 feedback), checks a carry across every byte boundary and the
// carry out of byte 15, and checks that 128 multiplications of 1 give
// alpha^128 = 0x87 (x^7 + x^2 + x + 1).
module tb_xts_alpha_mult;
  import xts_pkg::*;
  import xts_ref_pkg::*;

  block_t t_in, t_out;
  int checks = 0, failures = 0;
  logic clk = 0;

  xts_alpha_mult dut (.*);

  always #5 clk = ~clk;

  function automatic block_t ref_mul(input block_t t);
    logic [127:0] le;
    le = rev16(t);
    le = (le << 1) ^ (le[127] ? 128'h87 : 128'h0);
    return rev16(le);
  endfunction

  task automatic check(input block_t t, input block_t e);
    t_in = t;
    #1;
    checks++;
    if (t_out !== e) begin failures++; $display("FAIL %h -> %h exp %h", t, t_out, e); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    block_t x;
    // byte 0 bit 7 carries into byte 1 bit 0
    check(128'h80000000000000000000000000000000, 128'h00010000000000000000000000000000);
    // byte 15 bit 7 folds back as 135 into byte 0
    check(128'h00000000000000000000000000000080, 128'h87000000000000000000000000000000);
    check(128'hff000000000000000000000000000080, 128'h79010000000000000000000000000000);
    for (int i = 0; i < 300; i++) begin
      x = {$urandom, $urandom, $urandom, $urandom};
      check(x, ref_mul(x));
    end
    // alpha^128 = x^7 + x^2 + x + 1
    x = 128'h01000000000000000000000000000000;
    for (int i = 0; i < 128; i++) begin
      t_in = x; #1; x = t_out;
    end
    checks++;
    if (x !== 128'h87000000000000000000000000000000) begin failures++; $display("FAIL alpha^128 %h", x); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
