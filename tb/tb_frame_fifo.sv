// tb_frame_fifo: self-checking test of the frame FIFO.
// Random pushes and pops against a queue model, with a run that fills the
// FIFO to its depth (in_ready must drop exactly when full) and drains it.
module tb_frame_fifo;
  import xts_pkg::*;

  localparam int unsigned DEPTH = 16;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  fis_word_t in_word = '0, out_word;
  logic [$clog2(DEPTH+1)-1:0] level;
  int checks = 0, failures = 0;
  fis_word_t model [$];

  frame_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (int'(level) != model.size() || in_ready != (model.size() < DEPTH) || out_valid != (model.size() > 0)) begin
      failures++; $display("FAIL level %0d model %0d", level, model.size());
    end
    if (out_valid && out_ready) begin
      checks++;
      if (out_word !== model[0]) begin failures++; $display("FAIL word %h exp %h", out_word, model[0]); end
      void'(model.pop_front());
    end
    if (in_valid && in_ready) model.push_back(in_word);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // fill to the top
    in_valid = 1;
    repeat (DEPTH + 4) begin in_word = fis_word_t'({$urandom, 2'($urandom)}); @(negedge clk); end
    checks++;
    if (in_ready) begin failures++; $display("FAIL not full"); end
    in_valid = 0; out_ready = 1;
    repeat (DEPTH + 4) @(negedge clk);
    // random traffic
    repeat (2000) begin
      in_valid = $urandom_range(0, 1); out_ready = $urandom_range(0, 1);
      in_word = fis_word_t'({$urandom, 2'($urandom)});
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
