// tb_lba_tracker: self-checking test of the LBA tracker.
// Sends Register FIS for WRITE/READ DMA EXT and READ/WRITE DMA (28-bit),
// a non-data command (which must pulse seq_stop), two queued commands followed by DMA Setup FIS with a
// byte offset, and checks which sequence start fires and with which LBA.
module tb_lba_tracker;
  import xts_pkg::*;

  logic clk = 0, rst_n = 0;
  logic h2d_valid = 0, d2h_valid = 0;
  fis_word_t h2d_word = '0, d2h_word = '0;
  logic wr_seq_start, rd_seq_start, seq_stop, ev_command, ev_ncq_setup;
  lba_t wr_lba, rd_lba;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0, n_stop = 0;
  lba_t last_wr, last_rd;

  lba_tracker dut (.*);

  always #5 clk = ~clk;

  always @(negedge clk) begin
    if (wr_seq_start) begin n_wr++; last_wr = wr_lba; end
    if (rd_seq_start) begin n_rd++; last_rd = rd_lba; end
    if (seq_stop) n_stop++;
  end

  task automatic send(input bit h2d, input dword_t w [$]);
    for (int i = 0; i < w.size(); i++) begin
      if (h2d) begin h2d_valid = 1; h2d_word = '{sof: i == 0, eof: i == w.size() - 1, data: w[i]}; end
      else     begin d2h_valid = 1; d2h_word = '{sof: i == 0, eof: i == w.size() - 1, data: w[i]}; end
      @(negedge clk);
      h2d_valid = 0; d2h_valid = 0;
      if ($urandom_range(0, 1) != 0) @(negedge clk);
    end
    repeat (2) @(negedge clk);
  endtask

  function automatic void regfis(output dword_t w [$], input logic [7:0] cmd, input lba_t lba,
                                 input logic [7:0] cnt, input logic [7:0] dev);
    dword_t d0, d1, d2, d3;
    d0 = 32'h0000_8027 | (dword_t'(cmd) << 16);
    d1 = (dword_t'(dev) << 24) | dword_t'(lba[23:0]);
    d2 = dword_t'(lba[47:24]);
    d3 = dword_t'(cnt);
    w = {d0, d1, d2, d3, 32'h0};
  endfunction

  task automatic expect_start(input int wr, input int rd, input lba_t l, input string what);
    checks++;
    if (n_wr != wr || n_rd != rd) begin failures++; $display("FAIL %s: starts wr %0d rd %0d", what, n_wr, n_rd); end
    checks++;
    if ((wr > 0 && last_wr !== l && n_wr == wr && rd == n_rd && what[0] == "w") ||
        (rd > 0 && last_rd !== l && what[0] == "r")) begin
      failures++; $display("FAIL %s: lba wr %h rd %h exp %h", what, last_wr, last_rd, l);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog");
    checks++;
    if (n_stop != 1) begin failures++; $display("FAIL data commands stopped the context: %0d", n_stop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    dword_t w [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    regfis(w, ATA_WRITE_DMA_EXT, 48'h1234_5678_9abc, 8, 8'h40); send(1, w);
    expect_start(1, 0, 48'h1234_5678_9abc, "write dma ext");
    regfis(w, ATA_READ_DMA_EXT, 48'hfedc_ba98_7654, 8, 8'h40); send(1, w);
    expect_start(1, 1, 48'hfedc_ba98_7654, "read dma ext");
    regfis(w, ATA_WRITE_DMA, 48'h0000_0012_3456, 1, 8'he7); send(1, w);
    expect_start(2, 1, 48'h0000_0712_3456, "write dma (28-bit)");
    regfis(w, ATA_READ_DMA, 48'h0000_00ab_cdef, 1, 8'he3); send(1, w);
    expect_start(2, 2, 48'h0000_03ab_cdef, "read dma (28-bit)");
    regfis(w, 8'hEC, 48'h0000_0055_5555, 1, 8'h40); send(1, w);    // IDENTIFY: no start
    expect_start(2, 2, 48'h0000_03ab_cdef, "rd identify");
    checks++;
    if (n_stop != 1) begin failures++; $display("FAIL IDENTIFY: %0d stops", n_stop); end
    // queued: tag 5 write at 0x1000, tag 9 read at 0x2000
    regfis(w, ATA_WRITE_FPDMA_Q, 48'h1000, 5 << 3, 8'h40); send(1, w);
    regfis(w, ATA_READ_FPDMA_Q,  48'h2000, 9 << 3, 8'h40); send(1, w);
    expect_start(2, 2, 48'h0000_03ab_cdef, "rd queued: no start yet");
    // DMA Setup, read, tag 9, offset 3 sectors
    w = {32'h0000_2041, 32'd9, 32'h0, 32'h0, 32'd1536, 32'd4096, 32'h0}; send(0, w);
    expect_start(2, 3, 48'h2003, "rd dma setup tag 9");
    // DMA Setup, write, tag 5, offset 0
    w = {32'h0000_0041, 32'd5, 32'h0, 32'h0, 32'd0, 32'd4096, 32'h0}; send(0, w);
    expect_start(3, 3, 48'h1000, "wr dma setup tag 5");
    // a Data FIS from the SSD does not start anything
    w = {32'h0000_0046, 32'h41, 32'h0, 32'h0, 32'h0, 32'h0, 32'h0}; send(0, w);
    expect_start(3, 3, 48'h1000, "wr data fis");
    checks++;
    if (n_stop != 1) begin failures++; $display("FAIL data commands stopped the context: %0d", n_stop); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
