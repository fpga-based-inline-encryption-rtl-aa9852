// tb_bridge_data: self-checking test of the bridge controller.
// Behavioural link-layer models on both sides send frames (request, wait
// for ACK, stream the words, wait for the final ACK) and receive frames
// (answer a request with ready after a random delay, accept words with
// random back-pressure, acknowledge after the last word, sometimes with an
// error).  Checks that every frame arrives unchanged and in order on the
// other side, that the final ACK to the sender carries the receiver's
// status, that an SSD request is acknowledged immediately (within 2 clocks
// when the bridge is idle) while a PC request is acknowledged only after the
// SSD side was ready, and that simultaneous requests occur and are served
// SSD first.
module tb_bridge_data;
  import xts_pkg::*;

  logic clk = 0, rst_n = 0;
  logic h_rx_req = 0, h_rx_ack, h_rx_valid = 0, h_rx_ready, h_rx_done, h_rx_ok;
  fis_word_t h_rx_word = '0, h_tx_word, d_rx_word = '0, d_tx_word;
  logic h_tx_req, h_tx_rdy = 0, h_tx_valid, h_tx_ready = 0, h_tx_done = 0, h_tx_ok = 0;
  logic d_rx_req = 0, d_rx_ack, d_rx_valid = 0, d_rx_ready, d_rx_done, d_rx_ok;
  logic d_tx_req, d_tx_rdy = 0, d_tx_valid, d_tx_ready = 0, d_tx_done = 0, d_tx_ok = 0;
  logic busy, ev_collision, ev_d2h_frame, ev_h2d_frame, ev_frame_err;
  int checks = 0, failures = 0;

  bridge_data #(.FIFO_DEPTH(64)) dut (.*);

  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  typedef dword_t frame_t [$];
  frame_t h_send [$], d_send [$];        // frames each side will send
  frame_t h_exp [$], d_exp [$];          // frames each side must receive
  bit     h_exp_ok [$], d_exp_ok [$];    // status each receiver will give
  int n_coll = 0, n_err = 0, n_h2d = 0, n_d2h = 0;
  int last_d_tx_rdy_cyc = -1;

  function automatic frame_t rnd_frame();
    frame_t f;
    int n = $urandom_range(1, 40);
    f.push_back(32'h46 | ($urandom & 32'hffff_ff00));
    for (int i = 1; i < n; i++) f.push_back($urandom);
    return f;
  endfunction

  always @(negedge clk) begin
    n_coll += int'(ev_collision);
    n_err  += int'(ev_frame_err);
    n_h2d  += int'(ev_h2d_frame);
    n_d2h  += int'(ev_d2h_frame);
  end

  // sender model; side 0 = PC, 1 = SSD
  task automatic sender(input int side);
    forever begin
      frame_t f;
      int t_req;
      wait ((side == 0 ? h_send.size() : d_send.size()) != 0);
      @(negedge clk);
      f = (side == 0) ? h_send.pop_front() : d_send.pop_front();
      if (side == 0) h_rx_req = 1; else d_rx_req = 1;
      t_req = cyc;
      do @(negedge clk); while (!(side == 0 ? h_rx_ack : d_rx_ack));
      if (side == 0) begin
        checks++;
        if (last_d_tx_rdy_cyc < t_req) begin failures++; $display("FAIL PC acked before SSD ready"); end
        h_rx_req = 0;
      end else begin
        d_rx_req = 0;
      end
      for (int i = 0; i < f.size(); i++) begin
        fis_word_t w;
        w = '{sof: i == 0, eof: i == f.size() - 1, data: f[i]};
        if (side == 0) begin h_rx_valid = 1; h_rx_word = w; end
        else           begin d_rx_valid = 1; d_rx_word = w; end
        #1;
        while (!(side == 0 ? h_rx_ready : d_rx_ready)) begin @(negedge clk); #1; end
        @(negedge clk);
        if (side == 0) h_rx_valid = 0; else d_rx_valid = 0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
      while (!(side == 0 ? h_rx_done : d_rx_done)) @(negedge clk);
      checks++;
      begin
        bit okv = (side == 0) ? h_rx_ok : d_rx_ok;
        bit ex  = (side == 0) ? d_exp_ok.pop_front() : h_exp_ok.pop_front();
        if (okv !== ex) begin failures++; $display("FAIL final ACK status side %0d", side); end
      end
    end
  endtask

  // receiver model; side 0 = PC, 1 = SSD
  task automatic receiver(input int side);
    forever begin
      frame_t got;
      bit ok;
      while (!(side == 0 ? h_tx_req : d_tx_req)) @(negedge clk);
      repeat ($urandom_range(0, 6)) @(negedge clk);
      if (side == 0) h_tx_rdy = 1; else begin d_tx_rdy = 1; last_d_tx_rdy_cyc = cyc; end
      got = {};
      forever begin
        bit r = ($urandom_range(0, 3) != 0);
        if (side == 0) h_tx_ready = r; else d_tx_ready = r;
        #1;
        if (side == 0 ? (h_tx_valid && h_tx_ready) : (d_tx_valid && d_tx_ready)) begin
          fis_word_t w = (side == 0) ? h_tx_word : d_tx_word;
          checks++;
          if (w.sof != (got.size() == 0)) begin failures++; $display("FAIL sof"); end
          got.push_back(w.data);
          @(negedge clk);
          if (w.eof) break;
        end else @(negedge clk);
      end
      h_tx_ready = (side == 0) ? 0 : h_tx_ready;
      d_tx_ready = (side == 1) ? 0 : d_tx_ready;
      if (side == 0) h_tx_rdy = 0; else d_tx_rdy = 0;
      checks++;
      begin
        frame_t e = (side == 0) ? h_exp.pop_front() : d_exp.pop_front();
        if (got != e) begin failures++; $display("FAIL frame to side %0d differs", side); end
      end
      repeat ($urandom_range(0, 3)) @(negedge clk);
      ok = (side == 0) ? h_exp_ok[0] : d_exp_ok[0];
      if (side == 0) begin h_tx_done = 1; h_tx_ok = ok; end else begin d_tx_done = 1; d_tx_ok = ok; end
      @(negedge clk);
      h_tx_done = 0; d_tx_done = 0;
    end
  endtask

  // queue a frame from side s; the receiver answers with status ok
  task automatic queue_frame(input int s, input bit ok);
    frame_t f = rnd_frame();
    if (s == 0) begin h_send.push_back(f); d_exp.push_back(f); d_exp_ok.push_back(ok); end
    else        begin d_send.push_back(f); h_exp.push_back(f); h_exp_ok.push_back(ok); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int t;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      sender(0); sender(1); receiver(0); receiver(1);
    join_none
    // simultaneous requests
    queue_frame(0, 1); queue_frame(1, 1);
    // SSD request while idle: ACK must be immediate
    wait (h_send.size() == 0 && d_send.size() == 0 && h_exp.size() == 0 && d_exp.size() == 0);
    while (busy) @(negedge clk);
    repeat (5) @(negedge clk);
    queue_frame(1, 1);
    t = cyc;
    while (!d_rx_ack) @(negedge clk);
    checks++;
    if (cyc - t > 3) begin failures++; $display("FAIL SSD ACK after %0d clocks", cyc - t); end
    // random mix, some with error status
    for (int i = 0; i < 40; i++) begin
      queue_frame($urandom_range(0, 1), $urandom_range(0, 7) != 0);
      repeat ($urandom_range(0, 30)) @(negedge clk);
    end
    queue_frame(0, 0);
    wait (h_send.size() == 0 && d_send.size() == 0 && h_exp.size() == 0 && d_exp.size() == 0);
    repeat (20) @(negedge clk);
    checks += 3;
    if (n_coll == 0) begin failures++; $display("FAIL no collision seen"); end
    if (n_err == 0) begin failures++; $display("FAIL no error status passed"); end
    if (n_h2d + n_d2h != 44) begin failures++; $display("FAIL %0d frames completed", n_h2d + n_d2h); end
    $display("frames pc->ssd %0d ssd->pc %0d collisions %0d errors %0d", n_h2d, n_d2h, n_coll, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
