// bridge_data: the bridge's central controller.  It moves one frame (FIS) at
// a time between the PC side and the SSD side, never in both directions at
// once, with the dual handshake described for the SATA bridge:
//
//  SSD -> PC:  the SSD's link layer requests (d_rx_req); the bridge
//              acknowledges at once (d_rx_ack) and takes the frame into its
//              buffer while it asks the PC side to receive (h_tx_req).  When
//              the PC side is ready (h_tx_rdy) the frame is written to it.  The
//              PC's acknowledgement (h_tx_done/h_tx_ok) is then passed back as
//              the final ACK to the SSD (d_rx_done/d_rx_ok).
//  PC -> SSD:  the PC's request (h_rx_req) is NOT acknowledged at once: the
//              bridge first asks the SSD side (d_tx_req) and waits until it is
//              ready (d_tx_rdy), then acknowledges the PC (h_rx_ack) and
//              writes the frame to the SSD.  The SSD's acknowledgement
//              (d_tx_done/d_tx_ok) becomes the final ACK to the PC
//              (h_rx_done/h_rx_ok).
//
// When both sides request in the same clock the SSD goes first (this
// follows the SATA rule that the host backs off; the document says only that
// one direction is served at a time) and ev_collision pulses.  The frame is
// buffered in a frame_fifo shared by both directions, which is possible since
// only one is active.  In SATA terms a request is a link layer seeing X_RDY,
// ready is R_RDY and the final ACK is R_OK / R_ERR; the link layers
// themselves are outside this block.
//
// Interface per side (h_ = PC link layer, d_ = SSD link layer): rx_req in,
// rx_ack out (one clock), rx_valid/rx_ready/rx_word in (the received frame),
// rx_done/rx_ok out (one clock); tx_req out (level, until the last word is
// sent), tx_rdy in, tx_valid/tx_ready/tx_word out, tx_done/tx_ok in (one
// clock).
module bridge_data
  import xts_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4096
) (
  input  logic      clk,
  input  logic      rst_n,
  // PC side
  input  logic      h_rx_req,
  output logic      h_rx_ack,
  input  logic      h_rx_valid,
  output logic      h_rx_ready,
  input  fis_word_t h_rx_word,
  output logic      h_rx_done,
  output logic      h_rx_ok,
  output logic      h_tx_req,
  input  logic      h_tx_rdy,
  output logic      h_tx_valid,
  input  logic      h_tx_ready,
  output fis_word_t h_tx_word,
  input  logic      h_tx_done,
  input  logic      h_tx_ok,
  // SSD side
  input  logic      d_rx_req,
  output logic      d_rx_ack,
  input  logic      d_rx_valid,
  output logic      d_rx_ready,
  input  fis_word_t d_rx_word,
  output logic      d_rx_done,
  output logic      d_rx_ok,
  output logic      d_tx_req,
  input  logic      d_tx_rdy,
  output logic      d_tx_valid,
  input  logic      d_tx_ready,
  output fis_word_t d_tx_word,
  input  logic      d_tx_done,
  input  logic      d_tx_ok,
  // status
  output logic      busy,
  output logic      ev_collision,
  output logic      ev_d2h_frame,
  output logic      ev_h2d_frame,
  output logic      ev_frame_err
);

  typedef enum logic [3:0] {
    IDLE,
    D2H_ACK, D2H_XFER, D2H_WAIT, D2H_FINAL,
    H2D_WAIT_RDY, H2D_ACK, H2D_XFER, H2D_WAIT, H2D_FINAL
  } state_t;

  state_t state;
  logic   tx_go;       // destination has signalled ready
  logic   in_done;     // last word of the frame is in the buffer
  logic   out_done;    // last word of the frame has left the buffer
  logic   ack_ok;      // acknowledgement from the destination
  logic   ack_seen;    // ... has arrived (it may come as the last word leaves)

  logic d2h, h2d;
  assign d2h = (state == D2H_XFER);
  assign h2d = (state == H2D_XFER);

  // ------------------------------------------------ buffer
  logic      f_in_valid, f_in_ready, f_out_valid, f_out_ready;
  fis_word_t f_in_word, f_out_word;
  logic [$clog2(FIFO_DEPTH+1)-1:0] f_level;

  frame_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid(f_in_valid), .in_ready(f_in_ready), .in_word(f_in_word),
    .out_valid(f_out_valid), .out_ready(f_out_ready), .out_word(f_out_word),
    .level(f_level)
  );

  assign f_in_word  = d2h ? d_rx_word : h_rx_word;
  assign f_in_valid = !in_done && ((d2h && d_rx_valid) || (h2d && h_rx_valid));
  assign d_rx_ready = d2h && !in_done && f_in_ready;
  assign h_rx_ready = h2d && !in_done && f_in_ready;

  assign h_tx_word   = f_out_word;
  assign d_tx_word   = f_out_word;
  assign h_tx_valid  = d2h && tx_go && !out_done && f_out_valid;
  assign d_tx_valid  = h2d && !out_done && f_out_valid;
  assign f_out_ready = (h_tx_valid && h_tx_ready) || (d_tx_valid && d_tx_ready);

  // ------------------------------------------------ handshake outputs
  assign d_rx_ack  = (state == D2H_ACK);
  assign h_rx_ack  = (state == H2D_ACK);
  assign d_rx_done = (state == D2H_FINAL);
  assign h_rx_done = (state == H2D_FINAL);
  assign d_rx_ok   = ack_ok;
  assign h_rx_ok   = ack_ok;
  assign h_tx_req  = ((state == D2H_ACK) || (state == D2H_XFER)) && !out_done;
  assign d_tx_req  = (state == H2D_WAIT_RDY) || (state == H2D_ACK) || ((state == H2D_XFER) && !out_done);
  assign busy      = (state != IDLE);

  assign ev_collision = (state == IDLE) && d_rx_req && h_rx_req;
  assign ev_d2h_frame = (state == D2H_FINAL);
  assign ev_h2d_frame = (state == H2D_FINAL);
  assign ev_frame_err = ((state == D2H_FINAL) || (state == H2D_FINAL)) && !ack_ok;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      tx_go    <= 1'b0;
      in_done  <= 1'b0;
      out_done <= 1'b0;
      ack_ok   <= 1'b0;
      ack_seen <= 1'b0;
    end else begin
      if (f_in_valid && f_in_ready && f_in_word.eof)    in_done  <= 1'b1;
      if (f_out_valid && f_out_ready && f_out_word.eof) out_done <= 1'b1;
      unique case (state)
        IDLE: begin
          tx_go <= 1'b0; in_done <= 1'b0; out_done <= 1'b0; ack_seen <= 1'b0;
          if (d_rx_req)      state <= D2H_ACK;
          else if (h_rx_req) state <= H2D_WAIT_RDY;
        end
        D2H_ACK:  begin
          state <= D2H_XFER;
          if (h_tx_rdy) tx_go <= 1'b1;
        end
        D2H_XFER: begin
          if (h_tx_rdy) tx_go <= 1'b1;
          if (h_tx_done) begin ack_ok <= h_tx_ok; ack_seen <= 1'b1; end
          if (out_done) state <= D2H_WAIT;
        end
        D2H_WAIT: begin
          if (h_tx_done) ack_ok <= h_tx_ok;
          if (h_tx_done || ack_seen) state <= D2H_FINAL;
        end
        D2H_FINAL: state <= IDLE;
        H2D_WAIT_RDY: if (d_tx_rdy) state <= H2D_ACK;
        H2D_ACK:  begin tx_go <= 1'b1; state <= H2D_XFER; end
        H2D_XFER: begin
          if (d_tx_done) begin ack_ok <= d_tx_ok; ack_seen <= 1'b1; end
          if (out_done) state <= H2D_WAIT;
        end
        H2D_WAIT: begin
          if (d_tx_done) ack_ok <= d_tx_ok;
          if (d_tx_done || ack_seen) state <= H2D_FINAL;
        end
        H2D_FINAL: state <= IDLE;
        default:   state <= IDLE;
      endcase
    end
  end

  // only one direction moves data at a time
  a_one_direction: assert property (@(posedge clk) disable iff (!rst_n)
    !(h_tx_valid && d_tx_valid) && !(h_rx_ready && d_rx_ready));
  // a PC request is acknowledged only after the SSD side was ready
  a_h2d_after_rdy: assert property (@(posedge clk) disable iff (!rst_n)
    h_rx_ack |-> $past(d_tx_rdy));

endmodule
