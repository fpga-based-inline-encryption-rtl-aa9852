// lba_tracker: finds the sector number (LBA) of the data that follows a
// command, so that the XTS tweak of every sector can be generated.
//
// XTS needs, for each 512-byte sector, its logical block address.  The LBA
// is not carried by the Data FIS, only by the command, so this block watches
// the FIS accepted from both link layers:
//  * PC to SSD, Register FIS (type 0x27, C bit set): READ/WRITE DMA (28-bit
//    LBA) and READ/WRITE DMA EXT (48-bit LBA) start a tweak sequence at the
//    command's LBA for the decrypt path (reads) or the encrypt path (writes)
//    as soon as the FIS ends.  READ/WRITE FPDMA QUEUED (native command
//    queuing) only records the LBA under the command's tag (Count[7:3]).
//  * SSD to PC, DMA Setup FIS (type 0x41): for a queued command the SSD names
//    the tag (DMA buffer identifier [4:0]), the direction (D bit) and the byte
//    offset; the sequence starts at LBA(tag) + offset / 512.
// The document states that the tweak comes from the sector's LBA; how the LBA
// is obtained from the SATA traffic is this design's own (field positions are
// those of the SATA/ATA standards).
//
// Interface: *_valid/*_word are the dwords accepted on each side (snoop
// only).  wr_seq_start/rd_seq_start pulse for one clock, with the sector
// number on wr_lba/rd_lba, one clock after the last dword of the FIS.
// seq_stop pulses in the same way for any other command (IDENTIFY DEVICE,
// SMART, FLUSH, ...): the data of such a command is not sector data and
// must not be ciphered, so the bridge drops its cipher context on both
// paths until the next read or write command.
module lba_tracker
  import xts_pkg::*;
#(
  parameter int unsigned NCQ_TAGS = 32
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      h2d_valid,
  input  fis_word_t h2d_word,
  input  logic      d2h_valid,
  input  fis_word_t d2h_word,
  output logic      wr_seq_start,
  output lba_t      wr_lba,
  output logic      rd_seq_start,
  output lba_t      rd_lba,
  output logic      seq_stop,
  output logic      ev_command,
  output logic      ev_ncq_setup
);

  // ------------------------------------------------ PC -> SSD command FIS
  logic [2:0] h_idx;
  logic       h_is_cmd;
  logic [7:0] h_cmd;
  logic [7:0] h_dev;
  lba_t       h_lba;
  logic [7:0] h_count;
  lba_t       ncq_lba [NCQ_TAGS];

  // value of the fields including the dword accepted this clock
  logic [7:0] c_cmd, c_dev, c_count;
  lba_t       c_lba;
  always_comb begin
    c_cmd   = h_cmd;
    c_dev   = h_dev;
    c_lba   = h_lba;
    c_count = h_count;
    if (h_idx == 3'd1) begin c_lba[23:0] = h2d_word.data[23:0]; c_dev = h2d_word.data[31:24]; end
    if (h_idx == 3'd2) c_lba[47:24] = h2d_word.data[23:0];
    if (h_idx == 3'd3) c_count = h2d_word.data[7:0];
  end

  // ------------------------------------------------ SSD -> PC DMA Setup FIS
  logic [2:0]  d_idx;
  logic        d_is_setup, d_dir;
  logic [4:0]  d_tag;
  logic [31:0] d_offset;

  localparam int unsigned TAG_W = (NCQ_TAGS > 1) ? $clog2(NCQ_TAGS) : 1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_idx <= '0; h_is_cmd <= 1'b0; h_cmd <= '0; h_dev <= '0; h_lba <= '0; h_count <= '0;
      d_idx <= '0; d_is_setup <= 1'b0; d_dir <= 1'b0; d_tag <= '0; d_offset <= '0;
      wr_seq_start <= 1'b0; rd_seq_start <= 1'b0; wr_lba <= '0; rd_lba <= '0;
      ev_command <= 1'b0; ev_ncq_setup <= 1'b0; seq_stop <= 1'b0;
      for (int t = 0; t < NCQ_TAGS; t++) ncq_lba[t] <= '0;
    end else begin
      wr_seq_start <= 1'b0;
      rd_seq_start <= 1'b0;
      ev_command   <= 1'b0;
      ev_ncq_setup <= 1'b0;
      seq_stop     <= 1'b0;

      // PC -> SSD
      if (h2d_valid) begin
        if (h2d_word.sof) begin
          h_idx    <= 3'd1;
          h_is_cmd <= (h2d_word.data[7:0] == FIS_REG_H2D) && h2d_word.data[15];
          h_cmd    <= h2d_word.data[23:16];
        end else if (h_idx != 3'd7) begin
          h_idx <= h_idx + 3'd1;
        end
        h_dev <= c_dev; h_lba <= c_lba; h_count <= c_count;
        if (h2d_word.eof && !h2d_word.sof && h_is_cmd && h_idx >= 3'd3) begin
          unique case (c_cmd)
            ATA_WRITE_DMA_EXT: begin wr_seq_start <= 1'b1; wr_lba <= c_lba; ev_command <= 1'b1; end
            ATA_READ_DMA_EXT:  begin rd_seq_start <= 1'b1; rd_lba <= c_lba; ev_command <= 1'b1; end
            ATA_WRITE_DMA: begin
              wr_seq_start <= 1'b1; wr_lba <= {20'h0, c_dev[3:0], c_lba[23:0]}; ev_command <= 1'b1;
            end
            ATA_READ_DMA: begin
              rd_seq_start <= 1'b1; rd_lba <= {20'h0, c_dev[3:0], c_lba[23:0]}; ev_command <= 1'b1;
            end
            ATA_WRITE_FPDMA_Q, ATA_READ_FPDMA_Q: begin
              ncq_lba[TAG_W'(c_count[7:3])] <= c_lba;
              ev_command <= 1'b1;
            end
            default: seq_stop <= 1'b1;
          endcase
        end
      end

      // SSD -> PC
      if (d2h_valid) begin
        if (d2h_word.sof) begin
          d_idx      <= 3'd1;
          d_is_setup <= (d2h_word.data[7:0] == FIS_DMA_SETUP);
          d_dir      <= d2h_word.data[13];
        end else if (d_idx != 3'd7) begin
          d_idx <= d_idx + 3'd1;
        end
        if (d_idx == 3'd1) d_tag    <= d2h_word.data[4:0];
        if (d_idx == 3'd4) d_offset <= d2h_word.data;
        if (d2h_word.eof && !d2h_word.sof && d_is_setup && d_idx >= 3'd5) begin
          ev_ncq_setup <= 1'b1;
          if (d_dir) begin
            rd_seq_start <= 1'b1;
            rd_lba <= ncq_lba[TAG_W'(d_tag)] + lba_t'(d_offset[31:9]);
          end else begin
            wr_seq_start <= 1'b1;
            wr_lba <= ncq_lba[TAG_W'(d_tag)] + lba_t'(d_offset[31:9]);
          end
        end
      end
    end
  end

endmodule
