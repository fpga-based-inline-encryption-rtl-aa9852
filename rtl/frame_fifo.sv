// frame_fifo: first-in first-out buffer of FIS dwords (with their start and
// end-of-frame marks) for the bridge's intermediate buffering.
//
// A plain circular buffer: `mem` is written at wr_ptr when a word is
// accepted and read at rd_ptr (first word falls through, read is
// combinational from the array).  `count` tracks the fill level.  The
// default depth of 4096 dwords holds one complete Data FIS of the largest
// size SATA allows (1 header dword + 2048 payload dwords = 8 KiB) with room to
// spare, so the bridge can accept a whole frame from one side while the
// other side is not yet ready.  The depth is this design's choice; the
// document says only that the bridge buffers data.
//
// Interface: valid/ready on both sides; `level` is the number of words held.
module frame_fifo
  import xts_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  fis_word_t                  in_word,
  output logic                       out_valid,
  input  logic                       out_ready,
  output fis_word_t                  out_word,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  fis_word_t         mem [DEPTH];
  logic [AW-1:0]     wr_ptr, rd_ptr;
  logic              push, pop;

  assign in_ready  = (32'(level) < DEPTH);
  assign out_valid = (level != '0);
  assign out_word  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      level  <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      level <= level + ($bits(level))'(push) - ($bits(level))'(pop);
    end
  end

endmodule
