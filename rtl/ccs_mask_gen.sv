// ccs_mask_gen: execution mask of one partition of a command.
//
// An operand is cut into partitions of N elements, one cache line each. Its first element may
// sit anywhere in the first line and its last anywhere in the last line, so the CCS builds a
// boundary mask that keeps only the words of the line inside the operand, and ANDs it with the
// stride mask written by software (a bit set for every index that is a multiple of the stride)
// to get the execution mask, as the document describes.
//   part   : partition number (line count from the operand's first line)
//   offset : word index of the operand's first element inside its line
//   span   : number of words the operand covers, (len - 1) * stride + 1
//   smask  : software stride mask
//   bmask  : boundary mask, word j set when offset <= part*N + j < offset + span
//   emask  : execution mask, bmask & smask
// Purely combinational. How the span is measured is this design's choice.
module ccs_mask_gen
  import ccs_pkg::*;
#(
  parameter int unsigned N = LINE_WORDS
) (
  input  logic [31:0]          part,
  input  logic [$clog2(N)-1:0] offset,
  input  logic [31:0]          span,
  input  logic [N-1:0]         smask,
  output logic [N-1:0]         bmask,
  output logic [N-1:0]         emask
);

  localparam int unsigned LN = $clog2(N);

  logic [39:0] base;     // word index of the partition's first word, from the operand's line
  logic [39:0] stop;     // one past the operand's last word
  logic [39:0] lo, hi;   // window inside this line, in words

  assign base = {8'd0, part} << LN;
  assign stop = 40'(offset) + 40'(span);
  assign lo   = (part == '0) ? 40'(offset) : 40'd0;
  assign hi   = (stop <= base) ? 40'd0 : (((stop - base) > 40'(N)) ? 40'(N) : (stop - base));

  always_comb begin
    for (int j = 0; j < N; j++) begin
      bmask[j] = (40'(j) >= lo) && (40'(j) < hi);
    end
  end

  assign emask = bmask & smask;

endmodule
