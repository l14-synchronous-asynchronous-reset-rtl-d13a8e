// full_detector: end-of-buffer flag for the selectable buffer size.
//
// The sixteen settings of the buffer size switches select a buffer of
// (size_sel+1) * 2^(AW-4) locations: 128 to 2048 for the 11-bit address.
// full is high when the multiplexed buffer address is at the last location of
// that size or beyond it, so a switch moved to a smaller size also ends the
// current chunk. The lab gives the block and its inputs; the size steps and
// the ">= last" rule are this design's. Purely combinational.
module full_detector #(
  parameter int unsigned AW = 11
) (
  input  logic [AW-1:0] addr,
  input  logic [3:0]    size_sel,
  output logic          full
);

  logic [AW:0] last;   // size - 1

  assign last = ((AW+1)'(size_sel) + 1'b1) * (AW+1)'(2 ** (AW - 4)) - 1'b1;
  assign full = ({1'b0, addr} >= last);

endmodule
