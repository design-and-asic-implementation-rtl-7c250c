// bs_to_bin: borrow-save to two's complement converter.
//
// Returns bin = p - n modulo 2^W. This is the one place where a carry (here a borrow) runs the
// length of the word. The source prints the results of every stage as plain numbers and its
// comparators work on binary words, so each rotator ends in one such conversion; the converter
// itself is this design's addition. Purely combinational.
module bs_to_bin
  import ra_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] n,
  output logic [W-1:0] bin
);
  always_comb bin = p - n;
endmodule
