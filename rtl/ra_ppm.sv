// ra_ppm: a row of W redundant-arithmetic plus-plus-minus (RA-PPM) cells.
//
// Each cell takes two positively weighted bits a, b and one negatively weighted bit m of the
// same position and produces a positive carry c (weight 2) and a negative sum s (weight 1) with
//     a + b - m = 2*c - s.
// The cells are independent: there is no carry chain, so the delay does not depend on W. The
// caller places c one position higher. Following the source, a cell is only XOR, NAND and
// inverter gates: s = a ^ b ^ m, c = NAND(NAND(a,b), NAND(a^b, ~m)), which is a full adder with
// inverters on the minus input and on the sum. The gate equations are this design's reading of
// the cell's name and arithmetic; the source's schematic is only a picture of them.
// Purely combinational.
module ra_ppm
  import ra_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] a,  // plus
  input  logic [W-1:0] b,  // plus
  input  logic [W-1:0] m,  // minus
  output logic [W-1:0] c,  // plus, weight 2 (bit i belongs at position i+1)
  output logic [W-1:0] s   // minus, weight 1
);
  logic [W-1:0] t_xor, n_ab, n_tm;

  always_comb begin
    t_xor = a ^ b;
    n_ab  = ~(a & b);
    n_tm  = ~(t_xor & ~m);
    c     = ~(n_ab & n_tm);
    s     = t_xor ^ m;
  end
endmodule
