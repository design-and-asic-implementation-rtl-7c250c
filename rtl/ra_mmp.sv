// ra_mmp: a row of W redundant-arithmetic minus-minus-plus (RA-MMP) cells.
//
// Each cell takes two negatively weighted bits a, b and one positively weighted bit p of the
// same position and produces a positive sum s (weight 1) and a negative carry c (weight 2) with
//     -a - b + p = s - 2*c.
// No carry chain: the cells are independent, the caller places c one position higher. A cell is
// a full adder with inverters on the two minus inputs and on the carry, written with XOR, NAND
// and inverters: s = a ^ b ^ p, c = ~NAND(NAND(~a,~b), NAND(a^b, p)). The gate equations are this
// design's; the source names the cell and shows its schematic without legible equations.
// Purely combinational.
module ra_mmp
  import ra_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] a,  // minus
  input  logic [W-1:0] b,  // minus
  input  logic [W-1:0] p,  // plus
  output logic [W-1:0] s,  // plus, weight 1
  output logic [W-1:0] c   // minus, weight 2 (bit i belongs at position i+1)
);
  logic [W-1:0] t_xor, n_ab, n_tp;

  always_comb begin
    t_xor = a ^ b;
    n_ab  = ~(~a & ~b);
    n_tp  = ~(t_xor & p);
    c     = ~(~(n_ab & n_tp));
    s     = t_xor ^ p;
  end
endmodule
