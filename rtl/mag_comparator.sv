// mag_comparator: unsigned magnitude comparator with A>B, A=B and A<B outputs.
//
// Built like the source's gate diagram, widened to W bits: per bit an XNOR gives e[i] = (a[i]
// == b[i]); A=B is the AND of all e[i]; A>B is the OR over i of a[i] & ~b[i] & (all e[j], j>i),
// and A<B the OR of ~a[i] & b[i] & (the same prefix). The source uses two 16-bit comparators in
// stage 2; words are compared as unsigned numbers, which matches its worked example (5500 is
// taken as lower than 60736). Purely combinational.
module mag_comparator
  import ra_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         a_gt_b,
  output logic         a_eq_b,
  output logic         a_lt_b
);
  logic [W-1:0] e;      // bitwise equality
  logic [W:0]   above;  // above[i]: all bits above position i-1 are equal, i.e. bits W-1..i
  logic [W-1:0] gt_t, lt_t;

  always_comb begin
    e        = ~(a ^ b);
    above[W] = 1'b1;
    for (int i = W - 1; i >= 0; i--) begin
      above[i] = above[i+1] & e[i];
      gt_t[i]  = a[i] & ~b[i] & above[i+1];
      lt_t[i]  = ~a[i] & b[i] & above[i+1];
    end
    a_eq_b = above[0];
    a_gt_b = |gt_t;
    a_lt_b = |lt_t;
  end
endmodule
