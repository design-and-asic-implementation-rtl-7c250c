// ra_addsub: redundant-arithmetic integrated adder and subtractor.
//
// Computes Z = X + Y + cin (ctrl = 0) or Z = X - Y + cin (ctrl = 1) on borrow-save operands
// (value = p - n, modulo 2^W) and returns Z in borrow-save form. As in the source, the unit is
// two RA-PPM rows and two RA-MMP rows and a control bit chooses between sum and difference; the
// constant input cin enters the free least significant position of the carry word.
//
// Per bit, one RA-PPM row folds x.p, one plus rail of Y and x.n into a positive carry and a
// negative sum; one RA-MMP row then folds that sum, the other rail of Y and the carries from the
// position below into the result. For X + Y the plus rail of Y goes to the RA-PPM row and the
// minus rail to the RA-MMP row; for X - Y the rails swap roles. Both pairs of rows are built and
// ctrl selects one result, so the select is the only logic after the cells and the delay does
// not grow with W. This pairing of the four cells is this design's reading of the source's block
// diagram; the source's "garbage" outputs have no function here and are not produced.
//
// cout_p / cout_n are the carries that leave the top of the word (positive from the RA-PPM row,
// negative from the RA-MMP row) for the selected operation; the result wraps modulo 2^W.
// Purely combinational.
module ra_addsub
  import ra_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] x_p,
  input  logic [W-1:0] x_n,
  input  logic [W-1:0] y_p,
  input  logic [W-1:0] y_n,
  input  logic         ctrl,   // 0: add, 1: subtract
  input  logic         cin,    // constant input, weight 1
  output logic [W-1:0] z_p,
  output logic [W-1:0] z_n,
  output logic         cout_p,
  output logic         cout_n
);
  // Sum path: x.p + y.p - x.n, then - s - y.n + carries.
  logic [W-1:0] add_c1, add_s1, add_s2, add_c2;
  // Difference path: x.p + y.n - x.n, then - s - y.p + carries.
  logic [W-1:0] sub_c1, sub_s1, sub_s2, sub_c2;

  ra_ppm #(.W(W)) u_ppm_add (.a(x_p), .b(y_p), .m(x_n), .c(add_c1), .s(add_s1));
  ra_mmp #(.W(W)) u_mmp_add (.a(add_s1), .b(y_n), .p({add_c1[W-2:0], cin}), .s(add_s2), .c(add_c2));

  ra_ppm #(.W(W)) u_ppm_sub (.a(x_p), .b(y_n), .m(x_n), .c(sub_c1), .s(sub_s1));
  ra_mmp #(.W(W)) u_mmp_sub (.a(sub_s1), .b(y_p), .p({sub_c1[W-2:0], cin}), .s(sub_s2), .c(sub_c2));

  always_comb begin
    if (ctrl) begin
      z_p    = sub_s2;
      z_n    = {sub_c2[W-2:0], 1'b0};
      cout_p = sub_c1[W-1];
      cout_n = sub_c2[W-1];
    end else begin
      z_p    = add_s2;
      z_n    = {add_c2[W-2:0], 1'b0};
      cout_p = add_c1[W-1];
      cout_n = add_c2[W-1];
    end
  end
endmodule
