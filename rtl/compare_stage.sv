// compare_stage: stage 2, choice between the two stage-1 rotator results.
//
// Two mag_comparators compare the friend-angle and USR results separately, one on the x words
// and one on the y words. With pick_large = 0 each output takes the lower of its two inputs (the
// source's A<B choice, for the smallest remaining angle); with pick_large = 1 the higher (A>B).
// On equality the friend-angle value is passed. The x and y words are chosen independently, as
// the source compares them separately; fa_x_taken / fa_y_taken report which rotator supplied
// each word. Purely combinational.
module compare_stage
  import ra_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] fa_x,
  input  logic [W-1:0] fa_y,
  input  logic [W-1:0] usr_x,
  input  logic [W-1:0] usr_y,
  input  logic         pick_large,
  output logic [W-1:0] x_sel,
  output logic [W-1:0] y_sel,
  output logic         fa_x_taken,
  output logic         fa_y_taken
);
  logic x_gt, x_eq, x_lt, y_gt, y_eq, y_lt;

  mag_comparator #(.W(W)) u_cmp_x (.a(fa_x), .b(usr_x), .a_gt_b(x_gt), .a_eq_b(x_eq), .a_lt_b(x_lt));
  mag_comparator #(.W(W)) u_cmp_y (.a(fa_y), .b(usr_y), .a_gt_b(y_gt), .a_eq_b(y_eq), .a_lt_b(y_lt));

  always_comb begin
    fa_x_taken = x_eq | (pick_large ? x_gt : x_lt);
    fa_y_taken = y_eq | (pick_large ? y_gt : y_lt);
    x_sel      = fa_x_taken ? fa_x : usr_x;
    y_sel      = fa_y_taken ? fa_y : usr_y;
  end
endmodule
