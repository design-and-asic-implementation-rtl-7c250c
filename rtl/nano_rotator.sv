// nano_rotator: nano-rotation shift-and-add rotator (stage 3).
//
// Same shape as the USR rotator but with a longer shift on the y path, as in the source's
// block diagram:
//     xout = (x << (2K-1)) + mx   (dir = 0)      mx = sel ? (y << K) : x
//     xout = (x << (2K-1)) - mx   (dir = 1)
//     yout = (y << (3K-1)) + my                   my = sel ? (x << K) : y
// sel follows the diagram's multiplexer labels (0: unshifted operand of the same path, 1:
// shifted operand of the other path). The two adders are ra_addsub units on borrow-save values,
// each output is converted back to a plain word, and everything wraps modulo 2^W. The source
// leaves K open (it is chosen from the range of input angles); K = 4 is this design's default.
// Purely combinational.
module nano_rotator
  import ra_pkg::*;
#(
  parameter int unsigned W = DATA_W,
  parameter int unsigned K = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         sel,
  input  logic         dir,   // x path: 0 add, 1 subtract
  output logic [W-1:0] xout,
  output logic [W-1:0] yout
);
  logic [W-1:0] mx, my;
  logic [W-1:0] xs_p, xs_n, ys_p, ys_n;

  always_comb begin
    mx = sel ? W'(y << K) : x;
    my = sel ? W'(x << K) : y;
  end

  ra_addsub #(.W(W)) u_add_x (
    .x_p(W'(x << (2*K-1))), .x_n('0), .y_p(mx), .y_n('0), .ctrl(dir), .cin(1'b0),
    .z_p(xs_p), .z_n(xs_n), .cout_p(), .cout_n());
  ra_addsub #(.W(W)) u_add_y (
    .x_p(W'(y << (3*K-1))), .x_n('0), .y_p(my), .y_n('0), .ctrl(1'b0), .cin(1'b0),
    .z_p(ys_p), .z_n(ys_n), .cout_p(), .cout_n());

  bs_to_bin #(.W(W)) u_cvt_x (.p(xs_p), .n(xs_n), .bin(xout));
  bs_to_bin #(.W(W)) u_cvt_y (.p(ys_p), .n(ys_n), .bin(yout));
endmodule
