// friend_angle_rotator: friend-angle kernel rotator (stage 1, beside the USR rotator).
//
// Five adders and seven 2:1 multiplexers, as the source states and draws. A kernel setting
// (0, 1 or 2, the numbers printed on the multiplexer inputs of the source's block diagram)
// chooses which shifted operands reach the adders, and three add/subtract units take a
// direction bit each. With k the kernel and d the direction bits (1 = subtract):
//     T1 = (x << 1) -/+ (k == 0 ? x : x << 1)           d[0]
//     M  = (k == 2 ? x << 2 : x << 5) + y
//     X  = (k == 0 ? y : M) -/+ (k == 1 ? T1 << 2 : T1 << 3)     d[1]
//     L  = (y << 4) -/+ (k == 0 ? y << 3 : x)            d[2]
//     Y  = L + (k == 2 ? M << 2 : (k == 1 ? T1 : y))
// The shift amounts, the multiplexer labels, the adder count and the place of the +/- units
// are the diagram's. Which of x and y feeds the unlabelled lines, and that kernel 3 acts as
// kernel 2, are this design's reading. The source's worked example for this rotator is not
// reproduced by this reading.
//
// All five adders are ra_addsub units. Intermediate values stay in borrow-save form from one
// adder to the next (shifts and multiplexers act on both rails), so no carry runs the length of
// the word until the final conversion of X and Y to plain words. Arithmetic wraps modulo 2^W.
// Purely combinational.
module friend_angle_rotator
  import ra_pkg::*;
#(
  parameter int unsigned W = DATA_W
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [1:0]   kernel,
  input  logic [2:0]   dir,
  output logic [W-1:0] xout,
  output logic [W-1:0] yout
);
  typedef struct packed {
    logic [W-1:0] p;
    logic [W-1:0] n;
  } bsw_t;

  logic [1:0] k;
  bsw_t m1, t1, m2, m4, mm, m3, xr, m5, m6, m7, lr, yr;

  assign k = (kernel == 2'd3) ? 2'd2 : kernel;

  // T1 = (x << 1) -/+ m1
  always_comb m1 = (k == 2'd0) ? '{p: x, n: '0} : '{p: W'(x << 1), n: '0};
  ra_addsub #(.W(W)) u_t1 (
    .x_p(W'(x << 1)), .x_n('0), .y_p(m1.p), .y_n(m1.n), .ctrl(dir[0]), .cin(1'b0),
    .z_p(t1.p), .z_n(t1.n), .cout_p(), .cout_n());

  // M = m4 + y
  always_comb m4 = (k == 2'd2) ? '{p: W'(x << 2), n: '0} : '{p: W'(x << 5), n: '0};
  ra_addsub #(.W(W)) u_m (
    .x_p(m4.p), .x_n(m4.n), .y_p(y), .y_n('0), .ctrl(1'b0), .cin(1'b0),
    .z_p(mm.p), .z_n(mm.n), .cout_p(), .cout_n());

  // X = m3 -/+ m2
  always_comb begin
    m2 = (k == 2'd1) ? '{p: W'(t1.p << 2), n: W'(t1.n << 2)}
                     : '{p: W'(t1.p << 3), n: W'(t1.n << 3)};
    m3 = (k == 2'd0) ? '{p: y, n: '0} : mm;
  end
  ra_addsub #(.W(W)) u_x (
    .x_p(m3.p), .x_n(m3.n), .y_p(m2.p), .y_n(m2.n), .ctrl(dir[1]), .cin(1'b0),
    .z_p(xr.p), .z_n(xr.n), .cout_p(), .cout_n());

  // L = (y << 4) -/+ m7
  always_comb m7 = (k == 2'd0) ? '{p: W'(y << 3), n: '0} : '{p: x, n: '0};
  ra_addsub #(.W(W)) u_l (
    .x_p(W'(y << 4)), .x_n('0), .y_p(m7.p), .y_n(m7.n), .ctrl(dir[2]), .cin(1'b0),
    .z_p(lr.p), .z_n(lr.n), .cout_p(), .cout_n());

  // Y = L + m6
  always_comb begin
    m5 = (k == 2'd1) ? t1 : '{p: y, n: '0};
    m6 = (k == 2'd2) ? '{p: W'(mm.p << 2), n: W'(mm.n << 2)} : m5;
  end
  ra_addsub #(.W(W)) u_y (
    .x_p(lr.p), .x_n(lr.n), .y_p(m6.p), .y_n(m6.n), .ctrl(1'b0), .cin(1'b0),
    .z_p(yr.p), .z_n(yr.n), .cout_p(), .cout_n());

  bs_to_bin #(.W(W)) u_cvt_x (.p(xr.p), .n(xr.n), .bin(xout));
  bs_to_bin #(.W(W)) u_cvt_y (.p(yr.p), .n(yr.n), .bin(yout));
endmodule
