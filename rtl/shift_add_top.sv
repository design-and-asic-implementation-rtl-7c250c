// shift_add_top: improved shift-and-add rotator with redundant-arithmetic adders.
//
// Three stages, as in the source's architecture:
//   stage 1  the input vector (x_in, y_in) goes to the friend-angle rotator and the USR rotator
//            in parallel;
//   stage 2  two comparators choose, separately for x and for y, the lower of the two results
//            (or the higher, pick_large = 1);
//   stage 3  the chosen vector goes through the nano-rotation rotator to (x_out, y_out).
// Every adder in the rotators is a redundant-arithmetic integrated adder/subtractor (ra_addsub),
// so no carry ripples through a rotator until its final conversion to a plain word.
//
// Timing: one register after each stage. A vector presented with in_valid = 1 at a rising clock
// edge appears on x_out / y_out with out_valid = 1 three rising edges later; a new vector can be
// taken every cycle. The control inputs travel with their vector. The register placement and
// the valid signal are this design's choice; the source does not say where its stages are
// clocked. rst_n is an asynchronous active-low reset that clears the valid bits and the
// registers.
//
// sel is the one selection line the source's worked example sets for the 2:1 multiplexers of
// the rotators. In that example sel = 1 makes the USR rotator use the unshifted operand of the
// same path, which is the multiplexer input labelled 0 in the source's diagram, so the rotators'
// sel inputs are driven with ~sel. The friend-angle rotator has three kernel settings, given on
// fa_kernel; the add/subtract controls are inputs too. Words are unsigned 16-bit and wrap.
module shift_add_top
  import ra_pkg::*;
#(
  parameter int unsigned W      = DATA_W,
  parameter int unsigned USR_K  = 4,
  parameter int unsigned NANO_K = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] x_in,
  input  logic [W-1:0] y_in,
  input  logic         sel,
  input  logic [1:0]   fa_kernel,
  input  logic [2:0]   fa_dir,
  input  logic         usr_dir,
  input  logic         nano_dir,
  input  logic         pick_large,
  output logic         out_valid,
  output logic [W-1:0] x_out,
  output logic [W-1:0] y_out,
  output logic         fa_x_taken,
  output logic         fa_y_taken
);
  // ---- stage 1: friend-angle and USR rotators ----
  logic [W-1:0] fa_x, fa_y, usr_x, usr_y;

  friend_angle_rotator #(.W(W)) u_fa (
    .x(x_in), .y(y_in), .kernel(fa_kernel), .dir(fa_dir), .xout(fa_x), .yout(fa_y));
  usr_rotator #(.W(W), .K(USR_K)) u_usr (
    .x(x_in), .y(y_in), .sel(~sel), .dir(usr_dir), .xout(usr_x), .yout(usr_y));

  typedef struct packed {
    logic         valid;
    logic [W-1:0] fa_x, fa_y, usr_x, usr_y;
    logic         sel, nano_dir, pick_large;
  } s1_t;

  typedef struct packed {
    logic         valid;
    logic [W-1:0] x, y;
    logic         sel, nano_dir, fa_x_taken, fa_y_taken;
  } s2_t;

  s1_t s1_q;
  s2_t s2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_q <= '0;
    else        s1_q <= '{valid: in_valid, fa_x: fa_x, fa_y: fa_y, usr_x: usr_x, usr_y: usr_y,
                          sel: sel, nano_dir: nano_dir, pick_large: pick_large};
  end

  // ---- stage 2: comparators ----
  logic [W-1:0] cmp_x, cmp_y;
  logic         cmp_fa_x, cmp_fa_y;

  compare_stage #(.W(W)) u_cmp (
    .fa_x(s1_q.fa_x), .fa_y(s1_q.fa_y), .usr_x(s1_q.usr_x), .usr_y(s1_q.usr_y),
    .pick_large(s1_q.pick_large), .x_sel(cmp_x), .y_sel(cmp_y),
    .fa_x_taken(cmp_fa_x), .fa_y_taken(cmp_fa_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s2_q <= '0;
    else        s2_q <= '{valid: s1_q.valid, x: cmp_x, y: cmp_y, sel: s1_q.sel,
                          nano_dir: s1_q.nano_dir, fa_x_taken: cmp_fa_x, fa_y_taken: cmp_fa_y};
  end

  // ---- stage 3: nano-rotation rotator ----
  logic [W-1:0] nano_x, nano_y;

  nano_rotator #(.W(W), .K(NANO_K)) u_nano (
    .x(s2_q.x), .y(s2_q.y), .sel(~s2_q.sel), .dir(s2_q.nano_dir), .xout(nano_x), .yout(nano_y));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      x_out      <= '0;
      y_out      <= '0;
      fa_x_taken <= 1'b0;
      fa_y_taken <= 1'b0;
    end else begin
      out_valid  <= s2_q.valid;
      x_out      <= nano_x;
      y_out      <= nano_y;
      fa_x_taken <= s2_q.fa_x_taken;
      fa_y_taken <= s2_q.fa_y_taken;
    end
  end
endmodule
