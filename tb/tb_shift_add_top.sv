// tb_shift_add_top: end-to-end self-checking test of the three-stage shift-and-add rotator.
//
// Runs the top with its default parameters (16-bit words, K = 4 for the USR and nano rotators).
// It first applies the worked example 25 + i500 with the selection line at 1 and at 0 and checks
// the USR results (3175 + i64500, 60736 + i64400) and that stage 2 passes the friend-angle
// result on both words, as in the example. Then it streams random vectors with random control
// settings and random idle cycles and compares every output against an integer model of the
// three stages, kept three cycles deep so the three-cycle latency and one-vector-per-cycle rate
// are checked on every cycle, including out_valid. It counts how often each mechanism occurred
// (each rotator setting, both comparator policies, each rotator winning each word, idle
// cycles, results wrapping past 16 bits, reset) and counts a failure for any that never did.
module tb_shift_add_top;
  localparam int unsigned W = 16;
  localparam int unsigned UK = 4;
  localparam int unsigned NK = 4;
  localparam longint MASK = 64'hFFFF;

  logic clk = 1'b0, rst_n = 1'b1;
  logic in_valid = 1'b0;
  logic [W-1:0] x_in = '0, y_in = '0;
  logic sel = 1'b0, usr_dir = 1'b0, nano_dir = 1'b0, pick_large = 1'b0;
  logic [1:0] fa_kernel = '0;
  logic [2:0] fa_dir = '0;
  logic out_valid, fa_x_taken, fa_y_taken;
  logic [W-1:0] x_out, y_out;

  int checks = 0, failures = 0;

  shift_add_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in), .y_in(y_in), .sel(sel),
    .fa_kernel(fa_kernel), .fa_dir(fa_dir), .usr_dir(usr_dir), .nano_dir(nano_dir),
    .pick_large(pick_large), .out_valid(out_valid), .x_out(x_out), .y_out(y_out),
    .fa_x_taken(fa_x_taken), .fa_y_taken(fa_y_taken));

  always #5 clk = ~clk;

  // ---------------- reference model ----------------
  typedef struct {
    logic   valid;
    longint x, y;
    logic   fa_x, fa_y;
    logic   wrapped;
  } exp_t;

  function automatic longint shl(input longint v, input int s);
    return v * (64'sd1 <<< s);
  endfunction

  // Rotator with the USR / nano shape; mux_uncrossed = 1 picks the same path's operand.
  function automatic void rot(input longint x, input longint y, input logic mux_uncrossed,
                              input logic sub, input int k, input int ysh,
                              output longint xo, output longint yo);
    longint mx, my;
    mx = mux_uncrossed ? x : shl(y, k);
    my = mux_uncrossed ? y : shl(x, k);
    xo = sub ? shl(x, 2*k-1) - mx : shl(x, 2*k-1) + mx;
    yo = shl(y, ysh) + my;
  endfunction

  function automatic void fa(input longint x, input longint y, input logic [1:0] kernel,
                             input logic [2:0] d, output longint xo, output longint yo);
    longint t1, mv, l;
    int k;
    k  = (kernel == 2'd3) ? 2 : int'(kernel);
    t1 = d[0] ? 2*x - (k == 0 ? x : 2*x) : 2*x + (k == 0 ? x : 2*x);
    mv = (k == 2 ? 4*x : 32*x) + y;
    xo = (k == 0) ? y : mv;
    xo = d[1] ? xo - (k == 1 ? 4*t1 : 8*t1) : xo + (k == 1 ? 4*t1 : 8*t1);
    l  = d[2] ? 16*y - (k == 0 ? 8*y : x) : 16*y + (k == 0 ? 8*y : x);
    yo = l + (k == 2 ? 4*mv : (k == 1 ? t1 : y));
  endfunction

  function automatic exp_t model(input logic v, input longint x, input longint y, input logic s,
                                 input logic [1:0] kern, input logic [2:0] fd, input logic ud,
                                 input logic nd, input logic big);
    exp_t e;
    longint fx, fy, ux, uy, cx, cy, nx, ny;
    fa(x, y, kern, fd, fx, fy);
    rot(x, y, s, ud, UK, 2*UK-1, ux, uy);
    fx &= MASK; fy &= MASK; ux &= MASK; uy &= MASK;
    e.fa_x = big ? (fx >= ux) : (fx <= ux);
    e.fa_y = big ? (fy >= uy) : (fy <= uy);
    cx = e.fa_x ? fx : ux;
    cy = e.fa_y ? fy : uy;
    rot(cx, cy, s, nd, NK, 3*NK-1, nx, ny);
    e.wrapped = (nx < 0) || (nx > MASK) || (ny > MASK);
    e.valid = v;
    e.x = nx & MASK;
    e.y = ny & MASK;
    return e;
  endfunction

  // ---------------- mechanism counters ----------------
  int n_kernel[4];
  int n_sel[2], n_large[2], n_fa_x[2], n_fa_y[2], n_usr_dir[2], n_nano_dir[2], n_fa_dir[3];
  int n_idle = 0, n_wrap = 0, n_reset = 0, n_valid_out = 0;

  exp_t pipe[3];

  task automatic shift_model();
    pipe[2] = pipe[1];
    pipe[1] = pipe[0];
    pipe[0] = model(in_valid, longint'(x_in), longint'(y_in), sel, fa_kernel, fa_dir, usr_dir,
                    nano_dir, pick_large);
  endtask

  task automatic check_outputs();
    checks++;
    if (out_valid !== pipe[2].valid) begin
      failures++;
      if (failures < 10) $display("FAIL %0t out_valid=%b want %b", $time, out_valid, pipe[2].valid);
    end else if (pipe[2].valid) begin
      n_valid_out++;
      if (longint'(x_out) != pipe[2].x || longint'(y_out) != pipe[2].y ||
          fa_x_taken !== pipe[2].fa_x || fa_y_taken !== pipe[2].fa_y) begin
        failures++;
        if (failures < 10) $display("FAIL %0t out %0d+i%0d (fa %b%b) want %0d+i%0d (fa %b%b)", $time,
                                    x_out, y_out, fa_x_taken, fa_y_taken, pipe[2].x, pipe[2].y,
                                    pipe[2].fa_x, pipe[2].fa_y);
      end
      if (pipe[2].wrapped) n_wrap++;
      n_fa_x[pipe[2].fa_x]++;
      n_fa_y[pipe[2].fa_y]++;
    end
  endtask

  task automatic drive_random();
    in_valid = ($urandom % 5) != 0;
    x_in = W'($urandom); y_in = W'($urandom);
    if ($urandom % 3 == 0) begin x_in = W'($urandom % 64); y_in = W'($urandom % 1024); end
    sel = 1'($urandom); fa_kernel = 2'($urandom); fa_dir = 3'($urandom);
    usr_dir = 1'($urandom); nano_dir = 1'($urandom); pick_large = 1'($urandom);
    if (!in_valid) n_idle++;
    else begin
      n_kernel[fa_kernel]++; n_sel[sel]++; n_large[pick_large]++;
      n_usr_dir[usr_dir]++; n_nano_dir[nano_dir]++;
      for (int i = 0; i < 3; i++) if (fa_dir[i]) n_fa_dir[i]++;
    end
  endtask

  // One clock cycle: the DUT samples at the edge, the model advances, outputs are compared,
  // and the next inputs are driven.
  task automatic cycle(input logic randomize_next);
    @(posedge clk);
    shift_model();
    #1;
    check_outputs();
    if (randomize_next) drive_random();
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    in_valid = 1'b0;
    #1;
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("FAIL out_valid set during reset"); end
    for (int i = 0; i < 3; i++) pipe[i] = '{valid: 1'b0, x: 0, y: 0, fa_x: 1'b0, fa_y: 1'b0, wrapped: 1'b0};
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    n_reset++;
  endtask

  initial begin
    do_reset();

    // Worked example, selection line 1 then 0, subtracting USR x path.
    x_in = 16'd25; y_in = 16'd500; usr_dir = 1'b1; fa_kernel = 2'd1; fa_dir = 3'b000;
    nano_dir = 1'b1; pick_large = 1'b0; in_valid = 1'b1;
    sel = 1'b1; #1;
    checks++;
    if (dut.usr_x != 16'd3175 || dut.usr_y != 16'd64500) begin
      failures++; $display("FAIL example sel=1 USR %0d+i%0d", dut.usr_x, dut.usr_y);
    end
    cycle(1'b0);
    sel = 1'b0; fa_kernel = 2'd0; #1;
    checks++;
    if (dut.usr_x != 16'd60736 || dut.usr_y != 16'd64400) begin
      failures++; $display("FAIL example sel=0 USR %0d+i%0d", dut.usr_x, dut.usr_y);
    end
    cycle(1'b0);
    in_valid = 1'b0;
    repeat (4) cycle(1'b0);

    // Random stream.
    drive_random();
    repeat (4000) cycle(1'b1);

    // Reset in the middle of traffic, then more traffic.
    do_reset();
    drive_random();
    repeat (1000) cycle(1'b1);
    in_valid = 1'b0;
    repeat (4) cycle(1'b0);

    // Every mechanism must have happened.
    for (int i = 0; i < 4; i++) begin checks++; if (n_kernel[i] == 0) begin failures++; $display("MISSING kernel %0d", i); end end
    for (int i = 0; i < 2; i++) begin
      checks++; if (n_sel[i] == 0)      begin failures++; $display("MISSING sel=%0d", i); end
      checks++; if (n_large[i] == 0)    begin failures++; $display("MISSING pick_large=%0d", i); end
      checks++; if (n_fa_x[i] == 0)     begin failures++; $display("MISSING x word from %s", (i != 0) ? "friend" : "USR"); end
      checks++; if (n_fa_y[i] == 0)     begin failures++; $display("MISSING y word from %s", (i != 0) ? "friend" : "USR"); end
      checks++; if (n_usr_dir[i] == 0)  begin failures++; $display("MISSING usr_dir=%0d", i); end
      checks++; if (n_nano_dir[i] == 0) begin failures++; $display("MISSING nano_dir=%0d", i); end
    end
    for (int i = 0; i < 3; i++) begin checks++; if (n_fa_dir[i] == 0) begin failures++; $display("MISSING fa_dir[%0d]", i); end end
    checks++; if (n_idle == 0)  begin failures++; $display("MISSING idle cycle"); end
    checks++; if (n_wrap == 0)  begin failures++; $display("MISSING wrap"); end
    checks++; if (n_reset < 2)  begin failures++; $display("MISSING reset"); end

    $display("mechanisms: kernels %0d/%0d/%0d/%0d sel %0d/%0d pick_large %0d/%0d x-from-friend %0d/%0d y-from-friend %0d/%0d idle %0d wrap %0d resets %0d outputs %0d",
             n_kernel[0], n_kernel[1], n_kernel[2], n_kernel[3], n_sel[0], n_sel[1], n_large[0], n_large[1],
             n_fa_x[1], n_fa_x[0], n_fa_y[1], n_fa_y[0], n_idle, n_wrap, n_reset, n_valid_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
