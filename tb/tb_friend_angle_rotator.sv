// tb_friend_angle_rotator: self-checking test of the friend-angle kernel rotator.
//
// Random words for every kernel setting (0..3) and every combination of the three direction
// bits, against an integer model of the five-adder, seven-multiplexer network (modulo 2^16):
//     T1 = 2x -/+ (k==0 ? x : 2x)            M = (k==2 ? 4x : 32x) + y
//     X  = (k==0 ? y : M) -/+ (k==1 ? 4*T1 : 8*T1)
//     Y  = 16y -/+ (k==0 ? 8y : x) + (k==2 ? 4M : (k==1 ? T1 : y))
// with kernel 3 treated as 2. A few hand-worked vectors come first. Prints one TB_RESULT line;
// a watchdog ends the run if it hangs.
module tb_friend_angle_rotator;
  localparam int unsigned W = 16;
  logic [W-1:0] x, y, xout, yout;
  logic [1:0] kernel;
  logic [2:0] dir;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  friend_angle_rotator #(.W(W)) dut (.x(x), .y(y), .kernel(kernel), .dir(dir), .xout(xout), .yout(yout));

  always #5 clk = ~clk;

  task automatic expect_xy(input int ex, input int ey);
    checks++;
    if (int'(xout) != ex || int'(yout) != ey) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d k=%0d dir=%b: got %0d+i%0d want %0d+i%0d",
                                  x, y, kernel, dir, xout, yout, ex, ey);
    end
  endtask

  task automatic check_model();
    longint xi, yi, t1, mv, xr, lr, yr;
    int k;
    xi = longint'(x); yi = longint'(y);
    k  = (kernel == 2'd3) ? 2 : int'(kernel);
    t1 = dir[0] ? 2*xi - (k == 0 ? xi : 2*xi) : 2*xi + (k == 0 ? xi : 2*xi);
    mv = (k == 2 ? 4*xi : 32*xi) + yi;
    xr = (k == 0) ? yi : mv;
    xr = dir[1] ? xr - (k == 1 ? 4*t1 : 8*t1) : xr + (k == 1 ? 4*t1 : 8*t1);
    lr = dir[2] ? 16*yi - (k == 0 ? 8*yi : xi) : 16*yi + (k == 0 ? 8*yi : xi);
    yr = lr + (k == 2 ? 4*mv : (k == 1 ? t1 : yi));
    expect_xy(int'(xr & 64'hFFFF), int'(yr & 64'hFFFF));
  endtask

  initial begin
    // x = 1, y = 1, kernel 0, all adds: T1 = 3, M = 33, X = 1 + 24 = 25, Y = 16 + 8 + 1 = 25.
    x = 16'd1; y = 16'd1; kernel = 2'd0; dir = 3'b000; #1 expect_xy(25, 25);
    // kernel 1, all subtracts: T1 = 0, M = 33, X = 33 - 0 = 33, Y = 16 - 1 + 0 = 15.
    kernel = 2'd1; dir = 3'b111; #1 expect_xy(33, 15);
    // kernel 2, all adds: T1 = 4, M = 5, X = 5 + 32 = 37, Y = 16 + 1 + 20 = 37.
    kernel = 2'd2; dir = 3'b000; #1 expect_xy(37, 37);
    for (int kk = 0; kk < 4; kk++)
      for (int dd = 0; dd < 8; dd++)
        repeat (100) begin
          x = W'($urandom); y = W'($urandom); kernel = 2'(kk); dir = 3'(dd);
          #1 check_model();
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
