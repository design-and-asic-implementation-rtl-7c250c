// tb_usr_rotator: self-checking test of the USR rotator.
//
// First the worked example for input 25 + i500 with K = 4: the unshifted-operand setting
// (multiplexer input 0) with subtraction must give 3175 + i64500, the crossed setting 60736 +
// i64400. Then random words, both multiplexer settings and both directions against an integer
// model of xout = x*2^(2K-1) -/+ (sel ? y*2^K : x), yout = y*2^(2K-1) + (sel ? x*2^K : y),
// modulo 2^16. Prints one TB_RESULT line; a watchdog ends the run if it hangs.
module tb_usr_rotator;
  localparam int unsigned W = 16;
  localparam int unsigned K = 4;
  logic [W-1:0] x, y, xout, yout;
  logic sel, dir;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  usr_rotator #(.W(W), .K(K)) dut (.x(x), .y(y), .sel(sel), .dir(dir), .xout(xout), .yout(yout));

  always #5 clk = ~clk;

  task automatic expect_xy(input int ex, input int ey);
    checks++;
    if (int'(xout) != ex || int'(yout) != ey) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d sel=%b dir=%b: got %0d+i%0d want %0d+i%0d",
                                  x, y, sel, dir, xout, yout, ex, ey);
    end
  endtask

  task automatic check_model();
    longint mx, my, ex, ey;
    mx = sel ? longint'(y) * (64'sd1 <<< K) : longint'(x);
    my = sel ? longint'(x) * (64'sd1 <<< K) : longint'(y);
    ex = longint'(x) * (64'sd1 <<< (2*K-1));
    ex = dir ? ex - mx : ex + mx;
    ey = longint'(y) * (64'sd1 <<< (2*K-1)) + my;
    expect_xy(int'(ex & 64'hFFFF), int'(ey & 64'hFFFF));
  endtask

  initial begin
    x = 16'd25; y = 16'd500; dir = 1'b1;
    sel = 1'b0; #1 expect_xy(3175, 64500);
    sel = 1'b1; #1 expect_xy(60736, 64400);
    repeat (3000) begin
      x = W'($urandom); y = W'($urandom); sel = 1'($urandom); dir = 1'($urandom);
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
