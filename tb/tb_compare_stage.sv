// tb_compare_stage: self-checking test of stage 2 (two comparators and the selection).
//
// The worked example first: friend-angle 625 + i10425 against USR 3175 + i64500, and 5500 +
// i16200 against 60736 + i64400, where the lower words must win. Then random and equal words in
// both modes; the expected choice is worked out with the simulator's relational operators, per
// word (x and y independently, friend-angle value on a tie). Prints one TB_RESULT line.
module tb_compare_stage;
  localparam int unsigned W = 16;
  logic [W-1:0] fa_x, fa_y, usr_x, usr_y, x_sel, y_sel;
  logic pick_large, fa_x_taken, fa_y_taken;
  int checks = 0, failures = 0;
  int n_mixed = 0;
  logic clk = 1'b0;

  compare_stage #(.W(W)) dut (.fa_x(fa_x), .fa_y(fa_y), .usr_x(usr_x), .usr_y(usr_y),
                              .pick_large(pick_large), .x_sel(x_sel), .y_sel(y_sel),
                              .fa_x_taken(fa_x_taken), .fa_y_taken(fa_y_taken));

  always #5 clk = ~clk;

  task automatic check();
    logic tx, ty;
    tx = pick_large ? (fa_x >= usr_x) : (fa_x <= usr_x);
    ty = pick_large ? (fa_y >= usr_y) : (fa_y <= usr_y);
    if (tx != ty) n_mixed++;
    checks++;
    if (fa_x_taken !== tx || fa_y_taken !== ty || x_sel !== (tx ? fa_x : usr_x) || y_sel !== (ty ? fa_y : usr_y)) begin
      failures++;
      if (failures < 10) $display("FAIL fa=(%0d,%0d) usr=(%0d,%0d) large=%b -> (%0d,%0d)",
                                  fa_x, fa_y, usr_x, usr_y, pick_large, x_sel, y_sel);
    end
  endtask

  initial begin
    pick_large = 1'b0;
    fa_x = 16'd625; fa_y = 16'd10425; usr_x = 16'd3175; usr_y = 16'd64500; #1;
    checks++; if (x_sel != 16'd625 || y_sel != 16'd10425) failures++;
    fa_x = 16'd5500; fa_y = 16'd16200; usr_x = 16'd60736; usr_y = 16'd64400; #1;
    checks++; if (x_sel != 16'd5500 || y_sel != 16'd16200) failures++;
    repeat (3000) begin
      fa_x = W'($urandom); fa_y = W'($urandom); usr_x = W'($urandom); usr_y = W'($urandom);
      if ($urandom % 8 == 0) usr_x = fa_x;
      if ($urandom % 8 == 0) usr_y = fa_y;
      pick_large = 1'($urandom);
      #1 check();
    end
    if (n_mixed == 0) failures++;
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
