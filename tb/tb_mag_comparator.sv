// tb_mag_comparator: self-checking test of the W-bit magnitude comparator.
//
// Equal words, words that differ in one bit only (each position, both ways), the extremes and
// random pairs; the expected flags come from the simulator's own unsigned relational operators.
// Exactly one flag must be set each time. Prints one TB_RESULT line; a watchdog ends the run.
module tb_mag_comparator;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b;
  logic gt, eq, lt;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  mag_comparator #(.W(W)) dut (.a(a), .b(b), .a_gt_b(gt), .a_eq_b(eq), .a_lt_b(lt));

  always #5 clk = ~clk;

  task automatic check();
    checks++;
    if (gt !== (a > b) || eq !== (a == b) || lt !== (a < b) || (int'(gt) + int'(eq) + int'(lt)) != 1) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h gt=%b eq=%b lt=%b", a, b, gt, eq, lt);
    end
  endtask

  initial begin
    a = '0; b = '0; #1 check();
    a = '1; b = '1; #1 check();
    a = '1; b = '0; #1 check();
    a = '0; b = '1; #1 check();
    for (int i = 0; i < W; i++) begin
      logic [W-1:0] r;
      r = W'($urandom);
      a = r | (W'(1) << i); b = r & ~(W'(1) << i); #1 check();
      a = r & ~(W'(1) << i); b = r | (W'(1) << i); #1 check();
    end
    repeat (3000) begin
      a = W'($urandom); b = W'($urandom);
      if ($urandom % 4 == 0) b = a;
      #1 check();
    end
    // Values from the source's worked example.
    a = 16'd625;  b = 16'd3175;  #1 check();
    a = 16'd5500; b = 16'd60736; #1 check();
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
