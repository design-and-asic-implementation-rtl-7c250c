// tb_ra_ppm: self-checking test of the RA-PPM cell row.
//
// Drives all eight input combinations into every bit position, then random words, and checks
// per bit the cell identity a + b - m == 2*c - s with integer arithmetic. Prints one TB_RESULT
// line; a watchdog ends the run if it hangs.
module tb_ra_ppm;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, m, c, s;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  ra_ppm #(.W(W)) dut (.a(a), .b(b), .m(m), .c(c), .s(s));

  always #5 clk = ~clk;

  task automatic check_all();
    for (int i = 0; i < W; i++) begin
      int lhs, rhs;
      lhs = int'(a[i]) + int'(b[i]) - int'(m[i]);
      rhs = 2 * int'(c[i]) - int'(s[i]);
      checks++;
      if (lhs != rhs) begin
        failures++;
        if (failures < 10) $display("FAIL bit %0d a=%b b=%b m=%b -> c=%b s=%b", i, a[i], b[i], m[i], c[i], s[i]);
      end
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      a = {W{v[0]}}; b = {W{v[1]}}; m = {W{v[2]}};
      #1 check_all();
    end
    repeat (200) begin
      a = W'($urandom); b = W'($urandom); m = W'($urandom);
      #1 check_all();
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
