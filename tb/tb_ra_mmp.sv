// tb_ra_mmp: self-checking test of the RA-MMP cell row.
//
// Drives all eight input combinations into every bit position, then random words, and checks
// per bit the cell identity -a - b + p == s - 2*c with integer arithmetic. Prints one TB_RESULT
// line; a watchdog ends the run if it hangs.
module tb_ra_mmp;
  localparam int unsigned W = 16;
  logic [W-1:0] a, b, p, c, s;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  ra_mmp #(.W(W)) dut (.a(a), .b(b), .p(p), .s(s), .c(c));

  always #5 clk = ~clk;

  task automatic check_all();
    for (int i = 0; i < W; i++) begin
      int lhs, rhs;
      lhs = -int'(a[i]) - int'(b[i]) + int'(p[i]);
      rhs = int'(s[i]) - 2 * int'(c[i]);
      checks++;
      if (lhs != rhs) begin
        failures++;
        if (failures < 10) $display("FAIL bit %0d a=%b b=%b p=%b -> c=%b s=%b", i, a[i], b[i], p[i], c[i], s[i]);
      end
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      a = {W{v[0]}}; b = {W{v[1]}}; p = {W{v[2]}};
      #1 check_all();
    end
    repeat (200) begin
      a = W'($urandom); b = W'($urandom); p = W'($urandom);
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
