// tb_bs_to_bin: self-checking test of the borrow-save to binary converter.
//
// Random and extreme (p, n) pairs; the expected word is (p - n) mod 2^W worked out with integer
// arithmetic. Prints one TB_RESULT line; a watchdog ends the run if it hangs.
module tb_bs_to_bin;
  localparam int unsigned W = 16;
  logic [W-1:0] p, n, bin;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  bs_to_bin #(.W(W)) dut (.p(p), .n(n), .bin(bin));

  always #5 clk = ~clk;

  task automatic check();
    int want;
    want = (int'(p) - int'(n) + (1 << W)) % (1 << W);
    checks++;
    if (int'(bin) != want) begin
      failures++;
      if (failures < 10) $display("FAIL p=%h n=%h bin=%h want=%h", p, n, bin, want);
    end
  endtask

  initial begin
    p = '0; n = '0; #1 check();
    p = '1; n = '0; #1 check();
    p = '0; n = '1; #1 check();
    p = '0; n = 1;  #1 check();
    repeat (2000) begin
      p = W'($urandom); n = W'($urandom);
      #1 check();
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
