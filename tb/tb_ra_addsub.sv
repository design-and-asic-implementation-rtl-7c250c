// tb_ra_addsub: self-checking test of the redundant-arithmetic integrated adder/subtractor.
//
// Random borrow-save operands, control bit and constant input, plus the extreme words. The
// check is the exact integer identity
//     (x.p - x.n) +/- (y.p - y.n) + cin == (z.p - z.n) + 2^W * (cout_p - cout_n),
// computed with 64-bit integers, so both the wrapped result and the carries leaving the word
// are checked. Prints one TB_RESULT line; a watchdog ends the run if it hangs.
module tb_ra_addsub;
  localparam int unsigned W = 16;
  logic [W-1:0] x_p, x_n, y_p, y_n, z_p, z_n;
  logic ctrl, cin, cout_p, cout_n;
  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0;
  logic clk = 1'b0;

  ra_addsub #(.W(W)) dut (.x_p(x_p), .x_n(x_n), .y_p(y_p), .y_n(y_n), .ctrl(ctrl), .cin(cin),
                          .z_p(z_p), .z_n(z_n), .cout_p(cout_p), .cout_n(cout_n));

  always #5 clk = ~clk;

  task automatic check();
    longint xv, yv, want, got;
    xv   = longint'(x_p) - longint'(x_n);
    yv   = longint'(y_p) - longint'(y_n);
    want = ctrl ? xv - yv : xv + yv;
    want = want + longint'(cin);
    got  = longint'(z_p) - longint'(z_n) + (longint'(cout_p) - longint'(cout_n)) * (64'sd1 <<< W);
    checks++;
    if (ctrl) n_sub++; else n_add++;
    if (want != got) begin
      failures++;
      if (failures < 10)
        $display("FAIL x=(%h,%h) y=(%h,%h) ctrl=%b cin=%b: want %0d got %0d", x_p, x_n, y_p, y_n, ctrl, cin, want, got);
    end
  endtask

  initial begin
    for (int v = 0; v < 64; v++) begin
      x_p = v[0] ? '1 : '0; x_n = v[1] ? '1 : '0; y_p = v[2] ? '1 : '0; y_n = v[3] ? '1 : '0;
      ctrl = v[4]; cin = v[5];
      #1 check();
    end
    repeat (5000) begin
      x_p = W'($urandom); x_n = W'($urandom); y_p = W'($urandom); y_n = W'($urandom);
      ctrl = 1'($urandom); cin = 1'($urandom);
      #1 check();
    end
    // Plain binary operands (minus rails zero), the way the rotators feed their first adders.
    repeat (1000) begin
      x_p = W'($urandom); x_n = '0; y_p = W'($urandom); y_n = '0;
      ctrl = 1'($urandom); cin = 1'b0;
      #1 check();
    end
    if (n_add == 0 || n_sub == 0) failures++;
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
