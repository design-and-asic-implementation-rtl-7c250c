// tb_worked_example: the two worked-example vectors through the full rotator.
//
// Input 25 + i500 with the selection line at 1 (case 1) and at 0 (case 2), USR and nano x paths
// subtracting, the friend-angle rotator at kernel = selection line with all adders adding, and
// stage 2 keeping the lower words. Checks, for each case:
//   - the USR results 3175 + i64500 (case 1) and 60736 + i64400 (case 2), which the source's
//     example also gives;
//   - that stage 2 takes both words from the friend-angle rotator, as in the example;
//   - the final output, against values worked out by hand from the rotator equations
//     (case 1: friend-angle 1700 + i8125, nano 19292 + i1981; case 2: friend-angle
//     1100 + i12500, nano 6336 + i58560), and that it appears exactly three cycles after the
//     input.
// Runs the top at its default parameters. Prints one TB_RESULT line; a watchdog ends the run.
module tb_worked_example;
  localparam int unsigned W = 16;

  logic clk = 1'b0, rst_n = 1'b1, in_valid = 1'b0;
  logic [W-1:0] x_in = '0, y_in = '0;
  logic sel = 1'b0, usr_dir = 1'b1, nano_dir = 1'b1, pick_large = 1'b0;
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

  task automatic run_case(input logic s, input int usr_x, input int usr_y, input int fx, input int fy,
                          input int ox, input int oy);
    int lat;
    @(negedge clk);
    x_in = 16'd25; y_in = 16'd500; sel = s; fa_kernel = {1'b0, s}; in_valid = 1'b1;
    #1;
    checks++;
    if (int'(dut.usr_x) != usr_x || int'(dut.usr_y) != usr_y) begin
      failures++; $display("FAIL s=%b USR %0d+i%0d want %0d+i%0d", s, dut.usr_x, dut.usr_y, usr_x, usr_y);
    end
    checks++;
    if (int'(dut.fa_x) != fx || int'(dut.fa_y) != fy) begin
      failures++; $display("FAIL s=%b friend %0d+i%0d want %0d+i%0d", s, dut.fa_x, dut.fa_y, fx, fy);
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    lat = 1;
    while (!out_valid && lat < 10) begin
      @(posedge clk);
      #1 lat++;
    end
    checks++;
    if (lat != 3) begin failures++; $display("FAIL s=%b latency %0d", s, lat); end
    checks++;
    if (!fa_x_taken || !fa_y_taken) begin failures++; $display("FAIL s=%b stage 2 did not keep the friend-angle words", s); end
    checks++;
    if (int'(x_out) != ox || int'(y_out) != oy) begin
      failures++; $display("FAIL s=%b out %0d+i%0d want %0d+i%0d", s, x_out, y_out, ox, oy);
    end
    $display("case s=%b: USR %0d+i%0d, friend-angle %0d+i%0d, output %0d+i%0d after %0d cycles",
             s, dut.usr_x, dut.usr_y, dut.fa_x, dut.fa_y, x_out, y_out, lat);
    @(posedge clk);
  endtask

  initial begin
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run_case(1'b1, 3175, 64500, 1700, 8125, 19292, 1981);
    run_case(1'b0, 60736, 64400, 1100, 12500, 6336, 58560);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
