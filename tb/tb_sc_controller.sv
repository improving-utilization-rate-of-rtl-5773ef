// tb_sc_controller: cycle-by-cycle check of the schedule generator for the
// N = 8, P = 2 example (6 cycles: two stage-2 cycles, stage 1, decision of
// u0..u3, stage 1 on g values, decision of u4..u7), for N = 64 with P = 8 and
// for the default N = 1024, P = 64 (784 cycles).
module tb_sc_controller;
  logic clk = 0, rst_n = 0;
  logic fin_a, fin_b, fin_c;
  int ca, fa, cb, fb, cc, fc;

  always #5 clk = ~clk;

  ctrl_checker #(.N(8),    .P(2),  .EXP_LAT(6))   a (.clk, .rst_n, .finished(fin_a), .checks(ca), .failures(fa));
  ctrl_checker #(.N(64),   .P(8))                 b (.clk, .rst_n, .finished(fin_b), .checks(cb), .failures(fb));
  ctrl_checker #(.N(1024), .P(64), .EXP_LAT(784)) c (.clk, .rst_n, .finished(fin_c), .checks(cc), .failures(fc));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin_a && fin_b && fin_c);
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc, fa + fb + fc);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc, fa + fb + fc + 1);
    $finish;
  end
endmodule
