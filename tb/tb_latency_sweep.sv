// tb_latency_sweep: end-to-end decoding at the code lengths of the latency
// comparison, N = 64, 128, 256, 512 with P = 64 PEs, plus the N = 8, P = 2
// example schedule. Each decoder must match the reference decoder bit for bit
// and take exactly 47, 95, 192, 388 and 6 cycles per frame, which gives the
// utilisation rates 0.064, 0.074, 0.083 and 0.093 of the comparison table for
// the P = 64 sizes. Frames overlap: the next frame is loaded while one
// decodes, and a third waits for a free channel page.
module tb_latency_sweep;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [4:0] fin;
  int c [5];
  int f [5];

  always #5 clk = ~clk;

  decoder_harness #(.N(64),  .P(64), .FRAMES(8), .EXP_LAT(47),  .EXP_ALPHA(64),  .SEED(3)) h64  (.clk, .rst_n, .finished(fin[0]), .checks(c[0]), .failures(f[0]));
  decoder_harness #(.N(128), .P(64), .FRAMES(6), .EXP_LAT(95),  .EXP_ALPHA(74),  .SEED(4)) h128 (.clk, .rst_n, .finished(fin[1]), .checks(c[1]), .failures(f[1]));
  decoder_harness #(.N(256), .P(64), .FRAMES(6), .EXP_LAT(192), .EXP_ALPHA(83), .SEED(5)) h256 (.clk, .rst_n, .finished(fin[2]), .checks(c[2]), .failures(f[2]));
  decoder_harness #(.N(512), .P(64), .FRAMES(6), .EXP_LAT(388), .EXP_ALPHA(93), .SEED(6)) h512 (.clk, .rst_n, .finished(fin[3]), .checks(c[3]), .failures(f[3]));
  decoder_harness #(.N(8),   .P(2),  .FRAMES(60), .EXP_LAT(6),  .SEED(7)) h8   (.clk, .rst_n, .finished(fin[4]), .checks(c[4]), .failures(f[4]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&fin);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end
endmodule
