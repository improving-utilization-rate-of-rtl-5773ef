// tb_polar_sp_decoder: end-to-end test of the decoder at its default size
// (N = 1024, P = 64, Q = 5). Nine frames at three code rates and two noise
// levels are decoded and compared bit for bit with a reference SC decoder;
// the decoding time must be 784 cycles per frame, 0.75N + N/(2P) log2(N/(4P)),
// giving a utilisation rate of 0.102. Frames come in groups of three sharing
// a frozen set: the second frame of a group is loaded while the first decodes
// and follows it without a gap, and the third is held off by llr_ready until
// a channel page is free.
module tb_polar_sp_decoder;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic finished;
  int   checks, failures;

  always #5 clk = ~clk;

  decoder_harness #(.FRAMES(9), .EXP_LAT(784), .EXP_ALPHA(102), .SEED(11)) h (
    .clk, .rst_n, .finished, .checks, .failures
  );

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
