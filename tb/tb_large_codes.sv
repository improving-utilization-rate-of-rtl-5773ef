// tb_large_codes: end-to-end decoding of the long codes of the implementation
// comparison, N = 2^15 and N = 2^17 with P = 64, one frame each (a clean one
// and, for 2^15, also a noisy one), checked bit for bit against the reference
// decoder. Expected decoding times: 0.75N + N/128 * log2(N/256), i.e.
// 26368 and 107520 clocks.
module tb_large_codes;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [1:0] fin;
  int c [2];
  int f [2];

  always #5 clk = ~clk;

  decoder_harness #(.N(32768),  .P(64), .FRAMES(2), .EXP_LAT(26368),  .SEED(21)) h15 (.clk, .rst_n, .finished(fin[0]), .checks(c[0]), .failures(f[0]));
  decoder_harness #(.N(131072), .P(64), .FRAMES(1), .EXP_LAT(107520), .SEED(22)) h17 (.clk, .rst_n, .finished(fin[1]), .checks(c[1]), .failures(f[1]));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (&fin);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
    $finish;
  end
endmodule
