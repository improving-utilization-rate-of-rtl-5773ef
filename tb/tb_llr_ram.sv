// tb_llr_ram: random writes and reads of one LLR RAM (default size: 20 words
// of 320 bits) against a model; checks that a read in the cycle of a write to
// the same address still returns the old word.
module tb_llr_ram;
  localparam int D = 20, W = 320, AW = $clog2(D);
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  llr_ram #(.DEPTH(D), .WIDTH(W)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  function automatic logic [W-1:0] rword();
    logic [W-1:0] v;
    for (int k = 0; k < W; k += 32) v[k +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    @(negedge clk);
    for (int a = 0; a < D; a++) begin
      we = 1; waddr = AW'(a); wdata = rword();
      model[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int t = 0; t < 2000; t++) begin
      int ra, wa;
      ra = int'($urandom % D);
      wa = ($urandom % 3 == 0) ? ra : int'($urandom % D);
      raddr = AW'(ra);
      we = $urandom % 2;
      waddr = AW'(wa);
      wdata = rword();
      #1;
      checks++;
      if (rdata != model[ra]) begin
        failures++;
        if (failures < 10) $display("read %0d mismatch", ra);
      end
      @(negedge clk);
      if (we) model[wa] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
