// tb_frozen_mem: fills the frozen table with random flags, reads every word
// back, then rewrites part of it and checks that only those words changed.
module tb_frozen_mem;
  localparam int N = 1024;
  localparam int AW = $clog2(N / 4);
  logic clk = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [3:0] wdata = '0, rdata;
  logic [3:0] model [N/4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  frozen_mem #(.N(N)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  task automatic write(input int a, input logic [3:0] d);
    @(negedge clk);
    we = 1; waddr = AW'(a); wdata = d;
    @(negedge clk);
    we = 0;
    model[a] = d;
  endtask

  task automatic read_all();
    for (int a = 0; a < N / 4; a++) begin
      raddr = AW'(a);
      #1;
      checks++;
      if (rdata != model[a]) begin
        failures++;
        if (failures < 10) $display("word %0d: %b exp %b", a, rdata, model[a]);
      end
    end
  endtask

  initial begin
    @(posedge clk);
    for (int a = 0; a < N / 4; a++) write(a, 4'($urandom));
    @(negedge clk);
    read_all();
    for (int k = 0; k < 40; k++) write(int'($urandom % (N / 4)), 4'($urandom));
    @(negedge clk);
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
