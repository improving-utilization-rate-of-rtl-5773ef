// tb_channel_buffer: loads three frames (N = 64, P = 8: 8 groups, 4 into the
// lo and 4 into the hi RAM of a channel page) with random gaps in in_valid.
// Checks that each group is written one cycle after it is accepted, with the
// right data, RAM half and page-relative address, that in_ready falls after
// the eighth group, stays low in the load_done cycle and rises again after it
// while enable is high (the next frame can follow at once), that enable low
// holds in_ready low, and that load_done comes with the last write only.
module tb_channel_buffer;
  import polar_pkg::*;
  localparam int N = 64, P = 8, Q = 5, W = P * Q;
  localparam int AW = $clog2(stage_words(6, P));
  logic clk = 0, rst_n = 0, enable = 0, in_valid = 0, in_ready;
  logic [W-1:0] in_llr = '0, ch_word;
  logic ch_we, ch_hi, load_done;
  logic [AW-1:0] ch_addr;
  int checks = 0, failures = 0;

  always #50 clk = ~clk;

  channel_buffer #(.N(N), .P(P), .Q(Q)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [W-1:0] sent;
    int w;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      if (f == 2) begin
        // no free page: nothing may be accepted
        enable = 0;
        repeat (3) begin
          in_valid = 1;
          #1;
          check(!in_ready, "not ready while disabled");
          @(negedge clk);
          check(!ch_we, "no write while disabled");
        end
      end
      enable = 1;
      w = 0;
      while (w < N / P) begin
        in_valid = ($urandom % 3) != 0;
        in_llr   = W'({$urandom, $urandom});
        #1;
        check(in_ready, "ready while loading");
        sent = in_llr;
        @(negedge clk);
        if (in_valid) begin
          check(ch_we, "write follows accept");
          check(ch_word == sent, "write data");
          check(ch_hi == (w >= 4), "RAM half");
          check(int'(ch_addr) == (w % 4), $sformatf("address %0d for group %0d", ch_addr, w));
          check(load_done == (w == N / P - 1), "load_done");
          w++;
        end else begin
          check(!ch_we && !load_done, "no write without accept");
        end
        in_valid = 0;
      end
      #1;
      check(!in_ready, "ready low in the load_done cycle");
      @(negedge clk);
      check(!ch_we, "no extra write");
      check(in_ready, "ready again for the next frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
