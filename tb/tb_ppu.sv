// tb_ppu: feeds random groups of four decided bits into the PPU (N = 64,
// P = 8) and after every group compares the routed select bits, for random
// select bases and halves, with the polar encoding of the decided prefix
// (undecided bits 0) computed by the butterfly recursion. It also checks the
// property the decoder relies on: right after a block of 2^t bits is
// finished, its positions in the register hold that block's own encoding.
// A frame restart (clr) must empty the register.
module tb_ppu;
  localparam int N = 64, P = 8, LOGN = 6;
  logic clk = 0, rst_n = 0, clr = 0, upd = 0;
  logic [LOGN-1:0] upd_idx = '0, sel_base = '0;
  logic [LOGN:0] sel_half = '0;
  logic [3:0] u4 = '0;
  logic [P-1:0] sa, sb;
  int checks = 0, failures = 0;
  bit u [N];
  bit x [N];

  always #50 clk = ~clk;  // long period: the route checks step #1 between edges

  ppu #(.N(N), .P(P)) dut (.*);

  task automatic encode(input int upto);
    for (int j = 0; j < N; j++) x[j] = (j < upto) ? u[j] : 1'b0;
    for (int s = 1; s < N; s *= 2)
      for (int j = 0; j < N; j++)
        if ((j & s) == 0) x[j] = x[j] ^ x[j + s];
  endtask

  task automatic compare_routes(input int trials);
    for (int t = 0; t < trials; t++) begin
      int base, hs;
      hs = 1 << ($urandom % 5);
      base = int'($urandom % N);
      sel_base = LOGN'(base);
      sel_half = (LOGN + 1)'(hs);
      #1;
      for (int k = 0; k < P; k++) begin
        checks += 2;
        if (sa[k] != ((base + k < N) ? x[base + k] : 1'b0)) begin failures++; if (failures < 3) $display("sa base %0d k %0d", base, k); end
        if (sb[k] != ((base + hs + k < N) ? x[base + hs + k] : 1'b0)) begin failures++; if (failures < 3) $display("sb base %0d hs %0d k %0d", base, hs, k); end
      end
    end
  endtask

  bit blk [N];

  task automatic check_block(input int b0, input int sz);
    for (int j = 0; j < sz; j++) blk[j] = u[b0 + j];
    for (int s = 1; s < sz; s *= 2)
      for (int j = 0; j < sz; j++)
        if ((j & s) == 0) blk[j] = blk[j] ^ blk[j + s];
    for (int j = 0; j < sz; j++) begin
      checks++;
      if (dut.x[b0 + j] != blk[j]) begin
        failures++;
        if (failures < 3) $display("block %0d+%0d position %0d wrong", b0, sz, j);
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int frame = 0; frame < 3; frame++) begin
      clr = 1;
      @(negedge clk);
      clr = 0;
      encode(0);
      compare_routes(4);
      for (int i = 0; i < N; i += 4) begin
        for (int k = 0; k < 4; k++) u[i + k] = 1'($urandom);
        upd = 1; upd_idx = LOGN'(i); u4 = {u[i+3], u[i+2], u[i+1], u[i]};
        @(negedge clk);
        upd = 0;
        encode(i + 4);
        compare_routes(6);
        // the block that has just been completed holds its own encoding
        for (int sz = 4; sz <= N; sz *= 2) begin
          if (((i + 4) % sz) == 0) check_block(i + 4 - sz, sz);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
