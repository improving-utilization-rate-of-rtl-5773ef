// ctrl_checker: drives one sc_controller (parameters N, P) through FRAMES
// frames and compares every decoding cycle with a schedule listed here from
// the SC tree: for bits i = 0, 4, 8, ... the stages from
// (i == 0 ? n-1 : trailing_zeros(i) - 1) down to 1, each for max(1, 2^l/P)
// cycles (the first one of them reading g values when i > 0), then one
// decision cycle. Addresses are checked against a memory map worked out here:
// stages 2 .. n-1 and then the channel, each max(1, 2^m/(2P)) words.
// Even frames are loaded while the decoder is idle. Each odd frame is loaded
// during the frame before it and must start in the cycle after that frame's
// last decision. The checker also follows the two channel pages (ld_page,
// dec_page) and load_en.
module ctrl_checker #(
  parameter int unsigned N = 64,
  parameter int unsigned P = 8,
  parameter int unsigned FRAMES = 4,
  parameter int unsigned EXP_LAT = 0
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int LOGN = $clog2(N);
  localparam int FD   = polar_pkg::f_depth(LOGN, P);
  localparam int AW   = (FD > 1) ? $clog2(FD) : 1;

  logic            load_done, load_en, ld_page, dec_page, ppu_clr, use_g, pe_we, pe_hi, cap_d, dec_en, busy, done;
  logic [AW-1:0]   raddr, pe_addr;
  logic [LOGN:0]   half;
  logic [LOGN-1:0] sel_base, dec_idx;

  sc_controller #(.N(N), .P(P)) dut (.*);

  int base [LOGN + 2];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL [N=%0d P=%0d] %s", N, P, what);
    end
  endtask

  initial begin
    int acc, top, ncyc, cycles, words;
    bit pre, pre_next;
    finished = 0;
    checks = 0;
    failures = 0;
    load_done = 0;
    acc = 0;
    for (int m = 2; m <= LOGN; m++) begin
      base[m] = acc;
      words = ((1 << m) >= 2 * P) ? (1 << m) / (2 * P) : 1;
      acc += words;
    end
    @(posedge rst_n);
    pre = 0;
    for (int f = 0; f < int'(FRAMES); f++) begin
      if (!pre) begin
        @(negedge clk);
        check(load_en && !busy && ld_page == f[0], "idle before load");
        load_done = 1;
        #1;
        check(ppu_clr, "PPU cleared at frame start");
        @(negedge clk);
      end
      pre_next = (f + 1 < int'(FRAMES)) && (f % 2 == 0);
      cycles = 0;
      for (int i = 0; i < int'(N); i += 4) begin
        if (i == 0) top = LOGN - 1;
        else begin
          top = 2;
          while (((i >> top) & 1) == 0) top++;
          top = top - 1;
        end
        for (int l = top; l >= 0; l--) begin
          ncyc = (l == 0) ? 1 : ((1 << l) >= P) ? (1 << l) / P : 1;
          for (int c = 0; c < ncyc; c++) begin
            // the next frame's last group arrives in cycle 2 of this frame
            load_done = pre_next && cycles == 2;
            #1;
            check(busy && dec_page == f[0], $sformatf("frame %0d: busy on page %0d", f, dec_page));
            if (pre_next && cycles <= 2)
              check(load_en && ld_page == !f[0], "other page free for loading");
            else if (pre_next)
              check(!load_en, "both pages full");
            if (l == 0) begin
              check(dec_en && int'(dec_idx) == i, $sformatf("decision cycle for bit %0d", i));
              check(done == (i + 4 == int'(N)), "done");
              check(ppu_clr == (pre_next && i + 4 == int'(N)), "back-to-back start with the last decision");
            end else begin
              check(!dec_en && !ppu_clr, $sformatf("i=%0d l=%0d c=%0d: stage cycle", i, l, c));
              check(int'(half) == (1 << l), $sformatf("i=%0d l=%0d: half %0d", i, l, half));
              check(use_g == (i != 0 && l == top), $sformatf("i=%0d l=%0d: use_g", i, l));
              check(int'(raddr) == base[l + 1] + c, $sformatf("i=%0d l=%0d c=%0d: raddr %0d", i, l, c, raddr));
              if (use_g) check(int'(sel_base) == i - (2 << l) + c * int'(P), "select base");
              check(cap_d == (l == 1), "decision register capture");
              check(pe_we == (l >= 2), "PE write enable");
              if (l >= 2) begin
                if ((1 << l) >= 2 * P)
                  check(pe_hi == (c >= ncyc / 2) && int'(pe_addr) == base[l] + c % (ncyc / 2),
                        $sformatf("i=%0d l=%0d c=%0d: write %0d/%0d", i, l, c, pe_hi, pe_addr));
                else
                  check(!pe_hi && int'(pe_addr) == base[l], "single-word write");
              end
            end
            cycles++;
            @(negedge clk);
          end
        end
      end
      load_done = 0;
      #1;
      if (pre_next) check(busy && dec_page == !f[0], "next frame follows without a gap");
      else          check(!busy && load_en, "back to load after the frame");
      check(cycles == int'(polar_pkg::decode_cycles(LOGN, P)), $sformatf("%0d cycles", cycles));
      if (EXP_LAT != 0) check(cycles == int'(EXP_LAT), $sformatf("%0d cycles, expected %0d", cycles, EXP_LAT));
      pre = pre_next;
      if (!pre) repeat (2) @(negedge clk);
    end
    finished = 1;
  end
endmodule
