// tb_pe_array: random test of the PE array with its operand routing (P = 8,
// Q = 5). For split stages (half >= P) PE k must take lane k of the lo and hi
// words; for single-word stages PE k (k < half) takes lanes k and half+k of the
// lo word. With use_g the per-operand select bits must pick the subtracted
// (1) or added (0) candidate. Expected PE results are computed in integers.
module tb_pe_array;
  localparam int P = 8, Q = 5, W = P * Q, HW = 8, LIM = 15;
  logic [W-1:0] f_lo, f_hi, gp_lo, gp_hi, gm_lo, gm_hi, out_f, out_gp, out_gm;
  logic [HW-1:0] half;
  logic use_g;
  logic [P-1:0] sa, sb;
  int checks = 0, failures = 0;
  int n_small = 0, n_large = 0, n_g = 0;

  pe_array #(.P(P), .Q(Q), .HW(HW)) dut (.*);

  function automatic int lane(input logic [W-1:0] w, input int k);
    return int'($signed(w[k*Q +: Q]));
  endfunction

  function automatic int sat(input int v);
    return v > LIM ? LIM : (v < -LIM ? -LIM : v);
  endfunction

  function automatic logic [W-1:0] rword();
    logic [W-1:0] v;
    for (int k = 0; k < P; k++) v[k*Q +: Q] = Q'(int'($urandom % 31) - 15);
    return v;
  endfunction

  initial begin
    int hs, a, b, ma, mb, ef;
    for (int t = 0; t < 5000; t++) begin
      {f_lo, f_hi, gp_lo, gp_hi, gm_lo, gm_hi} = {rword(), rword(), rword(), rword(), rword(), rword()};
      hs    = 1 << ($urandom % 6);          // 1 .. 32
      half  = HW'(hs);
      use_g = $urandom % 2;
      sa    = P'($urandom);
      sb    = P'($urandom);
      #1;
      if (hs < P) n_small++; else n_large++;
      if (use_g) n_g++;
      for (int k = 0; k < P; k++) begin
        if (hs < P && k >= hs) continue;
        if (!use_g) begin
          a = lane(f_lo, k);
          b = (hs < P) ? lane(f_lo, hs + k) : lane(f_hi, k);
        end else begin
          a = sa[k] ? lane(gm_lo, k) : lane(gp_lo, k);
          if (hs < P) b = sb[k] ? lane(gm_lo, hs + k) : lane(gp_lo, hs + k);
          else        b = sb[k] ? lane(gm_hi, k) : lane(gp_hi, k);
        end
        ma = a < 0 ? -a : a;
        mb = b < 0 ? -b : b;
        ef = ((a < 0) != (b < 0)) ? -(ma < mb ? ma : mb) : (ma < mb ? ma : mb);
        checks++;
        if (lane(out_f, k) != ef || lane(out_gp, k) != sat(a + b) || lane(out_gm, k) != sat(b - a)) begin
          failures++;
          if (failures < 10) $display("half=%0d g=%0d lane %0d: a=%0d b=%0d got %0d/%0d/%0d", hs, use_g, k, a, b,
                                      lane(out_f, k), lane(out_gp, k), lane(out_gm, k));
        end
      end
    end
    checks += 3;
    if (n_small == 0) failures++;
    if (n_large == 0) failures++;
    if (n_g == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
