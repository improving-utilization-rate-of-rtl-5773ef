// tb_pe: exhaustive test of the merged PE for Q = 5: every pair of inputs,
// f (min-sum) and both saturated g candidates against integer arithmetic.
module tb_pe;
  localparam int Q = 5;
  localparam int LIM = 15;
  logic signed [Q-1:0] la, lb, lf, lgp, lgm;
  int checks = 0, failures = 0;

  pe #(.Q(Q)) dut (.la, .lb, .lf, .lgp, .lgm);

  function automatic int sat(input int v);
    return v > LIM ? LIM : (v < -LIM ? -LIM : v);
  endfunction

  initial begin
    int a, b, ma, mb, ef;
    for (a = -16; a <= 15; a++) begin
      for (b = -16; b <= 15; b++) begin
        la = Q'(a);
        lb = Q'(b);
        #1;
        ma = a < 0 ? -a : a;
        mb = b < 0 ? -b : b;
        ef = sat(((a < 0) != (b < 0)) ? -(ma < mb ? ma : mb) : (ma < mb ? ma : mb));
        checks += 3;
        if (int'(lf) != ef)            begin failures++; $display("f(%0d,%0d)=%0d exp %0d", a, b, lf, ef); end
        if (int'(lgp) != sat(a + b))   begin failures++; $display("g+(%0d,%0d)=%0d", a, b, lgp); end
        if (int'(lgm) != sat(b - a))   begin failures++; $display("g-(%0d,%0d)=%0d", a, b, lgm); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
