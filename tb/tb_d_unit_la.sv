// tb_d_unit_la: random test of the look-ahead decision unit. The expected four
// bits come from deciding bits 0/1 from the f values, forming the partial
// sums (u0^u1, u1), choosing the matching g candidates and deciding bits 2/3
// from them, i.e. the two D-node steps done one after the other.
module tb_d_unit_la;
  localparam int Q = 5;
  logic signed [Q-1:0] lf0, lf1, lgp0, lgm0, lgp1, lgm1;
  logic [3:0] fr, u;
  int checks = 0, failures = 0;
  int used [4];

  d_unit_la #(.Q(Q)) dut (.lf0, .lf1, .lgp0, .lgm0, .lgp1, .lgm1, .fr, .u);

  function automatic bit [1:0] decide(input int a, input int b, input bit f1, input bit f2);
    bit e0, e1;
    int g;
    e0 = f1 ? 1'b0 : ((a < 0) != (b < 0));
    g  = e0 ? b - a : b + a;
    if (f2)         e1 = 1'b0;
    else if (g < 0) e1 = 1'b1;
    else if (g > 0) e1 = 1'b0;
    else            e1 = f1 ? (a < 0) : (b < 0);
    return {e1, e0};
  endfunction

  function automatic int rnd();
    return int'($urandom % 31) - 15;
  endfunction

  initial begin
    int v [6];
    bit [1:0] d01, d23;
    bit s0, s1;
    foreach (used[k]) used[k] = 0;
    for (int t = 0; t < 20000; t++) begin
      foreach (v[k]) v[k] = rnd();
      fr = 4'($urandom);
      {lf0, lf1, lgp0, lgm0, lgp1, lgm1} = {Q'(v[0]), Q'(v[1]), Q'(v[2]), Q'(v[3]), Q'(v[4]), Q'(v[5])};
      #1;
      d01 = decide(v[0], v[1], fr[0], fr[1]);
      s0  = d01[0] ^ d01[1];
      s1  = d01[1];
      used[{s1, s0}]++;
      d23 = decide(s0 ? v[3] : v[2], s1 ? v[5] : v[4], fr[2], fr[3]);
      checks++;
      if (u != {d23, d01}) begin
        failures++;
        if (failures < 10) $display("got %b exp %b", u, {d23, d01});
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (used[k] == 0) failures++;
    end
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
