// tb_d_node: exhaustive test of the D node for Q = 5. The expected bits are
// the two SC hard decisions: u0 = sign of f(La, Lb), u1 = sign of
// g = Lb + (-1)^u0 La, frozen bits 0. When g is exactly 0 the expected u1 is
// the sign of La if bit 2i is frozen and the sign of Lb otherwise, which is
// what the decision equations give for that tie.
module tb_d_node;
  localparam int Q = 5;
  logic signed [Q-1:0] la, lb;
  logic fr1, fr2, u0, u1;
  int checks = 0, failures = 0;

  d_node #(.Q(Q)) dut (.la, .lb, .fr1, .fr2, .u0, .u1);

  initial begin
    int a, b, g;
    bit e0, e1;
    for (a = -15; a <= 15; a++)
      for (b = -15; b <= 15; b++)
        for (int fr = 0; fr < 4; fr++) begin
          la = Q'(a); lb = Q'(b); fr1 = fr[0]; fr2 = fr[1];
          #1;
          e0 = fr[0] ? 1'b0 : ((a < 0) != (b < 0));
          g  = e0 ? b - a : b + a;
          if (fr[1])      e1 = 1'b0;
          else if (g < 0) e1 = 1'b1;
          else if (g > 0) e1 = 1'b0;
          else            e1 = fr[0] ? (a < 0) : (b < 0);
          checks++;
          if ({u0, u1} != {e0, e1}) begin
            failures++;
            if (failures < 10) $display("La=%0d Lb=%0d fr=%b: got %b%b exp %b%b", a, b, fr[1:0], u0, u1, e0, e1);
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
