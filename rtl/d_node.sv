// d_node: decision node replacing the last decoding stage (stage 0).
//
// From the two stage-1 LLRs of a pair, La = L(1,2i) and Lb = L(1,2i+1), and
// the frozen flags fr1, fr2 of bits 2i and 2i+1, it decides both bits in one
// clock without computing the stage-0 LLRs:
//   u0 = !fr1 & (sign(La) ^ sign(Lb))
//   u1 = !comp&!fr2&sign(Lb) | comp&!fr1&!fr2&sign(Lb) | comp&fr1&!fr2&sign(La)
// where sign() is 1 for a negative LLR and comp = (|La| >= |Lb|). This is the
// logic form of the two hard decisions of an SC decoder: u1 follows the sign
// of g(u0, La, Lb). A frozen bit is always 0. Purely combinational.
module d_node #(
  parameter int unsigned Q = 5
) (
  input  logic signed [Q-1:0] la,
  input  logic signed [Q-1:0] lb,
  input  logic                fr1,
  input  logic                fr2,
  output logic                u0,
  output logic                u1
);
  logic [Q-1:0] mag_a, mag_b;
  logic         sa, sb, comp;

  always_comb begin
    sa    = la[Q-1];
    sb    = lb[Q-1];
    mag_a = sa ? Q'(-la) : Q'(la);
    mag_b = sb ? Q'(-lb) : Q'(lb);
    comp  = (mag_a >= mag_b);
    u0    = !fr1 && (sa ^ sb);
    u1    = (!comp && !fr2 && sb) || (comp && !fr1 && !fr2 && sb) || (comp && fr1 && !fr2 && sa);
  end

endmodule
