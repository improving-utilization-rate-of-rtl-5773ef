// pe: merged processing element of the semi-parallel SC decoder.
//
// One PE takes the two LLRs of a butterfly, La and Lb, and in the same clock
// produces all three values that the following stage may need:
//   lf  = sign(La) sign(Lb) min(|La|, |Lb|)   (f node, min-sum)
//   lgp = La + Lb                              (g node for partial sum 0)
//   lgm = Lb - La                              (g node for partial sum 1)
// Producing both g candidates at once is the "precomputation" idea: the g
// result is picked later, when it is read back, by the partial sum. This
// halves the number of activations per stage.
//
// Purely combinational. Inputs and outputs are Q-bit two's complement; the two
// g outputs saturate to +-(2^(Q-1)-1), this design's choice of overflow rule.
module pe #(
  parameter int unsigned Q = 5
) (
  input  logic signed [Q-1:0] la,
  input  logic signed [Q-1:0] lb,
  output logic signed [Q-1:0] lf,
  output logic signed [Q-1:0] lgp,
  output logic signed [Q-1:0] lgm
);
  import polar_pkg::*;

  logic        [Q-1:0] mag_a, mag_b, mag_min;
  logic                sgn;
  logic signed [15:0]  wa, wb, wf;

  always_comb begin
    wa      = 16'(la);
    wb      = 16'(lb);
    mag_a   = la[Q-1] ? Q'(-la) : Q'(la);
    mag_b   = lb[Q-1] ? Q'(-lb) : Q'(lb);
    mag_min = (mag_a < mag_b) ? mag_a : mag_b;
    sgn     = la[Q-1] ^ lb[Q-1];
    wf      = sgn ? -16'(signed'({1'b0, mag_min})) : 16'(signed'({1'b0, mag_min}));
    lf      = Q'(sat_q(wf, Q));
    lgp     = Q'(sat_q(wa + wb, Q));
    lgm     = Q'(sat_q(wb - wa, Q));
  end

endmodule
