// d_unit_la: look-ahead decision unit, decodes four bits u(4k) .. u(4k+3) per clock.
//
// Inputs are the results of one stage-1 activation (a butterfly pair on the
// four stage-2 LLRs of the current 4-bit block):
//   lf0, lf1        f outputs, the LLRs of bits 4k and 4k+1,
//   lgp0/lgm0, lgp1/lgm1  both g candidates for the LLRs of bits 4k+2, 4k+3.
// One D node decides u(4k), u(4k+1). Four more D nodes decide u(4k+2),
// u(4k+3) for every value of the partial sums (u(4k)^u(4k+1), u(4k+1)) at the
// same time; a MUX then picks the pair that matches. The critical path is one
// D node plus the MUX instead of two D nodes in series (five D nodes in all).
// fr[3:0] are the frozen flags of the four bits, fr[0] for bit 4k. Combinational.
module d_unit_la #(
  parameter int unsigned Q = 5
) (
  input  logic signed [Q-1:0] lf0,
  input  logic signed [Q-1:0] lf1,
  input  logic signed [Q-1:0] lgp0,
  input  logic signed [Q-1:0] lgm0,
  input  logic signed [Q-1:0] lgp1,
  input  logic signed [Q-1:0] lgm1,
  input  logic        [3:0]   fr,
  output logic        [3:0]   u
);
  logic       u0, u1;
  logic [3:0] c0, c1;   // candidate u(4k+2), u(4k+3) for each partial-sum pair
  logic [1:0] sel;

  d_node #(.Q(Q)) u_d_first (
    .la(lf0), .lb(lf1), .fr1(fr[0]), .fr2(fr[1]), .u0(u0), .u1(u1)
  );

  // Candidate index {s1, s0}: s0 = partial sum for bit 4k+2, s1 for bit 4k+3.
  for (genvar c = 0; c < 4; c++) begin : g_cand
    d_node #(.Q(Q)) u_d_cand (
      .la (c[0] ? lgm0 : lgp0),
      .lb (c[1] ? lgm1 : lgp1),
      .fr1(fr[2]),
      .fr2(fr[3]),
      .u0 (c0[c]),
      .u1 (c1[c])
    );
  end

  always_comb begin
    sel = {u1, u0 ^ u1};
    u   = {c1[sel], c0[sel], u1, u0};
  end

endmodule
