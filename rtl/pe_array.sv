// pe_array: the P processing elements with their operand routing.
//
// Operand routing (the MUX in front of the PEs): a stage whose butterfly span
// 2^l ("half") is at least P reads the upper operands of its P butterflies from
// the lo RAMs and the lower operands from the hi RAMs, lane k to PE k. A
// smaller stage finds its whole input vector in one lo word: PE k (k < half)
// takes lanes k and half + k; PEs k >= half are idle (their results are
// ignored). When the stage works on the right child of a node (use_g = 1) the
// operands are g values: for each operand the partial sum from the PPU (sa for
// the upper, sb for the lower) picks the subtracted candidate (sum 1) or the
// added one (sum 0). Otherwise the operands are the stored f values or the
// channel LLRs, which the LLR memory delivers on the F words.
// Each PE returns f, g+ and g- for its butterfly; they leave as three words of
// P LLRs. Combinational; half is a power of two between 1 and N/2.
module pe_array #(
  parameter int unsigned P = 64,
  parameter int unsigned Q = 5,
  parameter int unsigned HW = 11,   // width of the half input
  localparam int unsigned W = P * Q
) (
  input  logic [W-1:0]  f_lo,
  input  logic [W-1:0]  f_hi,
  input  logic [W-1:0]  gp_lo,
  input  logic [W-1:0]  gp_hi,
  input  logic [W-1:0]  gm_lo,
  input  logic [W-1:0]  gm_hi,
  input  logic [HW-1:0] half,
  input  logic          use_g,
  input  logic [P-1:0]  sa,
  input  logic [P-1:0]  sb,
  output logic [W-1:0]  out_f,
  output logic [W-1:0]  out_gp,
  output logic [W-1:0]  out_gm
);
  typedef logic signed [Q-1:0] llr_t;

  llr_t a [P];
  llr_t b [P];

  always_comb begin
    logic is_small;
    is_small = (32'(half) < P);
    for (int unsigned k = 0; k < P; k++) begin
      int unsigned kb;
      llr_t af, bf, agp, bgp, agm, bgm;
      kb  = is_small ? ((32'(half) + k) % P) : k;
      af  = f_lo [k*Q +: Q];
      agp = gp_lo[k*Q +: Q];
      agm = gm_lo[k*Q +: Q];
      bf  = is_small ? f_lo [kb*Q +: Q] : f_hi [k*Q +: Q];
      bgp = is_small ? gp_lo[kb*Q +: Q] : gp_hi[k*Q +: Q];
      bgm = is_small ? gm_lo[kb*Q +: Q] : gm_hi[k*Q +: Q];
      a[k] = use_g ? (sa[k] ? agm : agp) : af;
      b[k] = use_g ? (sb[k] ? bgm : bgp) : bf;
    end
  end

  for (genvar k = 0; k < P; k++) begin : g_pe
    pe #(.Q(Q)) u_pe (
      .la (a[k]),
      .lb (b[k]),
      .lf (out_f [k*Q +: Q]),
      .lgp(out_gp[k*Q +: Q]),
      .lgm(out_gm[k*Q +: Q])
    );
  end

endmodule
