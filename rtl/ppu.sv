// ppu: partial-sum unit. Keeps the partial sums (re-encoded decided bits) that
// select between the two precomputed g candidates, and routes the ones the
// current stage needs to the P PEs.
//
// Register x[0..N-1] always equals the polar encoding (normal index order) of
// the bits decided so far, with the undecided bits taken as 0. Every
// look-ahead decision brings four bits u(i) .. u(i+3), i a multiple of 4. They
// are encoded into 4 partial sums
//   b0 = u0^u1^u2^u3, b1 = u1^u3, b2 = u2^u3, b3 = u3
// and b(j mod 4) is XORed into every x[j] whose upper index bits (j >> 2) are
// a subset of (i >> 2): those are exactly the positions the new bits reach in
// the encoding graph. Each update is one XOR on top of the 4-bit encoder, so
// the logic depth does not grow with N.
// When the decoder enters a right subtree of size 2^(l+1) at bit index i, the
// left sibling has just been completed and x[i-2^(l+1) .. i-1] holds its
// partial sums; the later bits of the frame cannot have reached those
// positions yet. The output MUX gives PE k the select bits
//   sa[k] = x[sel_base + k],  sb[k] = x[sel_base + sel_half + k]
// for its upper and lower operands (0 beyond the end of the frame).
// clr empties the register at the start of a frame. Updates take effect at the
// clock edge that ends the decision cycle.
module ppu #(
  parameter int unsigned N = 1024,
  parameter int unsigned P = 64,
  localparam int unsigned LOGN = $clog2(N)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            upd,
  input  logic [LOGN-1:0] upd_idx,
  input  logic [3:0]      u4,
  input  logic [LOGN-1:0] sel_base,
  input  logic [LOGN:0]   sel_half,
  output logic [P-1:0]    sa,
  output logic [P-1:0]    sb
);
  logic [N-1:0] x;
  logic [3:0]   b4;
  logic [N-1:0] mask;

  always_comb begin
    b4[0] = u4[0] ^ u4[1] ^ u4[2] ^ u4[3];
    b4[1] = u4[1] ^ u4[3];
    b4[2] = u4[2] ^ u4[3];
    b4[3] = u4[3];
    for (int unsigned j = 0; j < N; j++) begin
      mask[j] = ((LOGN'(j) >> 2) & ~(upd_idx >> 2)) == '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0;
    end else if (clr) begin
      x <= '0;
    end else if (upd) begin
      for (int unsigned j = 0; j < N; j++) begin
        if (mask[j]) x[j] <= x[j] ^ b4[j % 4];
      end
    end
  end

  always_comb begin
    for (int unsigned k = 0; k < P; k++) begin
      int unsigned ia, ib;
      ia = 32'(sel_base) + k;
      ib = 32'(sel_base) + 32'(sel_half) + k;
      sa[k] = (ia < N) ? x[ia] : 1'b0;
      sb[k] = (ib < N) ? x[ib] : 1'b0;
    end
  end

endmodule
