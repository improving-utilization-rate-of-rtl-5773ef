// polar_pkg: types, constants and helper functions shared by the semi-parallel
// 2-bit successive-cancellation (SC) polar decoder.
//
// LLRs are Q-bit two's-complement integers (Q = 5, no fractional bits, as in
// the (5,5,0) quantisation the decoder is built for). All arithmetic results
// are saturated to the symmetric range [-(2^(Q-1)-1), 2^(Q-1)-1]; the
// symmetric range (rather than reaching -2^(Q-1)) is a choice of this design so
// that the magnitude of every stored LLR fits in Q-1 bits.
//
// The LLR memory layout functions describe where the outputs of each decoding
// stage live. Stage m holds a vector of 2^m LLRs (stage n is the channel). A
// vector of at least 2P LLRs is split in two halves: the lower half goes to the
// "lo" RAM and the upper half to the "hi" RAM, at the same addresses, so that
// one read address delivers both operands of P butterflies. A shorter vector
// fits in a single lo word.
package polar_pkg;

  // Saturate a wide signed value to the symmetric Q-bit range.
  function automatic logic signed [15:0] sat_q(input logic signed [15:0] v, input int unsigned q);
    logic signed [15:0] lim;
    lim = 16'sd1;
    lim = (lim <<< (q - 1)) - 16'sd1;
    if (v > lim) return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction

  // Number of RAM words (per lo/hi RAM) that stage m occupies.
  function automatic int unsigned stage_words(input int unsigned m, input int unsigned p);
    if ((1 << m) >= 2 * p) return (1 << m) / (2 * p);
    return 1;
  endfunction

  // Base address of stage m (2 <= m <= n). Stages 2 .. n-1 hold internal
  // LLRs in all three banks; the addresses of stage n (channel LLRs) follow
  // them and are served from the channel RAM.
  function automatic int unsigned stage_base(input int unsigned m, input int unsigned p);
    int unsigned b;
    b = 0;
    for (int unsigned k = 2; k < 32; k++) begin
      if (k < m) b += stage_words(k, p);
    end
    return b;
  endfunction

  // Depth of the internal-LLR banks, and size of the whole read address
  // space (internal stages plus one channel page).
  function automatic int unsigned g_depth(input int unsigned n, input int unsigned p);
    int unsigned d;
    d = stage_base(n, p);
    return (d == 0) ? 1 : d;
  endfunction

  function automatic int unsigned f_depth(input int unsigned n, input int unsigned p);
    return stage_base(n, p) + stage_words(n, p);
  endfunction

  // Decoding latency in clock cycles: N/4 look-ahead decisions plus, for every
  // stage l = 1 .. n-1, 2^(n-l-1) activations of max(1, 2^l / P) cycles each.
  // Equals 0.75N + N/(2P) log2(N/(4P)) whenever N >= 4P.
  function automatic int unsigned decode_cycles(input int unsigned n, input int unsigned p);
    int unsigned nc;
    nc = (1 << n) / 4;
    for (int unsigned l = 1; l < 32; l++) begin
      if (l < n) nc += (1 << (n - l - 1)) * (((1 << l) >= p) ? (1 << l) / p : 1);
    end
    return nc;
  endfunction

endpackage
