// decoder_harness: drives one polar_sp_decoder through FRAMES frames and checks
// every decided bit against an independent bit-serial SC reference decoder.
//
// Frames come in groups of three that share a frozen set. For each frame:
// pick a message, encode it (x = u F^{(x)n}, normal index order) and map x to
// channel LLRs (+A for 0, -A for 1) plus bounded noise. The driver writes the
// frozen table while the decoder is idle and streams each frame's LLRs as soon
// as the decoder takes them: the second frame of a group is loaded while the
// first one decodes, and the third is held off by llr_ready (both channel
// pages full) until the first one ends. The monitor collects the decided
// bits. The reference decodes the same LLRs two bits at a time with the
// textbook recursion (f / g per stage, partial sums per subtree) using the
// same Q-bit saturating arithmetic and the decision rule of the D node. Checks:
//   - every group of four decided bits equals the reference,
//   - u_idx runs 0, 4, 8, ... and done comes with the last group,
//   - each frame takes exactly decode_cycles(n, P) busy cycles (and EXP_LAT
//     if nonzero), and a frame loaded during the previous one starts in the
//     cycle after the previous done (one frame per decode_cycles),
//   - the utilisation rate N log2 N / (2 P latency) rounds to EXP_ALPHA
//     thousandths if that is nonzero,
//   - in frames whose noise cannot flip a channel sign, the bits equal the message.
// It also counts how often the design's mechanisms occur (right-child g
// selection, subtracted-candidate select, multi-cycle stages, split and
// single-word stages, hi-RAM writes, each look-ahead MUX input, each frozen
// pattern of a bit pair, saturation, back-to-back frames, input held off by
// llr_ready) and counts a failure for each one that
// applies to this size and never occurred.
module decoder_harness #(
  parameter int unsigned N       = 1024,
  parameter int unsigned P       = 64,
  parameter int unsigned Q       = 5,
  parameter int unsigned FRAMES  = 6,
  parameter int unsigned EXP_LAT = 0,
  parameter int unsigned EXP_ALPHA = 0,   // utilisation rate x 1000, 0 = not checked
  parameter int unsigned SEED    = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  import polar_pkg::*;

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned W    = P * Q;
  localparam int          LIM  = (1 << (Q - 1)) - 1;

  logic                   frz_we, llr_valid, llr_ready, u_valid, busy, done;
  logic [$clog2(N/4)-1:0] frz_addr;
  logic [3:0]             frz_data, u_bits;
  logic [W-1:0]           llr_in;
  logic [LOGN-1:0]        u_idx;

  polar_sp_decoder #(.N(N), .P(P), .Q(Q)) dut (
    .clk, .rst_n, .frz_we, .frz_addr, .frz_data,
    .llr_valid, .llr_ready, .llr_in,
    .u_valid, .u_idx, .u_bits, .busy, .done
  );

  // ---------------- stimulus and reference data ----------------
  bit frozen [N];
  bit msg    [N];
  bit cw     [N];
  int chan   [N];
  bit ref_u  [N];
  bit clean;

  bit frz_all   [FRAMES][N];
  int chan_all  [FRAMES][N];
  bit ref_all   [FRAMES][N];
  bit msg_all   [FRAMES][N];
  bit clean_all [FRAMES];

  // mechanism counters
  int n_rchild, n_gminus, n_multi, n_split, n_single, n_hiwr, n_sat, n_b2b, n_stall;
  int n_la [4];
  int n_fr [4];
  int frames_done;
  int mon_frame;

  function automatic int sat(input int v);
    if (v > LIM) return LIM;
    if (v < -LIM) return -LIM;
    return v;
  endfunction

  function automatic int fmin(input int a, input int b);
    int m;
    m = (a < 0 ? -a : a) < (b < 0 ? -b : b) ? (a < 0 ? -a : a) : (b < 0 ? -b : b);
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  function automatic int gsat(input int a, input int b, input bit s);
    int v;
    v = s ? b - a : a + b;
    if (v > LIM || v < -LIM) n_sat++;
    return sat(v);
  endfunction

  int  alpha [LOGN+1][N];
  bit  betal [LOGN+1][N];

  task automatic ref_decode();
    bit cur [N];
    bit tmp [N];
    int top, s, p, la, lb, g;
    for (int j = 0; j < N; j++) alpha[LOGN][j] = chan[j];
    for (int i = 0; i < N; i += 2) begin
      if (i == 0) top = LOGN - 1;
      else begin
        top = 1;
        while (((i >> top) & 1) == 0) top++;
      end
      for (int m = top; m >= 1; m--) begin
        for (int j = 0; j < (1 << m); j++) begin
          if (i != 0 && m == top)
            alpha[m][j] = gsat(alpha[m+1][j], alpha[m+1][j + (1 << m)], betal[m][j]);
          else
            alpha[m][j] = fmin(alpha[m+1][j], alpha[m+1][j + (1 << m)]);
        end
      end
      la = alpha[1][0];
      lb = alpha[1][1];
      ref_u[i] = frozen[i] ? 1'b0 : ((la < 0) != (lb < 0));
      g = ref_u[i] ? lb - la : lb + la;
      if (frozen[i+1])  ref_u[i+1] = 1'b0;
      else if (g < 0)   ref_u[i+1] = 1'b1;
      else if (g > 0)   ref_u[i+1] = 1'b0;
      else              ref_u[i+1] = frozen[i] ? (la < 0) : (lb < 0);
      // partial sums of the finished subtrees
      cur[0] = ref_u[i] ^ ref_u[i+1];
      cur[1] = ref_u[i+1];
      s = 2;
      p = i;
      while (s < N && ((p & s) != 0)) begin
        for (int j = 0; j < s; j++) begin
          tmp[j]     = betal[$clog2(s)][j] ^ cur[j];
          tmp[j + s] = cur[j];
        end
        for (int j = 0; j < 2 * s; j++) cur[j] = tmp[j];
        p -= s;
        s *= 2;
      end
      if (s < N) for (int j = 0; j < s; j++) betal[$clog2(s)][j] = cur[j];
    end
  endtask

  task automatic make_frame(input int f);
    int amp, noise, pf;
    // frozen set: a new random set of one of three rates for every group of frames
    if (f % 3 == 0) begin
      pf = ((f / 3) % 3 == 0) ? 50 : ((f / 3) % 3 == 1) ? 25 : 75;
      for (int j = 0; j < N; j++) frozen[j] = ($urandom % 100) < pf;
    end
    for (int j = 0; j < N; j++) msg[j] = frozen[j] ? 1'b0 : 1'($urandom);
    // encode x = u G, G = F kron n, normal index order
    for (int j = 0; j < N; j++) cw[j] = msg[j];
    for (int s = 1; s < N; s *= 2)
      for (int j = 0; j < N; j++)
        if ((j & s) == 0) cw[j] = cw[j] ^ cw[j + s];
    // every other frame: noise below the amplitude (sign-correct channel)
    clean = (f % 2 == 0);
    amp   = clean ? 9 : 3;
    for (int j = 0; j < N; j++) begin
      noise   = clean ? int'($urandom % 17) - 8 : int'($urandom % 25) - 12;
      chan[j] = sat((cw[j] ? -amp : amp) + noise);
    end
  endtask

  // ---------------- monitors ----------------
  logic prev_done;
  always @(posedge clk) begin
    if (rst_n && dut.busy) begin
      if (dut.use_g && dut.pe_we | dut.cap_d) begin
        n_rchild++;
        if ((dut.sa | dut.sb) != '0) n_gminus++;
      end
      if (!dut.u_valid) begin   // a stage cycle
        if (dut.u_ctrl.cyc != 0) n_multi++;
        if (32'(dut.half) >= P) n_split++; else n_single++;
      end
      if (dut.pe_we && dut.pe_hi) n_hiwr++;
      if (prev_done) n_b2b++;
      if (llr_valid && !llr_ready) n_stall++;
    end
    if (rst_n && u_valid) begin
      n_la[{u_bits[1], u_bits[0] ^ u_bits[1]}]++;
      n_fr[{frz_all[mon_frame][u_idx], frz_all[mon_frame][u_idx + 1]}]++;
      n_fr[{frz_all[mon_frame][u_idx + 2], frz_all[mon_frame][u_idx + 3]}]++;
    end
    prev_done <= rst_n && done;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL [N=%0d P=%0d] %s", N, P, what);
    end
  endtask

  // driver: frozen table while idle, then the channel LLRs of each frame
  task automatic drive();
    for (int f = 0; f < int'(FRAMES); f++) begin
      if (f % 3 == 0) begin
        while (frames_done < f) @(posedge clk);
        for (int k = 0; k < int'(N / 4); k++) begin
          frz_we   <= 1'b1;
          frz_addr <= ($clog2(N/4))'(k);
          frz_data <= {frz_all[f][4*k+3], frz_all[f][4*k+2], frz_all[f][4*k+1], frz_all[f][4*k]};
          @(posedge clk);
        end
        frz_we <= 1'b0;
      end
      for (int w = 0; w < int'((N > P) ? N / P : 1); w++) begin
        for (int k = 0; k < int'(P); k++)
          llr_in[k*Q +: Q] <= (w * P + k < N) ? Q'(chan_all[f][w * P + k]) : '0;
        llr_valid <= 1'b1;
        @(posedge clk);
        while (!llr_ready) @(posedge clk);
      end
      llr_valid <= 1'b0;
      @(posedge clk);
    end
  endtask

  // monitor: decided bits, frame timing and comparison with the reference
  task automatic monitor();
    int lat, nexp, errs, msgerr;
    real alpha;
    bit saw_done;
    bit got [N];
    for (int f = 0; f < int'(FRAMES); f++) begin
      mon_frame = f;
      lat = 0;
      nexp = 0;
      saw_done = 0;
      while (!busy) @(posedge clk);
      while (!saw_done) begin
        if (busy) lat++;
        if (u_valid) begin
          check(32'(u_idx) == 32'(nexp), $sformatf("u_idx %0d expected %0d", u_idx, nexp));
          for (int j = 0; j < 4; j++) got[nexp + j] = u_bits[j];
          if (done) saw_done = 1;
          check(done == (nexp + 4 == int'(N)), "done timing");
          nexp += 4;
        end
        @(posedge clk);
      end
      frames_done = f + 1;
      check(nexp == int'(N), $sformatf("frame %0d: %0d bits decided", f, nexp));
      check(lat == int'(decode_cycles(LOGN, P)),
            $sformatf("latency %0d, formula %0d", lat, decode_cycles(LOGN, P)));
      if (EXP_LAT != 0) check(lat == int'(EXP_LAT), $sformatf("latency %0d, expected %0d", lat, EXP_LAT));
      // utilisation rate alpha = N log2 N / (2 P latency), in thousandths
      alpha = (1000.0 * N * LOGN) / (2.0 * P * lat);
      if (EXP_ALPHA != 0) check(alpha > EXP_ALPHA - 0.5 && alpha < EXP_ALPHA + 0.5,
                                $sformatf("utilisation %0.1f/1000, expected %0d/1000", alpha, EXP_ALPHA));
      errs = 0;
      msgerr = 0;
      for (int j = 0; j < int'(N); j += 4) begin
        bit ok;
        ok = 1;
        for (int k = 0; k < 4; k++) if (got[j + k] != ref_all[f][j + k]) ok = 0;
        if (!ok) errs++;
        check(ok, $sformatf("frame %0d bits %0d..%0d differ from reference", f, j, j + 3));
      end
      if (clean_all[f]) begin
        for (int j = 0; j < int'(N); j++) if (got[j] != msg_all[f][j]) msgerr++;
        check(msgerr == 0, $sformatf("frame %0d: %0d bits differ from the message", f, msgerr));
      end
      $display("[N=%0d P=%0d] frame %0d: latency %0d cycles, utilisation %0.3f, %0d groups wrong%s",
               N, P, f, lat, alpha / 1000.0, errs, clean_all[f] ? " (noise-free signs)" : "");
    end
  endtask

  initial begin
    finished = 0;
    checks = 0;
    failures = 0;
    frames_done = 0;
    mon_frame = 0;
    prev_done = 0;
    frz_we = 0; frz_addr = '0; frz_data = '0; llr_valid = 0; llr_in = '0;
    {n_rchild, n_gminus, n_multi, n_split, n_single, n_hiwr, n_sat, n_b2b, n_stall} = '0;
    foreach (n_la[k]) n_la[k] = 0;
    foreach (n_fr[k]) n_fr[k] = 0;
    void'($urandom(SEED));
    for (int f = 0; f < int'(FRAMES); f++) begin
      make_frame(f);
      ref_decode();
      for (int j = 0; j < int'(N); j++) begin
        frz_all[f][j]  = frozen[j];
        chan_all[f][j] = chan[j];
        ref_all[f][j]  = ref_u[j];
        msg_all[f][j]  = msg[j];
      end
      clean_all[f] = clean;
    end
    @(posedge rst_n);
    repeat (2) @(posedge clk);
    fork
      drive();
      monitor();
    join
    // mechanism coverage
    $display("[N=%0d P=%0d] right-child stages %0d, g- selects %0d, multi-cycle %0d, split %0d, single-word %0d, hi writes %0d, saturations %0d, back-to-back frames %0d, held-off input cycles %0d",
             N, P, n_rchild, n_gminus, n_multi, n_split, n_single, n_hiwr, n_sat, n_b2b, n_stall);
    $display("[N=%0d P=%0d] look-ahead MUX inputs %0d/%0d/%0d/%0d, frozen pairs 00:%0d 01:%0d 10:%0d 11:%0d",
             N, P, n_la[0], n_la[1], n_la[2], n_la[3], n_fr[0], n_fr[1], n_fr[2], n_fr[3]);
    check(n_rchild > 0, "no right-child g selection");
    check(n_gminus > 0, "no subtracted g candidate selected");
    check(n_sat > 0, "no saturation");
    for (int k = 0; k < 4; k++) check(n_la[k] > 0, $sformatf("look-ahead MUX input %0d never used", k));
    for (int k = 0; k < 4; k++) check(n_fr[k] > 0, $sformatf("frozen pattern %0d never seen", k));
    if (N / 2 > P)  check(n_multi > 0, "no multi-cycle stage");
    if (N / 2 >= P) check(n_split > 0, "no split stage");
    if (P > 2)      check(n_single > 0, "no single-word stage");
    if (N / 2 >= 2 * P) check(n_hiwr > 0, "no hi RAM write");
    if (FRAMES >= 2 && decode_cycles(LOGN, P) > ((N > P) ? N / P : 1) + 2)
      check(n_b2b > 0, "no back-to-back frames");
    if (FRAMES >= 3) check(n_stall > 0, "input never held off");
    finished = 1;
  end

endmodule
