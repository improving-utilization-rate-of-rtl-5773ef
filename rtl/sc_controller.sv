// sc_controller: schedule generator of the semi-parallel 2-bit SC decoder.
//
// The decoder walks the SC decoding tree depth first. A stage-l activation
// reads the 2^(l+1) LLRs of the current node (stage l+1 outputs, or the
// channel for l = n-1) and has the PEs compute, for all 2^l butterflies, the f
// value and both g candidates (precomputation). With P PEs an activation takes
// max(1, 2^l/P) cycles. Stage 1 results go to the look-ahead decision unit,
// which decides four bits in the next cycle. After bits i .. i+3 are decided,
// with i' = i + 4 and t = number of trailing zeros of i', the decoder enters the
// right child of size 2^t: the next activation is stage t-1 and reads the g
// candidates of stage t, selected by the partial sums of the left sibling,
// x[i'-2^t .. i'-1] in the PPU. The stages below it read f values again.
// Total decoding time is decode_cycles() in polar_pkg: 784 cycles for
// N = 1024, P = 64; 6 cycles for N = 8, P = 2.
//
// Frame pipelining: the channel RAM has two pages. ld_page is the page the
// channel buffer fills (load_en is high while it is free); dec_page is the
// page being decoded. load_done marks ld_page full and moves to the other
// page; the end of a frame frees dec_page. Phases: IDLE (no full page),
// STAGE, DECIDE. An idle decoder starts in the cycle after load_done, or, if
// the next frame is already loaded when
// the current one ends, directly after the last DECIDE cycle, so frames are
// decoded back to back with no gap. ppu_clr marks the start of every frame.
// done pulses with the last DECIDE cycle of a frame. busy is high in every
// decoding cycle.
module sc_controller #(
  parameter int unsigned N = 1024,
  parameter int unsigned P = 64,
  localparam int unsigned LOGN = $clog2(N),
  localparam int unsigned FD   = polar_pkg::f_depth(LOGN, P),
  localparam int unsigned AW   = (FD > 1) ? $clog2(FD) : 1,
  localparam int unsigned CW   = (N / 2 > P) ? $clog2(N / (2 * P)) + 1 : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load_done,
  output logic            load_en,
  output logic            ld_page,
  output logic            dec_page,
  output logic            ppu_clr,
  // LLR memory and PE array
  output logic [AW-1:0]   raddr,
  output logic [LOGN:0]   half,
  output logic            use_g,
  output logic [LOGN-1:0] sel_base,
  output logic            pe_we,
  output logic            pe_hi,
  output logic [AW-1:0]   pe_addr,
  output logic            cap_d,
  // decision unit, frozen table and PPU update
  output logic            dec_en,
  output logic [LOGN-1:0] dec_idx,
  // status
  output logic            busy,
  output logic            done
);
  import polar_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_STAGE, S_DECIDE} state_t;

  state_t                 state;
  logic [1:0]             full;     // channel page holds a frame not yet decoded
  logic                   last_dec, start;
  logic [$clog2(LOGN):0]  lvl;      // current stage l
  logic [CW-1:0]          cyc;      // cycle within the activation
  logic [LOGN:0]          idx;      // bits decided so far
  logic                   rchild;   // activation reads g candidates

  // values of the current activation
  int unsigned hs, ncyc, nhalf;
  logic        last_cyc;

  always_comb begin
    hs       = 1 << lvl;
    ncyc     = (hs >= P) ? hs / P : 1;
    nhalf    = ncyc / 2;
    last_cyc = (32'(cyc) == ncyc - 1);

    last_dec = (state == S_DECIDE) && (32'(idx) + 4 == N);
    // start a frame: from idle, or straight after the last decision
    start    = ((state == S_IDLE) && (full[dec_page] || (load_done && ld_page == dec_page))) ||
               (last_dec && full[!dec_page]);
    load_en  = !full[ld_page];
    ppu_clr  = start;
    busy     = (state != S_IDLE);
    raddr    = AW'(stage_base(32'(lvl) + 1, P) + 32'(cyc));
    half     = (LOGN + 1)'(hs);
    use_g    = rchild;
    sel_base = rchild ? LOGN'(32'(idx) - 2 * hs + 32'(cyc) * P) : '0;
    pe_we    = (state == S_STAGE) && (lvl >= 2);
    if (hs >= 2 * P) begin
      pe_hi   = (32'(cyc) >= nhalf);
      pe_addr = AW'(stage_base(32'(lvl), P) + (32'(cyc) % nhalf));
    end else begin
      pe_hi   = 1'b0;
      pe_addr = AW'(stage_base(32'(lvl), P));
    end
    cap_d    = (state == S_STAGE) && (lvl == 1);
    dec_en   = (state == S_DECIDE);
    dec_idx  = LOGN'(idx);
    done     = last_dec;
  end

  // trailing zeros of the next bit index (at least 2)
  function automatic int unsigned next_level(input int unsigned i_next);
    for (int unsigned t = 2; t < LOGN; t++) begin
      if (i_next[t]) return t;
    end
    return LOGN;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      lvl      <= '0;
      cyc      <= '0;
      idx      <= '0;
      rchild   <= 1'b0;
      full     <= '0;
      ld_page  <= 1'b0;
      dec_page <= 1'b0;
    end else begin
      // page bookkeeping; the two events always concern different pages
      if (load_done) begin
        full[ld_page] <= 1'b1;
        ld_page       <= !ld_page;
      end
      if (last_dec) begin
        full[dec_page] <= 1'b0;
        dec_page       <= !dec_page;
      end
      if (start) begin
        state  <= S_STAGE;
        lvl    <= ($clog2(LOGN) + 1)'(LOGN - 1);
        cyc    <= '0;
        idx    <= '0;
        rchild <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_STAGE: begin
            if (!last_cyc) begin
              cyc <= cyc + 1'b1;
            end else begin
              cyc    <= '0;
              rchild <= 1'b0;
              if (lvl == 1) state <= S_DECIDE;
              else          lvl   <= lvl - 1'b1;
            end
          end
          S_DECIDE: begin
            if (last_dec) begin
              state <= S_IDLE;
            end else begin
              state  <= S_STAGE;
              lvl    <= ($clog2(LOGN) + 1)'(next_level(32'(idx) + 4) - 1);
              rchild <= 1'b1;
            end
            idx <= idx + 4;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
