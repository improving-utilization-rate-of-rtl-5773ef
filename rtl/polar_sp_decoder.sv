// polar_sp_decoder: semi-parallel successive-cancellation polar decoder that
// decides two bits per decision node and, with look-ahead, four bits per clock.
//
// Data flow: the channel buffer writes a frame of N channel LLRs, P per cycle,
// into one page of the channel RAM while the previous frame, in the other
// page, is being decoded. The controller walks the SC tree:
// every stage activation reads one address of all LLR RAMs, the PE array
// computes f and both g candidates for up to P butterflies (the g candidate is
// picked at read time by the partial sums from the PPU) and writes the three
// results back. Stage-1 results are held in the decision register and the
// look-ahead decision unit turns them into u(i) .. u(i+3) in the next cycle,
// using four frozen flags from the frozen table. The four bits leave on
// u_bits and are folded into the PPU.
//
// Interface:
//   frz_we/frz_addr/frz_data  write the frozen table (word k = flags of bits
//                             4k .. 4k+3, bit j for bit 4k+j); do it while idle.
//   llr_valid/llr_ready/llr_in  channel LLRs, P per transfer, lane k of the
//                             w-th transfer is LLR w*P+k; N/P transfers a frame.
//                             A frame may be sent while the previous one decodes.
//   u_valid/u_idx/u_bits      four decided bits per pulse, bit j = u(u_idx+j).
//   busy                      high during decoding; done pulses with the last
//                             u_valid of a frame.
// Timing: an idle decoder starts two cycles after the last LLR transfer of a
// frame; decoding takes polar_pkg::decode_cycles(log2 N, P) cycles (784 for
// N = 1024, P = 64). If the next frame is loaded by the time a frame ends, it
// starts in the very next cycle, so one frame leaves every 784 cycles.
// The frozen table is shared by all frames; change it only while idle.
module polar_sp_decoder #(
  parameter int unsigned N = 1024,
  parameter int unsigned P = 64,
  parameter int unsigned Q = 5,
  localparam int unsigned LOGN = $clog2(N),
  localparam int unsigned FD   = polar_pkg::f_depth(LOGN, P),
  localparam int unsigned AW   = (FD > 1) ? $clog2(FD) : 1,
  localparam int unsigned CHW  = polar_pkg::stage_words(LOGN, P),
  localparam int unsigned CAW  = (CHW > 1) ? $clog2(CHW) : 1,
  localparam int unsigned W    = P * Q
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   frz_we,
  input  logic [$clog2(N/4)-1:0] frz_addr,
  input  logic [3:0]             frz_data,
  input  logic                   llr_valid,
  output logic                   llr_ready,
  input  logic [W-1:0]           llr_in,
  output logic                   u_valid,
  output logic [LOGN-1:0]        u_idx,
  output logic [3:0]             u_bits,
  output logic                   busy,
  output logic                   done
);
  typedef logic signed [Q-1:0] llr_t;

  // controller
  logic            load_en, load_done, ppu_clr, use_g, pe_we, pe_hi, cap_d, dec_en;
  logic            ld_page, dec_page;
  logic [AW-1:0]   raddr, pe_addr;
  logic [LOGN:0]   half;
  logic [LOGN-1:0] sel_base, dec_idx;
  // channel buffer
  logic            ch_we, ch_hi;
  logic [CAW-1:0]  ch_addr;
  logic [W-1:0]    ch_word;
  // memory and PEs
  logic [W-1:0]    f_lo, f_hi, gp_lo, gp_hi, gm_lo, gm_hi;
  logic [W-1:0]    out_f, out_gp, out_gm;
  logic [P-1:0]    sa, sb;
  // decision
  llr_t            d_f0, d_f1, d_gp0, d_gm0, d_gp1, d_gm1;
  logic [3:0]      fr4, u4;

  sc_controller #(.N(N), .P(P)) u_ctrl (
    .clk, .rst_n, .load_done, .load_en, .ld_page, .dec_page, .ppu_clr,
    .raddr, .half, .use_g, .sel_base, .pe_we, .pe_hi, .pe_addr, .cap_d,
    .dec_en, .dec_idx, .busy, .done
  );

  channel_buffer #(.N(N), .P(P), .Q(Q)) u_chbuf (
    .clk, .rst_n, .enable(load_en),
    .in_valid(llr_valid), .in_ready(llr_ready), .in_llr(llr_in),
    .ch_we, .ch_hi, .ch_addr, .ch_word, .load_done
  );

  llr_memory #(.N(N), .P(P), .Q(Q)) u_mem (
    .clk, .raddr, .rd_page(dec_page),
    .f_lo, .f_hi, .gp_lo, .gp_hi, .gm_lo, .gm_hi,
    .pe_we, .pe_hi, .pe_addr, .pe_f(out_f), .pe_gp(out_gp), .pe_gm(out_gm),
    .ch_we, .ch_page(ld_page), .ch_hi, .ch_addr, .ch_word
  );

  pe_array #(.P(P), .Q(Q), .HW(LOGN + 1)) u_pes (
    .f_lo, .f_hi, .gp_lo, .gp_hi, .gm_lo, .gm_hi,
    .half, .use_g, .sa, .sb,
    .out_f, .out_gp, .out_gm
  );

  ppu #(.N(N), .P(P)) u_ppu (
    .clk, .rst_n, .clr(ppu_clr),
    .upd(dec_en), .upd_idx(dec_idx), .u4,
    .sel_base, .sel_half(half), .sa, .sb
  );

  frozen_mem #(.N(N)) u_frozen (
    .clk, .we(frz_we), .waddr(frz_addr), .wdata(frz_data),
    .raddr(dec_idx[LOGN-1:2]), .rdata(fr4)
  );

  // decision register: stage-1 results of PEs 0 and 1
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {d_f0, d_f1, d_gp0, d_gm0, d_gp1, d_gm1} <= '0;
    end else if (cap_d) begin
      d_f0  <= out_f [0 +: Q];
      d_f1  <= out_f [Q +: Q];
      d_gp0 <= out_gp[0 +: Q];
      d_gm0 <= out_gm[0 +: Q];
      d_gp1 <= out_gp[Q +: Q];
      d_gm1 <= out_gm[Q +: Q];
    end
  end

  d_unit_la #(.Q(Q)) u_dunit (
    .lf0(d_f0), .lf1(d_f1), .lgp0(d_gp0), .lgm0(d_gm0), .lgp1(d_gp1), .lgm1(d_gm1),
    .fr(fr4), .u(u4)
  );

  assign u_valid = dec_en;
  assign u_idx   = dec_idx;
  assign u_bits  = u4;

endmodule
