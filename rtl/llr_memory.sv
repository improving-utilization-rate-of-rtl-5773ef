// llr_memory: the decoder's LLR storage: three banks for the internal LLRs
// and a two-page channel RAM, each made of a "lo" and a "hi" llr_ram.
//
//   F bank  : f outputs of the PEs
//   G+ bank : the added g candidates (La + Lb)
//   G- bank : the subtracted g candidates (Lb - La)
//   channel : two pages of N channel LLRs; the channel buffer fills one page
//             while the decoder reads the other, so a new frame is loaded
//             while the current one is decoded
// Each RAM word holds P LLRs (see polar_pkg for which half of a stage vector
// goes to lo and which to hi). All RAMs are read at one common address, so a
// single read delivers the 2P operands of P butterflies in every bank; a PE
// write stores its three results (3PQ bits) in the lo or the hi RAM of all
// three banks at once. Addresses from the controller run over the internal
// stages and then the channel region (at stage_base(n)); a read there is
// served from the channel page rd_page and appears on the F outputs (the MUX
// between channel and PE data in front of the PEs). The G outputs are then
// don't-care (word 0). Channel writes address a word within page ch_page.
// A PE write and a channel write may happen in the same cycle. pe_addr has
// the width of the whole address space because the controller produces it
// from the same counter as raddr; PE writes only ever target the internal
// stages, so only its low bits reach the banks.
module llr_memory #(
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
  input  logic           clk,
  // read port, common to all banks
  input  logic [AW-1:0]  raddr,
  input  logic           rd_page,
  output logic [W-1:0]   f_lo,
  output logic [W-1:0]   f_hi,
  output logic [W-1:0]   gp_lo,
  output logic [W-1:0]   gp_hi,
  output logic [W-1:0]   gm_lo,
  output logic [W-1:0]   gm_hi,
  // PE results
  input  logic           pe_we,
  input  logic           pe_hi,
  input  logic [AW-1:0]  pe_addr,
  input  logic [W-1:0]   pe_f,
  input  logic [W-1:0]   pe_gp,
  input  logic [W-1:0]   pe_gm,
  // channel LLRs from the channel buffer
  input  logic           ch_we,
  input  logic           ch_page,
  input  logic           ch_hi,
  input  logic [CAW-1:0] ch_addr,
  input  logic [W-1:0]   ch_word
);
  localparam int unsigned GD   = polar_pkg::g_depth(LOGN, P);
  localparam int unsigned BASE = polar_pkg::stage_base(LOGN, P);
  localparam int unsigned GAW  = (GD > 1) ? $clog2(GD) : 1;
  localparam int unsigned PAW  = $clog2(2 * CHW);

  logic           rd_chan, we_lo, we_hi;
  logic [GAW-1:0] g_waddr, g_raddr;
  logic [PAW-1:0] c_waddr, c_raddr;
  logic [W-1:0]   if_lo, if_hi, c_lo, c_hi;

  always_comb begin
    rd_chan = (32'(raddr) >= BASE);
    g_raddr = rd_chan ? '0 : GAW'(raddr);
    g_waddr = GAW'(pe_addr);
    we_lo   = pe_we && !pe_hi;
    we_hi   = pe_we && pe_hi;
    c_waddr = PAW'(32'(ch_page) * CHW + 32'(ch_addr));
    c_raddr = PAW'(32'(rd_page) * CHW + (rd_chan ? 32'(raddr) - BASE : 0));
    f_lo    = rd_chan ? c_lo : if_lo;
    f_hi    = rd_chan ? c_hi : if_hi;
  end

  llr_ram #(.DEPTH(GD), .WIDTH(W)) u_f_lo (
    .clk, .we(we_lo), .waddr(g_waddr), .wdata(pe_f), .raddr(g_raddr), .rdata(if_lo));
  llr_ram #(.DEPTH(GD), .WIDTH(W)) u_f_hi (
    .clk, .we(we_hi), .waddr(g_waddr), .wdata(pe_f), .raddr(g_raddr), .rdata(if_hi));
  llr_ram #(.DEPTH(GD), .WIDTH(W)) u_gp_lo (
    .clk, .we(we_lo), .waddr(g_waddr), .wdata(pe_gp), .raddr(g_raddr), .rdata(gp_lo));
  llr_ram #(.DEPTH(GD), .WIDTH(W)) u_gp_hi (
    .clk, .we(we_hi), .waddr(g_waddr), .wdata(pe_gp), .raddr(g_raddr), .rdata(gp_hi));
  llr_ram #(.DEPTH(GD), .WIDTH(W)) u_gm_lo (
    .clk, .we(we_lo), .waddr(g_waddr), .wdata(pe_gm), .raddr(g_raddr), .rdata(gm_lo));
  llr_ram #(.DEPTH(GD), .WIDTH(W)) u_gm_hi (
    .clk, .we(we_hi), .waddr(g_waddr), .wdata(pe_gm), .raddr(g_raddr), .rdata(gm_hi));
  llr_ram #(.DEPTH(2 * CHW), .WIDTH(W)) u_ch_lo (
    .clk, .we(ch_we && !ch_hi), .waddr(c_waddr), .wdata(ch_word), .raddr(c_raddr), .rdata(c_lo));
  llr_ram #(.DEPTH(2 * CHW), .WIDTH(W)) u_ch_hi (
    .clk, .we(ch_we && ch_hi), .waddr(c_waddr), .wdata(ch_word), .raddr(c_raddr), .rdata(c_hi));

endmodule
