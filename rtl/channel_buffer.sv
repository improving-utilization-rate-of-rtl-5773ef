// channel_buffer: input buffer for the channel LLRs of one frame.
//
// The channel delivers P LLRs per accepted cycle (in_valid && in_ready). The
// group is captured in a P-LLR register and written into the channel RAM of
// the LLR memory in the following cycle, so a frame of N LLRs takes N/P load
// cycles (one cycle if N <= P). The buffer also generates the RAM write
// address within the channel page: the first half of the frame goes to the lo
// RAM and the second half to the hi RAM (see polar_pkg). load_done pulses in
// the cycle the last word is written; the frame may be decoded from the next
// cycle on. Lane k of in_llr carries LLR number w*P + k of the frame for group w.
// in_ready is high while the controller has a free channel page (enable) and
// fewer than N/P groups of the current frame have been accepted; it is low in
// the load_done cycle and rises again for the next frame after it.
module channel_buffer #(
  parameter int unsigned N = 1024,
  parameter int unsigned P = 64,
  parameter int unsigned Q = 5,
  localparam int unsigned LOGN  = $clog2(N),
  localparam int unsigned CHW   = polar_pkg::stage_words(LOGN, P),
  localparam int unsigned AW    = (CHW > 1) ? $clog2(CHW) : 1,
  localparam int unsigned W     = P * Q,
  localparam int unsigned WORDS = (N > P) ? N / P : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          enable,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [W-1:0]  in_llr,
  output logic          ch_we,
  output logic          ch_hi,
  output logic [AW-1:0] ch_addr,
  output logic [W-1:0]  ch_word,
  output logic          load_done
);
  import polar_pkg::*;

  localparam int unsigned HALF    = (N >= 2 * P) ? N / (2 * P) : WORDS;
  localparam int unsigned CW      = (WORDS > 1) ? $clog2(WORDS) : 1;

  logic [CW-1:0] wcnt;      // index of the word held in the buffer
  logic          full;
  logic [CW:0]   acnt;      // words of the current frame accepted so far

  assign in_ready = enable && (32'(acnt) < WORDS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt    <= '0;
      acnt    <= '0;
      full    <= 1'b0;
      ch_word <= '0;
    end else begin
      if (full) wcnt <= (32'(wcnt) == WORDS - 1) ? '0 : wcnt + 1'b1;
      full <= in_valid && in_ready;
      if (load_done) acnt <= '0;
      else if (in_valid && in_ready) acnt <= acnt + 1'b1;
      if (in_valid && in_ready) ch_word <= in_llr;
    end
  end

  always_comb begin
    ch_we     = full;
    ch_hi     = (32'(wcnt) >= HALF);
    ch_addr   = ch_hi ? AW'(32'(wcnt) - HALF) : AW'(32'(wcnt));
    load_done = full && (32'(wcnt) == WORDS - 1);
  end

endmodule
