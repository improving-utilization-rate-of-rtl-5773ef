// frozen_mem: frozen-bit table of the decoder, one flag per bit index
// (1 = frozen bit, always decoded as 0).
//
// Organised as N/4 words of four flags so that the look-ahead decision unit
// gets the flags of u(4k) .. u(4k+3) in one read (bit j of word k is the flag of
// u(4k+j)). The table is writable, word by word, so that the frozen set can be
// changed for a new code rate or channel condition; reads are asynchronous.
// A fixed ROM would be the same module without the write port.
module frozen_mem #(
  parameter int unsigned N = 1024
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [$clog2(N/4)-1:0]     waddr,
  input  logic [3:0]                 wdata,
  input  logic [$clog2(N/4)-1:0]     raddr,
  output logic [3:0]                 rdata
);
  logic [3:0] mem [N/4];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
