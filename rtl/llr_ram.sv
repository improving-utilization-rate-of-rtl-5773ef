// llr_ram: one LLR RAM of the decoder, DEPTH words of P LLRs (P*Q bits).
//
// One synchronous write port and one read port whose data follow the read
// address in the same cycle (distributed-RAM style). The asynchronous read is
// this design's choice: it lets a PE read, compute and write back in a single
// clock, which is the timing the decoding schedule assumes. A write and a read
// of the same address in one cycle return the old word.
module llr_ram #(
  parameter int unsigned DEPTH = 20,
  parameter int unsigned WIDTH = 320
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
