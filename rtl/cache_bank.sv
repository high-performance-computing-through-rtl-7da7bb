// cache_bank: one bank of the cache memory, a single-port RAM of DEPTH
// 64-bit words. With en high it writes wdata (we high) or reads the word
// at addr into rdata, which then holds until the next read.
// The banked cache follows the accelerator description; the single-port
// synchronous RAM with a one-cycle read is this design's choice.
module cache_bank #(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [63:0]              wdata,
  output logic [63:0]              rdata
);
  logic [63:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
