// ucode_ram: the RAM of the control unit that holds the microcode.
//
// DEPTH words of 37 bits. Programming instructions write it through the
// write port; the jump unit reads it through a synchronous read port whose
// output register is the microcode word the Math Unit executes (the word
// read with re high in one cycle is on rdata from the next cycle on, and
// stays while re is low). The output register resets to all zeros, a word
// that does nothing. The document does not give the depth; 256 words is
// this design's choice (a tuned dipole loop needs 36 words; the plain test program uses 94).
module ucode_ram
  import dpfpa_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [UWORD_W-1:0]       wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [UWORD_W-1:0]       rdata
);

  logic [UWORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (re) rdata <= mem[raddr];
  end
endmodule
