// reg_banks: the three register banks of the Math Unit.
//
// Three banks of four double precision registers, each tied to one purpose
// as in the accelerator description: the input bank is written from the
// input FIFO, the adder bank from the adder pipeline output and the
// multiplier bank from the multiplier pipeline output, each through its own
// write port, so all three writes can happen in one cycle. Four read ports
// (two adder operands, two multiplier operands) take a 4-bit source: bank
// in the upper two bits, entry in the lower two. The fourth bank code reads
// the constants 0.0, 1.0, -1.0 and 2.0; these constants, the read ports and
// the reset to zero are this design's own choices. Reads are combinational
// and return the value before a write of the same cycle.
module reg_banks
  import dpfpa_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_we,
  input  logic [1:0]  in_wa,
  input  logic [63:0] in_wd,
  input  logic        add_we,
  input  logic [1:0]  add_wa,
  input  logic [63:0] add_wd,
  input  logic        mul_we,
  input  logic [1:0]  mul_wa,
  input  logic [63:0] mul_wd,
  input  src_t        rsel [4],
  output logic [63:0] rdata [4]
);

  logic [63:0] bank_in  [4];
  logic [63:0] bank_add [4];
  logic [63:0] bank_mul [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) begin
        bank_in[i]  <= '0;
        bank_add[i] <= '0;
        bank_mul[i] <= '0;
      end
    end else begin
      if (in_we)  bank_in[in_wa]   <= in_wd;
      if (add_we) bank_add[add_wa] <= add_wd;
      if (mul_we) bank_mul[mul_wa] <= mul_wd;
    end
  end

  always_comb begin
    for (int p = 0; p < 4; p++) begin
      unique case (rsel[p].bank)
        BANK_IN:  rdata[p] = bank_in[rsel[p].idx];
        BANK_ADD: rdata[p] = bank_add[rsel[p].idx];
        BANK_MUL: rdata[p] = bank_mul[rsel[p].idx];
        default: begin
          unique case (rsel[p].idx)
            2'd0:    rdata[p] = 64'd0;
            2'd1:    rdata[p] = FP_ONE;
            2'd2:    rdata[p] = FP_MONE;
            default: rdata[p] = FP_TWO;
          endcase
        end
      endcase
    end
  end
endmodule
