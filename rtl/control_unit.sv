// control_unit: the internal Control Unit (CU), or microcode sequencer, of
// one accelerating unit.
//
// Its three parts follow the accelerator description: Instruction Decode
// splits the host word stream into data (passed to the Math Unit's input
// FIFO) and instructions; programming instructions load microcode words
// into the RAM and bind a start and end address to a 6-bit op-code; an
// executive instruction makes the Jump Unit replay that op-code's sequence
// over and over, so the host sends only a few instructions during a long
// computation. The RAM output register is the microcode word the Math Unit
// executes (uword, valid with uvalid); stall from the Math Unit holds it.
// RAM addresses in instructions are cut to the RAM's address width.
module control_unit
  import dpfpa_pkg::*;
#(
  parameter int unsigned UCODE_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // host word stream
  input  logic        host_valid,
  input  logic [63:0] host_word,
  output logic        host_ready,
  // data to the Math Unit input FIFO
  output logic        data_push,
  output logic [63:0] data_word,
  input  logic        data_full,
  // microcode to the Math Unit
  output uword_t      uword,
  output logic        uvalid,
  input  logic        stall,
  // status
  output logic        running,
  output logic [OPC_W-1:0] cur_op,
  output logic        pass_end
);

  localparam int unsigned AW = $clog2(UCODE_DEPTH);

  logic               ucode_we, seq_we, exec_valid, halt, rd_en;
  logic [UADDR_W-1:0] ucode_addr, seq_start, seq_end;
  logic [UWORD_W-1:0] ucode_word, rword;
  logic [OPC_W-1:0]   seq_op, exec_op;
  logic [AW-1:0]      rd_addr;

  instr_decode u_dec (
    .host_valid, .host_word, .host_ready,
    .data_push, .data_word, .data_full,
    .ucode_we, .ucode_addr, .ucode_word,
    .seq_we, .seq_op, .seq_start, .seq_end,
    .exec_valid, .exec_op, .halt
  );

  jump_unit #(.AW(AW)) u_jump (
    .clk, .rst_n,
    .seq_we, .seq_op, .seq_start(seq_start[AW-1:0]), .seq_end(seq_end[AW-1:0]),
    .exec_valid, .exec_op, .halt, .stall,
    .rd_en, .rd_addr, .uvalid, .running, .cur_op, .pass_end
  );

  ucode_ram #(.DEPTH(UCODE_DEPTH)) u_ram (
    .clk, .rst_n,
    .we(ucode_we), .waddr(ucode_addr[AW-1:0]), .wdata(ucode_word),
    .re(rd_en), .raddr(rd_addr), .rdata(rword)
  );

  assign uword = uword_t'(rword);
endmodule
