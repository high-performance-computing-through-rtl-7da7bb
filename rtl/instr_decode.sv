// instr_decode: Instruction Decode of the control unit.
//
// The host sends one stream of 64-bit words. Instructions are told apart
// from double precision data by a reserved IEEE 754 pattern, as in the
// accelerator description: bits 63:52 all ones and bit 51 zero (a negative
// signalling NaN, which no arithmetic result is) with a non-zero type in
// bits 50:48 (see dpfpa_pkg). The exact pattern and field layout are this
// design's own. Data words go on to the input FIFO of the Math Unit and wait
// while it is full (host_ready low); instructions are decoded in the same
// cycle into one-cycle strobes: a microcode write, a sequence definition,
// an executive (start sequence) request or a halt. Purely combinational.
module instr_decode
  import dpfpa_pkg::*;
(
  input  logic        host_valid,
  input  logic [63:0] host_word,
  output logic        host_ready,
  // data path to the input FIFO
  output logic        data_push,
  output logic [63:0] data_word,
  input  logic        data_full,
  // programming instructions
  output logic                ucode_we,
  output logic [UADDR_W-1:0]  ucode_addr,
  output logic [UWORD_W-1:0]  ucode_word,
  output logic                seq_we,
  output logic [OPC_W-1:0]    seq_op,
  output logic [UADDR_W-1:0]  seq_start,
  output logic [UADDR_W-1:0]  seq_end,
  // executive instructions
  output logic                exec_valid,
  output logic [OPC_W-1:0]    exec_op,
  output logic                halt
);

  logic instr;
  ins_e kind;

  assign instr = is_instr(host_word);
  assign kind  = ins_e'(host_word[50:48]);

  assign host_ready = instr || !data_full;
  assign data_push  = host_valid && !instr && !data_full;
  assign data_word  = host_word;

  assign ucode_we   = host_valid && instr && (kind == INS_WUCD);
  assign ucode_addr = host_word[47:37];
  assign ucode_word = host_word[36:0];
  assign seq_we     = host_valid && instr && (kind == INS_SEQ);
  assign seq_op     = host_word[45:40];
  assign seq_start  = host_word[21:11];
  assign seq_end    = host_word[10:0];
  assign exec_valid = host_valid && instr && (kind == INS_EXEC);
  assign exec_op    = host_word[5:0];
  assign halt       = host_valid && instr && (kind == INS_HALT);
endmodule
