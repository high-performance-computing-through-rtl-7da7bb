// dpfpa_pkg: types and constants shared by the double precision floating
// point accelerator (DPFPA).
//
// It holds the 37-bit microcode word of the Math Unit, the 64-bit host
// instruction format and the IEEE 754 helpers used by the arithmetic
// pipelines. The word width (37 bits), the 6-bit sequence op-code, the
// pipeline depths (adder 9, multiplier 15), the three four-entry register
// banks and the scaling factors follow the accelerator description; the
// placement of the fields inside the words is this design's own choice.
//
// Microcode word, MSB first (37 bits):
//   add_en, add_cmp, add_a[4], add_b[4], add_sa[2], add_sb[2]   (14)
//   mul_en, mul_a[4], mul_b[4], mul_post[2]                     (11)
//   fetch                                                        (1)
//   in_we, in_wa[2], add_we, add_wa[2], mul_we, mul_wa[2]        (9)
//   out_en, out_src                                              (2)
//
// Host instruction: a signalling-NaN pattern (bits 63:52 all ones, bit 51
// zero) marks a word as an instruction, bits 50:48 give its type. Arithmetic
// never produces this pattern (its NaN result is the quiet NaN).
package dpfpa_pkg;

  localparam int unsigned ADD_LAT = 9;    // adder pipeline stages
  localparam int unsigned MUL_LAT = 15;   // multiplier pipeline stages
  localparam int unsigned OPC_W   = 6;    // sequence op-code width
  localparam int unsigned UADDR_W = 11;   // widest microcode address an instruction can carry
  localparam int unsigned UWORD_W = 37;   // microcode word width

  localparam logic [63:0] FP_QNAN = 64'h7FF8_0000_0000_0000;
  localparam logic [63:0] FP_ONE  = 64'h3FF0_0000_0000_0000;
  localparam logic [63:0] FP_MONE = 64'hBFF0_0000_0000_0000;
  localparam logic [63:0] FP_TWO  = 64'h4000_0000_0000_0000;

  // Operand source: bank (upper two bits) and entry (lower two bits).
  typedef enum logic [1:0] {
    BANK_IN  = 2'd0,   // input data bank, written from the input FIFO
    BANK_ADD = 2'd1,   // adder result bank
    BANK_MUL = 2'd2,   // multiplier result bank
    BANK_CST = 2'd3    // constants 0.0, 1.0, -1.0, 2.0
  } bank_e;

  typedef struct packed {
    bank_e      bank;
    logic [1:0] idx;
  } src_t;

  // Adder operand A factor: bit1 negates, bit0 doubles -> 1, 2, -1, -2.
  // Adder operand B factor: bit1 negates, bit0 halves  -> 1, 0.5, -1, -0.5.
  // Multiplier result:      0 -> x1, 1 -> x2, 2 -> x0.5, 3 -> negate.
  typedef enum logic [1:0] {
    POST_ONE  = 2'd0,
    POST_DBL  = 2'd1,
    POST_HALF = 2'd2,
    POST_NEG  = 2'd3
  } mul_post_e;

  typedef struct packed {
    logic       add_en;
    logic       add_cmp;   // 1: comparison, result goes to the logical FIFO
    src_t       add_a;
    src_t       add_b;
    logic [1:0] add_sa;
    logic [1:0] add_sb;
    logic       mul_en;
    src_t       mul_a;
    src_t       mul_b;
    mul_post_e  mul_post;
    logic       fetch;     // pop the input FIFO
    logic       in_we;     // write the input FIFO head into the input bank
    logic [1:0] in_wa;
    logic       add_we;    // write the adder pipeline output into the adder bank
    logic [1:0] add_wa;
    logic       mul_we;    // write the multiplier pipeline output into the multiplier bank
    logic [1:0] mul_wa;
    logic       out_en;    // push a result into the arithmetic output FIFO
    logic       out_src;   // 0: adder output, 1: multiplier output
  } uword_t;

  // Host instruction types (bits 50:48).
  typedef enum logic [2:0] {
    INS_NONE  = 3'd0,
    INS_WUCD  = 3'd1,   // programming: microcode word [36:0] to address [47:37]
    INS_SEQ   = 3'd2,   // programming: op-code [45:40] spans [21:11] .. [10:0]
    INS_EXEC  = 3'd3,   // executive: repeat sequence of op-code [5:0]
    INS_HALT  = 3'd4    // executive: stop after the current pass
  } ins_e;

  function automatic logic is_instr(input logic [63:0] w);
    return (w[63:52] == 12'hFFF) && !w[51] && (w[50:48] != 3'd0);
  endfunction

  function automatic logic [63:0] mk_wucd(input logic [UADDR_W-1:0] a, input logic [36:0] u);
    return {12'hFFF, 1'b0, INS_WUCD, a, u};
  endfunction

  function automatic logic [63:0] mk_seq(input logic [5:0] op, input logic [UADDR_W-1:0] s,
                                         input logic [UADDR_W-1:0] e);
    return {12'hFFF, 1'b0, INS_SEQ, 2'b0, op, 18'b0, s, e};
  endfunction

  function automatic logic [63:0] mk_exec(input logic [5:0] op);
    return {12'hFFF, 1'b0, INS_EXEC, 42'b0, op};
  endfunction

  function automatic logic [63:0] mk_halt();
    return {12'hFFF, 1'b0, INS_HALT, 48'b0};
  endfunction

  // Comparison flags carried in bits 3:0 of a logical FIFO word.
  typedef struct packed {
    logic uno;  // unordered (a NaN operand)
    logic gt;
    logic eq;
    logic lt;
  } cmp_t;

  // ---------------------------------------------------------------- cache
  localparam int unsigned CADDR_W = 16;   // widest cache word address

  typedef struct packed {
    logic               req;
    logic               we;
    logic [CADDR_W-1:0] addr;    // word address, bank in the two low bits
    logic [63:0]        wdata;
  } cache_req_t;

  typedef struct packed {
    logic        gnt;     // request taken this cycle
    logic        rvalid;  // read data of the request granted last cycle
    logic [63:0] rdata;
  } cache_rsp_t;

  // ---------------------------------------------------------------- memory manager
  localparam int unsigned DIM_W = 8;      // lattice side up to 255

  typedef enum logic {
    MM_LOAD  = 1'b0,   // cache word -> Math Unit input FIFO
    MM_STORE = 1'b1    // Math Unit arithmetic FIFO -> cache word
  } mm_op_e;

  typedef struct packed {
    logic [CADDR_W-1:0] base;
    logic [DIM_W-1:0]   nx;
    logic [DIM_W-1:0]   ny;
    logic [DIM_W-1:0]   nz;
  } mm_cfg_t;

  typedef struct packed {
    mm_op_e                  op;
    logic [DIM_W-1:0]        x;
    logic [DIM_W-1:0]        y;
    logic [DIM_W-1:0]        z;
    logic signed [DIM_W-1:0] dx;
    logic signed [DIM_W-1:0] dy;
    logic signed [DIM_W-1:0] dz;
  } mm_cmd_t;

  // ---------------------------------------------------------------- unit status
  typedef struct packed {
    logic             running;
    logic [OPC_W-1:0] cur_op;
    logic             mm_busy;
    logic [7:0]       in_count;
    logic [7:0]       ar_count;
    logic [7:0]       lg_count;
  } unit_status_t;

endpackage
