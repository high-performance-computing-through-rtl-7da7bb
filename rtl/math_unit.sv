// math_unit: the double precision ALU of one accelerating unit.
//
// It joins the 9-stage adder/comparator and the 15-stage multiplier, which
// work in parallel, with three four-entry register banks, an input FIFO and
// two output FIFOs (arithmetic results and comparison results), as in the
// accelerator description. It has no addressing of its own: a 37-bit
// microcode word (dpfpa_pkg::uword_t) arrives each cycle with uvalid and
// says, all in that cycle, which sum or comparison and which product start,
// whether the input FIFO head is fetched into the input bank, which of the
// three banks are written, and whether a result is output.
//
// Scheduling is static, as in a horizontally microcoded machine: the bank
// writes and the output named in a word take the value leaving the adder or
// multiplier in that same cycle, so a program writes a result 9 (adder) or
// 15 (multiplier) words after the word that started it. A comparison
// pushes its flags into the logical FIFO by itself when it leaves the adder.
//
// stall goes high, and the whole unit (both pipelines, banks, FIFO pops)
// holds, when a word fetches from an empty input FIFO, outputs into a full
// arithmetic FIFO, or a comparison result meets a full logical FIFO; the
// sequencer must then hold the same word. Stalling instead of dropping is
// this design's choice. busy is high in cycles where a word executes.
module math_unit
  import dpfpa_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 32,
  parameter int unsigned OUT_DEPTH = 16,
  parameter int unsigned ADD_STAGES = ADD_LAT,
  parameter int unsigned MUL_STAGES = MUL_LAT
) (
  input  logic        clk,
  input  logic        rst_n,
  // microcode from the sequencer
  input  uword_t      uword,
  input  logic        uvalid,
  output logic        stall,
  output logic        busy,
  // input FIFO, filled by the host or the Memory Manager
  input  logic        in_push,
  input  logic [63:0] in_data,
  output logic        in_full,
  output logic [$clog2(IN_DEPTH+1)-1:0] in_count,
  // arithmetic output FIFO
  input  logic        ar_pop,
  output logic [63:0] ar_data,
  output logic        ar_empty,
  output logic [$clog2(OUT_DEPTH+1)-1:0] ar_count,
  // logical (comparison) output FIFO, flags in bits 3:0
  input  logic        lg_pop,
  output logic [63:0] lg_data,
  output logic        lg_empty,
  output logic [$clog2(OUT_DEPTH+1)-1:0] lg_count
);

  logic        en;
  logic        in_empty, ar_full, lg_full;
  logic [63:0] in_head;
  src_t        rsel [4];
  logic [63:0] rdata [4];

  logic        add_ov, add_ocmp, mul_ov;
  logic [63:0] add_res, mul_res;
  cmp_t        add_flags;
  logic        lg_push, ar_push;

  // ---------------------------------------------------------------- stall
  always_comb begin
    stall = 1'b0;
    if (uvalid && (uword.fetch || uword.in_we) && in_empty) stall = 1'b1;
    if (uvalid && uword.out_en && ar_full)                  stall = 1'b1;
    if (add_ov && add_ocmp && lg_full)                      stall = 1'b1;
  end
  assign en   = !stall;
  assign busy = uvalid && en;

  // ---------------------------------------------------------------- banks
  assign rsel[0] = uword.add_a;
  assign rsel[1] = uword.add_b;
  assign rsel[2] = uword.mul_a;
  assign rsel[3] = uword.mul_b;

  reg_banks u_banks (
    .clk, .rst_n,
    .in_we  (busy && uword.in_we),  .in_wa (uword.in_wa),  .in_wd (in_head),
    .add_we (busy && uword.add_we), .add_wa(uword.add_wa), .add_wd(add_res),
    .mul_we (busy && uword.mul_we), .mul_wa(uword.mul_wa), .mul_wd(mul_res),
    .rsel, .rdata
  );

  // ---------------------------------------------------------------- pipes
  fp_add_pipe #(.LATENCY(ADD_STAGES)) u_add (
    .clk, .rst_n, .en,
    .in_valid (uvalid && uword.add_en),
    .in_cmp   (uword.add_cmp),
    .a        (rdata[0]),
    .b        (rdata[1]),
    .sa       (uword.add_sa),
    .sb       (uword.add_sb),
    .out_valid(add_ov),
    .out_cmp  (add_ocmp),
    .out_res  (add_res),
    .out_flags(add_flags)
  );

  fp_mul_pipe #(.LATENCY(MUL_STAGES)) u_mul (
    .clk, .rst_n, .en,
    .in_valid (uvalid && uword.mul_en),
    .a        (rdata[2]),
    .b        (rdata[3]),
    .post     (uword.mul_post),
    .out_valid(mul_ov),
    .out_res  (mul_res)
  );

  // ---------------------------------------------------------------- FIFOs
  sync_fifo #(.WIDTH(64), .DEPTH(IN_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .push (in_push), .wdata(in_data),
    .pop  (busy && uword.fetch), .rdata(in_head),
    .full (in_full), .empty(in_empty), .count(in_count)
  );

  assign ar_push = busy && uword.out_en;
  sync_fifo #(.WIDTH(64), .DEPTH(OUT_DEPTH)) u_ar_fifo (
    .clk, .rst_n,
    .push (ar_push), .wdata(uword.out_src ? mul_res : add_res),
    .pop  (ar_pop), .rdata(ar_data),
    .full (ar_full), .empty(ar_empty), .count(ar_count)
  );

  assign lg_push = en && add_ov && add_ocmp;
  sync_fifo #(.WIDTH(64), .DEPTH(OUT_DEPTH)) u_lg_fifo (
    .clk, .rst_n,
    .push (lg_push), .wdata({60'd0, add_flags}),
    .pop  (lg_pop), .rdata(lg_data),
    .full (lg_full), .empty(lg_empty), .count(lg_count)
  );

  // a word that writes a bank from a pipeline expects a result there
  a_add_result: assert property (@(posedge clk) disable iff (!rst_n)
                                 busy && uword.add_we |-> add_ov);
  a_mul_result: assert property (@(posedge clk) disable iff (!rst_n)
                                 busy && uword.mul_we |-> mul_ov);
endmodule
