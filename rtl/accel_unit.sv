// accel_unit: one accelerating unit of the DPFPP (the accelerator core).
//
// It puts together the control unit (instruction decode, jump unit and
// microcode RAM), the Math Unit and the Memory Manager. Host words arrive
// on one stream: instructions program or start microcode sequences, data
// words go to the Math Unit's input FIFO. The Memory Manager also fills
// that FIFO from the cache and empties the arithmetic result FIFO into the
// cache. The units of the accelerator work independently; this module has
// no state of its own.
//
// Sharing rules (this design's choices): a Memory Manager push into the
// input FIFO goes first and the host stream waits for that cycle; while the
// Memory Manager is busy the host sees the arithmetic FIFO as empty, so the
// two never pop the same result.
module accel_unit
  import dpfpa_pkg::*;
#(
  parameter int unsigned UCODE_DEPTH = 256,
  parameter int unsigned IN_DEPTH    = 32,
  parameter int unsigned OUT_DEPTH   = 16,
  parameter int unsigned CACHE_AW    = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  // host word stream
  input  logic         host_valid,
  input  logic [63:0]  host_word,
  output logic         host_ready,
  // Memory Manager set-up and commands
  input  mm_cfg_t      mm_cfg,
  input  logic         cmd_valid,
  input  mm_cmd_t      cmd,
  output logic         cmd_ready,
  // result FIFOs, host side
  input  logic         ar_pop,
  output logic [63:0]  ar_data,
  output logic         ar_empty,
  input  logic         lg_pop,
  output logic [63:0]  lg_data,
  output logic         lg_empty,
  // cache port of the Memory Manager
  output cache_req_t   creq,
  input  cache_rsp_t   crsp,
  // status
  output unit_status_t status,
  output logic         busy,
  output logic         pass_end
);

  uword_t      uword;
  logic        uvalid, stall, running;
  logic [OPC_W-1:0] cur_op;
  logic        cu_push, mm_push, mu_in_full, mu_ar_empty, mm_ar_pop, mm_busy;
  logic [63:0] cu_data, mm_data;
  logic [$clog2(IN_DEPTH+1)-1:0]  in_count;
  logic [$clog2(OUT_DEPTH+1)-1:0] ar_count, lg_count;

  control_unit #(.UCODE_DEPTH(UCODE_DEPTH)) u_cu (
    .clk, .rst_n,
    .host_valid, .host_word, .host_ready,
    .data_push(cu_push), .data_word(cu_data), .data_full(mu_in_full || mm_push),
    .uword, .uvalid, .stall,
    .running, .cur_op, .pass_end
  );

  math_unit #(.IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_mu (
    .clk, .rst_n,
    .uword, .uvalid, .stall, .busy,
    .in_push (cu_push || mm_push),
    .in_data (mm_push ? mm_data : cu_data),
    .in_full (mu_in_full),
    .in_count,
    .ar_pop  (mm_ar_pop || (ar_pop && !mm_busy)),
    .ar_data,
    .ar_empty(mu_ar_empty),
    .ar_count,
    .lg_pop, .lg_data, .lg_empty, .lg_count
  );

  mem_manager #(.CACHE_AW(CACHE_AW)) u_mm (
    .clk, .rst_n,
    .cfg(mm_cfg), .cmd_valid, .cmd, .cmd_ready,
    .creq, .crsp,
    .in_push(mm_push), .in_data(mm_data), .in_full(mu_in_full),
    .ar_pop(mm_ar_pop), .ar_data, .ar_empty(mu_ar_empty),
    .busy(mm_busy)
  );

  assign ar_empty = mu_ar_empty || mm_busy;

  always_comb begin
    status          = '0;
    status.running  = running;
    status.cur_op   = cur_op;
    status.mm_busy  = mm_busy;
    status.in_count = 8'(in_count);
    status.ar_count = 8'(ar_count);
    status.lg_count = 8'(lg_count);
  end
endmodule
