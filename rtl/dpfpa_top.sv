// dpfpa_top: the Double Precision Floating Point Accelerator (DPFPA).
//
// N_UNITS accelerating units (two, as built in the accelerator
// description), each with its own control unit, Math Unit and Memory
// Manager, share a four-bank cache and are driven by the host CPU through
// the sub bus. The host CPU itself (a Nios soft processor), the board
// memories and peripherals are outside this module: its ports are the host
// side of the sub bus. Cache requesters are numbered unit 0, unit 1, ...,
// then the host, which is also the cache's priority order.
//
// Host view, in short: load microcode sequences and bind them to op-codes
// with programming instructions, start one with an executive instruction,
// stream data words (or let the Memory Manager load them from the cache),
// read results back; see sub_bus_if for the register map.
module dpfpa_top
  import dpfpa_pkg::*;
#(
  parameter int unsigned N_UNITS     = 2,
  parameter int unsigned UCODE_DEPTH = 256,
  parameter int unsigned IN_DEPTH    = 32,
  parameter int unsigned OUT_DEPTH   = 16,
  parameter int unsigned NBANK       = 4,
  parameter int unsigned BANK_DEPTH  = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] bus_addr,
  input  logic        bus_write,
  input  logic        bus_read,
  input  logic [63:0] bus_wdata,
  output logic        bus_wait,
  output logic [63:0] bus_rdata,
  output logic        bus_rvalid,
  output logic [N_UNITS-1:0] unit_running,
  output logic [N_UNITS-1:0] unit_pass_end
);

  localparam int unsigned CACHE_AW = $clog2(NBANK * BANK_DEPTH);

  logic         host_valid [N_UNITS];
  logic         host_ready [N_UNITS];
  logic [63:0]  host_word;
  mm_cfg_t      mm_cfg     [N_UNITS];
  logic         cmd_valid  [N_UNITS];
  logic         cmd_ready  [N_UNITS];
  mm_cmd_t      cmd;
  logic         ar_pop     [N_UNITS];
  logic         ar_empty   [N_UNITS];
  logic [63:0]  ar_data    [N_UNITS];
  logic         lg_pop     [N_UNITS];
  logic         lg_empty   [N_UNITS];
  logic [63:0]  lg_data    [N_UNITS];
  unit_status_t status     [N_UNITS];
  logic         unit_busy  [N_UNITS];
  cache_req_t   creq       [N_UNITS+1];
  cache_rsp_t   crsp       [N_UNITS+1];

  for (genvar i = 0; i < N_UNITS; i++) begin : g_unit
    accel_unit #(
      .UCODE_DEPTH(UCODE_DEPTH), .IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH), .CACHE_AW(CACHE_AW)
    ) u_unit (
      .clk, .rst_n,
      .host_valid(host_valid[i]), .host_word, .host_ready(host_ready[i]),
      .mm_cfg(mm_cfg[i]), .cmd_valid(cmd_valid[i]), .cmd, .cmd_ready(cmd_ready[i]),
      .ar_pop(ar_pop[i]), .ar_data(ar_data[i]), .ar_empty(ar_empty[i]),
      .lg_pop(lg_pop[i]), .lg_data(lg_data[i]), .lg_empty(lg_empty[i]),
      .creq(creq[i]), .crsp(crsp[i]),
      .status(status[i]), .busy(unit_busy[i]), .pass_end(unit_pass_end[i])
    );
    assign unit_running[i] = status[i].running;
  end

  cache_mem #(.NREQ(N_UNITS + 1), .NBANK(NBANK), .BANK_DEPTH(BANK_DEPTH)) u_cache (
    .clk, .rst_n, .req(creq), .rsp(crsp)
  );

  sub_bus_if #(.N_UNITS(N_UNITS)) u_bus (
    .clk, .rst_n,
    .bus_addr, .bus_write, .bus_read, .bus_wdata, .bus_wait, .bus_rdata, .bus_rvalid,
    .host_valid, .host_word, .host_ready,
    .mm_cfg, .cmd_valid, .cmd, .cmd_ready,
    .ar_pop, .ar_data, .ar_empty,
    .lg_pop, .lg_data, .lg_empty,
    .status, .unit_busy,
    .creq(creq[N_UNITS]), .crsp(crsp[N_UNITS])
  );
endmodule
