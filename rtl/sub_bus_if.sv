// sub_bus_if: the "sub bus" slave through which the host CPU (a Nios soft
// processor on the same FPGA) drives the accelerator, and the clock
// counters used to time the accelerator's work.
//
// The bus is a simple memory-mapped slave with 64-bit data: a transfer is
// held while bus_wait is high; read data come one cycle after the transfer
// is taken, with bus_rvalid. Word address map (this design's own):
//   bit 15 = 1       cache word addr[14:0], read or write
//   bit 15 = 0       unit u = addr[11:8], register r = addr[3:0]:
//     r=0  W: word to the unit's instruction/data stream (waits while full)
//          R: status (dpfpa_pkg::unit_status_t in the low bits)
//     r=1  R: pop the arithmetic result FIFO (0 when empty)
//     r=2  R: pop the comparison FIFO (0 when empty)
//     r=3  W: Memory Manager base address
//     r=4  W: Memory Manager matrix sides nx [7:0], ny [15:8], nz [23:16]
//     r=5  W: Memory Manager command: x [7:0], y [15:8], z [23:16],
//             dx [31:24], dy [39:32], dz [47:40], store when bit 63 is set
//             (waits while the manager is busy)
//     r=6  R: cycles in which the unit executed microcode
//     r=7  R: free-running clock counter; W: clear all counters
// The document says only that a bus links the accelerator and the Nios and
// that clock counters sit in that interface; the protocol, the map and the
// counter set are this design's choices.
module sub_bus_if
  import dpfpa_pkg::*;
#(
  parameter int unsigned N_UNITS = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  // host side
  input  logic [15:0]  bus_addr,
  input  logic         bus_write,
  input  logic         bus_read,
  input  logic [63:0]  bus_wdata,
  output logic         bus_wait,
  output logic [63:0]  bus_rdata,
  output logic         bus_rvalid,
  // accelerating units
  output logic         host_valid [N_UNITS],
  output logic [63:0]  host_word,
  input  logic         host_ready [N_UNITS],
  output mm_cfg_t      mm_cfg     [N_UNITS],
  output logic         cmd_valid  [N_UNITS],
  output mm_cmd_t      cmd,
  input  logic         cmd_ready  [N_UNITS],
  output logic         ar_pop     [N_UNITS],
  input  logic [63:0]  ar_data    [N_UNITS],
  input  logic         ar_empty   [N_UNITS],
  output logic         lg_pop     [N_UNITS],
  input  logic [63:0]  lg_data    [N_UNITS],
  input  logic         lg_empty   [N_UNITS],
  input  unit_status_t status     [N_UNITS],
  input  logic         unit_busy  [N_UNITS],
  // cache port
  output cache_req_t   creq,
  input  cache_rsp_t   crsp
);

  localparam int unsigned UW = (N_UNITS > 1) ? $clog2(N_UNITS) : 1;

  logic          is_cache, unit_ok, take;
  logic [UW-1:0] u;
  logic [3:0]    r;
  logic [63:0]   rdata_q, rsel;
  logic          cache_rd_q, rvalid_q;
  logic [63:0]   cycles;
  logic [63:0]   busy_cnt [N_UNITS];

  assign is_cache = bus_addr[15];
  assign u        = bus_addr[8 +: UW];
  assign unit_ok  = (32'(bus_addr[11:8]) < N_UNITS);
  assign r        = bus_addr[3:0];

  assign host_word = bus_wdata;
  assign cmd = '{op: mm_op_e'(bus_wdata[63]), x: bus_wdata[7:0], y: bus_wdata[15:8],
                 z: bus_wdata[23:16], dx: bus_wdata[31:24], dy: bus_wdata[39:32],
                 dz: bus_wdata[47:40]};

  assign creq = '{req: is_cache && (bus_write || bus_read), we: bus_write,
                  addr: {1'b0, bus_addr[14:0]}, wdata: bus_wdata};

  always_comb begin
    bus_wait   = 1'b0;
    rsel       = '0;
    for (int i = 0; i < N_UNITS; i++) begin
      host_valid[i] = 1'b0;
      cmd_valid[i]  = 1'b0;
      ar_pop[i]     = 1'b0;
      lg_pop[i]     = 1'b0;
    end
    if (is_cache) begin
      bus_wait = creq.req && !crsp.gnt;
    end else if (unit_ok) begin
      if (bus_write) begin
        if (r == 4'd0) begin
          host_valid[u] = 1'b1;
          bus_wait      = !host_ready[u];
        end
        if (r == 4'd5) begin
          cmd_valid[u] = 1'b1;
          bus_wait     = !cmd_ready[u];
        end
      end
      if (bus_read) begin
        unique case (r)
          4'd0: rsel = 64'(status[u]);
          4'd1: begin rsel = ar_empty[u] ? 64'd0 : ar_data[u]; ar_pop[u] = !ar_empty[u]; end
          4'd2: begin rsel = lg_empty[u] ? 64'd0 : lg_data[u]; lg_pop[u] = !lg_empty[u]; end
          4'd6: rsel = busy_cnt[u];
          4'd7: rsel = cycles;
          default: rsel = '0;
        endcase
      end
    end
  end

  assign take = bus_read && !bus_wait;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata_q    <= '0;
      cache_rd_q <= 1'b0;
      rvalid_q   <= 1'b0;
      cycles     <= '0;
      for (int i = 0; i < N_UNITS; i++) begin
        mm_cfg[i]   <= '{base: '0, nx: 8'd1, ny: 8'd1, nz: 8'd1};
        busy_cnt[i] <= '0;
      end
    end else begin
      rvalid_q   <= take;
      cache_rd_q <= take && is_cache;
      if (take) rdata_q <= rsel;
      cycles <= cycles + 64'd1;
      for (int i = 0; i < N_UNITS; i++) if (unit_busy[i]) busy_cnt[i] <= busy_cnt[i] + 64'd1;
      if (bus_write && !is_cache && unit_ok) begin
        if (r == 4'd3) mm_cfg[u].base <= bus_wdata[CADDR_W-1:0];
        if (r == 4'd4) begin
          mm_cfg[u].nx <= bus_wdata[7:0];
          mm_cfg[u].ny <= bus_wdata[15:8];
          mm_cfg[u].nz <= bus_wdata[23:16];
        end
        if (r == 4'd7) begin
          cycles <= '0;
          for (int i = 0; i < N_UNITS; i++) busy_cnt[i] <= '0;
        end
      end
    end
  end

  assign bus_rvalid = rvalid_q;
  assign bus_rdata  = cache_rd_q ? crsp.rdata : rdata_q;

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(bus_read && bus_write));
endmodule
