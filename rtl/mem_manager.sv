// mem_manager: Memory Manager of one accelerating unit.
//
// The Math Unit has no addressing of its own, so this block moves its data.
// It works on data laid out as a three-dimensional matrix of nx*ny*nz words
// starting at cfg.base in the cache, x running fastest. A command gives a
// lattice position (x, y, z) and a signed offset (dx, dy, dz); the matrix is
// cyclic, so a coordinate that leaves the matrix re-enters at the other side
// (periodic boundary conditions), as in the accelerator description. The
// program therefore never sees an address and runs unchanged on matrices of
// any size.
//
// A LOAD reads the addressed cache word and pushes it into the Math Unit's
// input FIFO; a STORE pops the next arithmetic result and writes it to the
// addressed word. One command is handled at a time (cmd_ready low while
// busy): one cycle to fold the offsets, one to form the address, then the
// cache access, which may wait for its bank, and for a LOAD the push, which
// waits while the FIFO is full. Offsets must lie within one matrix side;
// the command format, the one-word granularity and the address order are
// this design's choices.
module mem_manager
  import dpfpa_pkg::*;
#(
  parameter int unsigned CACHE_AW = 12
) (
  input  logic        clk,
  input  logic        rst_n,
  input  mm_cfg_t     cfg,
  input  logic        cmd_valid,
  input  mm_cmd_t     cmd,
  output logic        cmd_ready,
  // cache port
  output cache_req_t  creq,
  input  cache_rsp_t  crsp,
  // Math Unit input FIFO
  output logic        in_push,
  output logic [63:0] in_data,
  input  logic        in_full,
  // Math Unit arithmetic output FIFO
  output logic        ar_pop,
  input  logic [63:0] ar_data,
  input  logic        ar_empty,
  output logic        busy
);

  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_ACC, S_WAITR, S_PUSH} state_e;

  state_e             state;
  mm_op_e             op;
  logic [DIM_W-1:0]   xw, yw, zw;
  logic [CADDR_W-1:0] addr;
  logic [63:0]        data;

  // fold a coordinate plus offset back into [0, n)
  function automatic logic [DIM_W-1:0] wrap(input logic [DIM_W-1:0] c,
                                            input logic signed [DIM_W-1:0] d,
                                            input logic [DIM_W-1:0] n);
    logic signed [DIM_W+1:0] s;
    s = $signed({2'b00, c}) + (DIM_W+2)'(d);
    if (s < 0)                          s = s + $signed({2'b00, n});
    else if (s >= $signed({2'b00, n}))  s = s - $signed({2'b00, n});
    return s[DIM_W-1:0];
  endfunction

  assign cmd_ready = (state == S_IDLE);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      op    <= MM_LOAD;
      xw    <= '0;
      yw    <= '0;
      zw    <= '0;
      addr  <= '0;
      data  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (cmd_valid) begin
          op    <= cmd.op;
          xw    <= wrap(cmd.x, cmd.dx, cfg.nx);
          yw    <= wrap(cmd.y, cmd.dy, cfg.ny);
          zw    <= wrap(cmd.z, cmd.dz, cfg.nz);
          state <= S_ADDR;
        end
        S_ADDR: begin
          addr  <= cfg.base + CADDR_W'((32'(zw) * 32'(cfg.ny) + 32'(yw)) * 32'(cfg.nx) + 32'(xw));
          state <= S_ACC;
        end
        S_ACC: begin
          if (crsp.gnt) state <= (op == MM_LOAD) ? S_WAITR : S_IDLE;
        end
        S_WAITR: begin
          if (crsp.rvalid) begin
            data  <= crsp.rdata;
            state <= S_PUSH;
          end
        end
        S_PUSH: if (!in_full) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign creq = '{req:   (state == S_ACC) && (op == MM_LOAD || !ar_empty),
                  we:    (op == MM_STORE),
                  addr:  addr & CADDR_W'((1 << CACHE_AW) - 1),
                  wdata: ar_data};
  assign ar_pop  = (state == S_ACC) && (op == MM_STORE) && !ar_empty && crsp.gnt;
  assign in_push = (state == S_PUSH) && !in_full;
  assign in_data = data;
endmodule
