// jump_unit: Jump Unit of the control unit (the microcode sequencer).
//
// It keeps, for each of the 64 six-bit op-codes, where its microcode
// sequence starts and ends in the control RAM (written by sequence
// definition instructions), and it produces the RAM read address. An
// executive instruction starts the op-code's sequence; the sequence is then
// replayed pass after pass, as the accelerator description has it, until
// another executive instruction arrives, which takes over at once (the
// word waiting on the RAM output is dropped, so the switch costs one
// cycle). The host should therefore switch while the running sequence waits
// for data at the start of a pass. A halt, this design's addition, stops
// the sequencer at the end of the current pass.
//
// Timing: the RAM reads rd_addr when rd_en is high and its word is valid
// one cycle later, flagged by uvalid. stall (from the Math Unit) holds the
// address, the RAM output and uvalid. pass_end pulses on the cycle the last
// word of a pass is read.
module jump_unit
  import dpfpa_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               seq_we,
  input  logic [OPC_W-1:0]   seq_op,
  input  logic [AW-1:0]      seq_start,
  input  logic [AW-1:0]      seq_end,
  input  logic               exec_valid,
  input  logic [OPC_W-1:0]   exec_op,
  input  logic               halt,
  input  logic               stall,
  output logic               rd_en,
  output logic [AW-1:0]      rd_addr,
  output logic               uvalid,
  output logic               running,
  output logic [OPC_W-1:0]   cur_op,
  output logic               pass_end
);

  localparam int unsigned NOPC = 1 << OPC_W;

  logic [AW-1:0]    tab_start [NOPC];
  logic [AW-1:0]    tab_end   [NOPC];
  logic [AW-1:0]    pc;
  logic             pend_halt;

  assign rd_en    = !stall;
  assign rd_addr  = pc;
  assign pass_end = running && !stall && (pc == tab_end[cur_op]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NOPC; i++) begin
        tab_start[i] <= '0;
        tab_end[i]   <= '0;
      end
    end else if (seq_we) begin
      tab_start[seq_op] <= seq_start;
      tab_end[seq_op]   <= seq_end;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc        <= '0;
      running   <= 1'b0;
      cur_op    <= '0;
      uvalid    <= 1'b0;
      pend_halt <= 1'b0;
    end else if (exec_valid) begin
      // a new executive instruction replaces the running sequence at once;
      // the word on the RAM output (possibly stalled) is dropped
      running   <= 1'b1;
      cur_op    <= exec_op;
      pc        <= tab_start[exec_op];
      uvalid    <= 1'b0;
      pend_halt <= 1'b0;
    end else begin
      if (halt) pend_halt <= 1'b1;
      if (!stall) begin
        uvalid <= running;
        if (running) begin
          if (pass_end) begin
            pc <= tab_start[cur_op];
            if (pend_halt || halt) begin
              running   <= 1'b0;
              pend_halt <= 1'b0;
            end
          end else begin
            pc <= pc + AW'(1);
          end
        end
      end
    end
  end
endmodule
