// tb_jump_unit: self-checking test of the sequencer's jump unit.
//
// Defines three sequences, starts one, switches to another in the middle of
// a pass and finally halts, all under random stalls. The addresses the unit
// reads (with rd_en high while running) must form passes of op-code 5
// (words 10..13), the last one possibly cut short by the switch, then
// op-code 9 (a single word, 20), then op-code 63 (words 30..40), and stop at
// the end of the pass in which the halt arrived. No word of a sequence may
// be read after the switch away from it, and a word dropped by the switch
// must not be flagged valid.
// The looping of a sequence until the next executive instruction follows
// the accelerator description; the immediate switch and the halt that it
// checks are this design's own rules.
module tb_jump_unit;
  import dpfpa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic seq_we, exec_valid, halt, stall, rd_en, uvalid, running, pass_end;
  logic [5:0] seq_op, exec_op, cur_op;
  logic [7:0] seq_start, seq_end, rd_addr;
  int checks = 0, failures = 0, cyc = 0;

  jump_unit #(.AW(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int addrs[$];
  int acyc[$];
  logic run_q = 1'b0;
  int passes = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (exec_valid) begin
        run_q <= 1'b0;     // the word read now is dropped
      end else if (rd_en) begin
        if (running) begin addrs.push_back(int'(rd_addr)); acyc.push_back(cyc); end
        run_q <= running;
      end
      if (pass_end) passes <= passes + 1;
    end
  end
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (uvalid !== run_q) begin failures++; $display("uvalid %b expected %b", uvalid, run_q); end
  end

  task automatic define(input int op, input int s, input int e);
    @(negedge clk);
    seq_we = 1; seq_op = 6'(op); seq_start = 8'(s); seq_end = 8'(e);
    @(negedge clk);
    seq_we = 0;
  endtask

  int t_sw1, t_sw2, t_halt;

  // consume passes of [s..e] from addrs, starting at index i; the last may
  // be cut short when cut is set
  task automatic eat(inout int i, input int s, input int e, input int t_sw, input logic cut,
                     output int n);
    n = 0;
    while (i < addrs.size() && addrs[i] == s) begin
      for (int a = s; a <= e; a++) begin
        if (cut && (i >= addrs.size() || addrs[i] != a)) break;
        checks++;
        if (i >= addrs.size() || addrs[i] != a) begin
          failures++; $display("address %0d expected %0d", (i < addrs.size()) ? addrs[i] : -1, a);
          return;
        end
        checks++;
        if (acyc[i] > t_sw) begin
          failures++; $display("word %0d read after the switch", a);
        end
        i++;
      end
      n++;
    end
  endtask

  initial begin
    int i, n5, n9, n63;
    seq_we = 0; exec_valid = 0; halt = 0; stall = 0; seq_op = 0; exec_op = 0;
    seq_start = 0; seq_end = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    define(5, 10, 13);
    define(9, 20, 20);
    define(63, 30, 40);
    fork
      begin
        repeat (400) begin @(negedge clk); stall = ($urandom % 4 == 0); end
        @(negedge clk); stall = 0;
      end
      begin
        @(negedge clk); exec_valid = 1; exec_op = 5;
        @(negedge clk); exec_valid = 0;
        repeat (37) @(negedge clk);
        exec_valid = 1; exec_op = 9; t_sw1 = cyc;
        @(negedge clk); exec_valid = 0;
        repeat (20) @(negedge clk);
        exec_valid = 1; exec_op = 63; t_sw2 = cyc;
        @(negedge clk); exec_valid = 0;
        repeat (59) @(negedge clk);
        halt = 1; t_halt = cyc;
        @(negedge clk); halt = 0;
      end
    join
    repeat (40) @(negedge clk);
    i = 0;
    eat(i, 10, 13, t_sw1, 1'b1, n5);
    eat(i, 20, 20, t_sw2, 1'b1, n9);
    eat(i, 30, 40, 1 << 30, 1'b0, n63);
    checks++;
    if (i != addrs.size() || n5 < 2 || n9 < 2 || n63 < 2) begin
      failures++;
      $display("left %0d of %0d addresses, passes %0d %0d %0d", addrs.size() - i, addrs.size(), n5, n9, n63);
    end
    checks++;
    if (passes < n63 + n9 + n5 - 2 || passes > n5 + n9 + n63) begin
      failures++; $display("pass_end count %0d", passes);
    end
    checks++;
    if (acyc[addrs.size()-1] < t_halt) begin failures++; $display("halt stopped too early"); end
    checks++;
    if (running) begin failures++; $display("still running after halt"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
