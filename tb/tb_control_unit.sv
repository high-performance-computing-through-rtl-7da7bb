// tb_control_unit: self-checking test of the control unit as a whole.
//
// Through its host word port the testbench loads two random microcode
// sequences (words 0..6 under op-code 12, words 7..9 under op-code 40),
// interleaves data words (which must come out on the data port, in order,
// and wait while the FIFO is full), starts op-code 12, then switches to
// op-code 40, which takes over at once, and halts. Under random stalls, the
// microcode words executed (uvalid high, stall low) must be passes of the
// first sequence (the last possibly cut short) followed by whole passes of
// the second.
// The decode / jump / RAM split follows the accelerator description; the
// instruction code points are this design's own.
module tb_control_unit;
  import dpfpa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_valid, host_ready, data_push, data_full, uvalid, stall, running, pass_end;
  logic [63:0] host_word, data_word;
  uword_t uword;
  logic [5:0] cur_op;
  int checks = 0, failures = 0;

  control_unit #(.UCODE_DEPTH(256)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [36:0] prog [10];
  logic [63:0] dq[$];
  logic [36:0] exe[$];

  always @(posedge clk) if (rst_n) begin
    if (data_push) begin
      checks++;
      if (dq.size() == 0 || data_word !== dq[0]) begin failures++; $display("data %h", data_word); end
      if (dq.size() != 0) void'(dq.pop_front());
    end
    if (uvalid && !stall) exe.push_back(37'(uword));
  end

  task automatic send(input logic [63:0] w);
    @(negedge clk);
    host_valid = 1; host_word = w;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    @(negedge clk);
    host_valid = 0;
  endtask

  initial begin
    int i, na, nb;
    host_valid = 0; host_word = 0; data_full = 0; stall = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      forever begin @(negedge clk); data_full = ($urandom % 3 == 0); stall = ($urandom % 4 == 0); end
    join_none
    for (int k = 0; k < 10; k++) begin
      logic [63:0] d;
      prog[k] = {5'($urandom), $urandom};
      send(mk_wucd(11'(k), prog[k]));
      d = {1'b0, 11'(1000 + k), 52'($urandom)};
      dq.push_back(d);
      send(d);
    end
    send(mk_seq(6'd12, 11'd0, 11'd6));
    send(mk_seq(6'd40, 11'd7, 11'd9));
    send(mk_exec(6'd12));
    repeat (60) @(negedge clk);
    send(mk_exec(6'd40));
    repeat (60) @(negedge clk);
    send(mk_halt());
    repeat (30) @(negedge clk);
    // check the executed word stream
    i = 0; na = 0; nb = 0;
    // passes of A, the last one possibly cut short by the switch
    while (i < exe.size() && exe[i] == prog[0]) begin
      for (int k = 0; k < 7 && i < exe.size(); k++) begin
        if (exe[i] == prog[7] && k > 0) break;
        checks++;
        if (exe[i] !== prog[k]) begin failures++; $display("word %0d of pass A wrong", k); end
        i++;
      end
      na++;
    end
    while (i + 3 <= exe.size() && exe[i] == prog[7]) begin
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (exe[i + k] !== prog[7 + k]) begin failures++; $display("word %0d of pass B wrong", k); end
      end
      i += 3; nb++;
    end
    checks++;
    if (i != exe.size() || na < 2 || nb < 2) begin
      failures++; $display("executed %0d words, parsed %0d, passes %0d %0d", exe.size(), i, na, nb);
    end
    checks++;
    if (dq.size() != 0 || running) begin failures++; $display("data left or still running"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
