// tb_sync_fifo: self-checking test of the FIFO queue.
//
// Random pushes and pops (never into a full or out of an empty queue)
// against a queue model; checks the head word, full, empty and count every
// cycle, and that the queue fills to exactly DEPTH words.
// The FIFOs follow the accelerator description; first-word fall-through
// and the depths tested are this design's own.
module tb_sync_fifo;
  localparam int unsigned W = 64, D = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, full, empty;
  logic [W-1:0] wdata, rdata;
  logic [$clog2(D+1)-1:0] count;
  int checks = 0, failures = 0;
  int saw_full = 0;
  logic [W-1:0] model[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (count != model.size() || empty != (model.size() == 0) || full != (model.size() == D) ||
          (model.size() > 0 && rdata != model[0])) begin
        failures++;
        if (failures < 10) $display("cycle %0d: count %0d model %0d", i, count, model.size());
      end
      if (full) saw_full++;
      // bias toward filling in the first half, draining in the second
      push = !full && ($urandom % 100 < ((i % 1000) < 500 ? 80 : 30));
      pop  = !empty && ($urandom % 100 < ((i % 1000) < 500 ? 30 : 80));
      wdata = {$urandom, $urandom};
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wdata);
    end
    checks++;
    if (saw_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
