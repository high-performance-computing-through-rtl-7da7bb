// tb_ucode_ram: self-checking test of the microcode RAM.
//
// Fills the RAM with random words, then reads random addresses with read
// enable toggling: the word must appear one cycle after a read with re
// high and hold while re is low; writes during reads are also checked.
// The microcode RAM follows the accelerator description; its depth and
// read timing are this design's own.
module tb_ucode_ram;
  import dpfpa_pkg::*;
  localparam int unsigned D = 256;

  logic clk = 1'b0, rst_n = 1'b0, we, re;
  logic [7:0] waddr, raddr;
  logic [UWORD_W-1:0] wdata, rdata, model [D], expq;
  int checks = 0, failures = 0;

  ucode_ram #(.DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (rdata != '0) begin failures++; $display("output not cleared by reset"); end
    for (int i = 0; i < D; i++) begin
      we = 1; waddr = 8'(i); wdata = {5'($urandom), $urandom}; model[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    expq = rdata;
    for (int i = 0; i < 3000; i++) begin
      re = 1'($urandom); raddr = 8'($urandom);
      we = 1'($urandom); waddr = 8'($urandom); wdata = {5'($urandom), $urandom};
      if (we && waddr == raddr) we = 1'b0;
      @(posedge clk);
      if (re) expq = model[raddr];
      if (we) model[waddr] = wdata;
      @(negedge clk);
      checks++;
      if (rdata !== expq) begin
        failures++;
        if (failures < 10) $display("read %h expected %h", rdata, expq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
