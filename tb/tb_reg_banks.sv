// tb_reg_banks: self-checking test of the Math Unit register banks.
//
// Random simultaneous writes to the three banks and random reads on the
// four read ports, checked against a model of the twelve registers and the
// four constants; a read in the cycle of a write must return the old value.
// Three banks of four doubles follow the accelerator description; the
// constant bank and the four read ports are this design's own.
module tb_reg_banks;
  import dpfpa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_we, add_we, mul_we;
  logic [1:0] in_wa, add_wa, mul_wa;
  logic [63:0] in_wd, add_wd, mul_wd;
  src_t rsel [4];
  logic [63:0] rdata [4];
  logic [63:0] model [4][4];
  int checks = 0, failures = 0;

  reg_banks dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model[3][0] = 64'd0; model[3][1] = FP_ONE; model[3][2] = FP_MONE; model[3][3] = FP_TWO;
    for (int b = 0; b < 3; b++) for (int i = 0; i < 4; i++) model[b][i] = '0;
    in_we = 0; add_we = 0; mul_we = 0; in_wa = 0; add_wa = 0; mul_wa = 0;
    in_wd = 0; add_wd = 0; mul_wd = 0;
    for (int p = 0; p < 4; p++) rsel[p] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_we = 1'($urandom);  in_wa = 2'($urandom);  in_wd = {$urandom, $urandom};
      add_we = 1'($urandom); add_wa = 2'($urandom); add_wd = {$urandom, $urandom};
      mul_we = 1'($urandom); mul_wa = 2'($urandom); mul_wd = {$urandom, $urandom};
      for (int p = 0; p < 4; p++) rsel[p] = src_t'($urandom);
      #1;
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (rdata[p] !== model[rsel[p].bank][rsel[p].idx]) begin
          failures++;
          if (failures < 10) $display("port %0d src %h: got %h expected %h", p, rsel[p], rdata[p],
                                      model[rsel[p].bank][rsel[p].idx]);
        end
      end
      @(posedge clk);
      if (in_we)  model[0][in_wa]  = in_wd;
      if (add_we) model[1][add_wa] = add_wd;
      if (mul_we) model[2][mul_wa] = mul_wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
