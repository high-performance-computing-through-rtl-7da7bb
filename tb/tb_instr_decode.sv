// tb_instr_decode: self-checking test of the instruction decoder.
//
// Random data words (any double, NaNs included, except the reserved
// instruction pattern) must pass to the data port and wait while the FIFO
// is full; random programming and executive instructions must raise
// exactly their own strobe with the right fields, whatever the FIFO state.
module tb_instr_decode;
  import dpfpa_pkg::*;

  logic        host_valid, host_ready, data_push, data_full;
  logic [63:0] host_word, data_word;
  logic        ucode_we, seq_we, exec_valid, halt;
  logic [UADDR_W-1:0] ucode_addr, seq_start, seq_end;
  logic [UWORD_W-1:0] ucode_word;
  logic [OPC_W-1:0]   seq_op, exec_op;
  int checks = 0, failures = 0;

  instr_decode dut (.*);

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("fail: %s word %h", what, host_word);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      int k = $urandom % 6;
      logic [UADDR_W-1:0] a, s, e;
      logic [UWORD_W-1:0] u;
      logic [OPC_W-1:0] op;
      a = UADDR_W'($urandom); s = UADDR_W'($urandom); e = UADDR_W'($urandom);
      u = {5'($urandom), $urandom}; op = OPC_W'($urandom);
      host_valid = 1'b1;
      data_full  = 1'($urandom);
      case (k)
        0: host_word = mk_wucd(a, u);
        1: host_word = mk_seq(op, s, e);
        2: host_word = mk_exec(op);
        3: host_word = mk_halt();
        4: host_word = {$urandom, $urandom} | 64'h7FF0_0000_0000_0000;   // NaN / inf data
        default: host_word = {$urandom, $urandom};
      endcase
      // a random word can hit the reserved pattern only if bits 63:51 are 1..10
      if (k >= 4 && host_word[63:51] == 13'h1FFE && host_word[50:48] != 0) host_word[63] = 1'b0;
      #1;
      chk(ucode_we   == (k == 0), "ucode_we");
      chk(seq_we     == (k == 1), "seq_we");
      chk(exec_valid == (k == 2), "exec_valid");
      chk(halt       == (k == 3), "halt");
      chk(data_push  == (k >= 4 && !data_full), "data_push");
      chk(host_ready == (k < 4 || !data_full), "host_ready");
      if (k == 0) chk(ucode_addr == a && ucode_word == u, "ucode fields");
      if (k == 1) chk(seq_op == op && seq_start == s && seq_end == e, "seq fields");
      if (k == 2) chk(exec_op == op, "exec op");
      if (k >= 4) chk(data_word == host_word, "data word");
      #9;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
