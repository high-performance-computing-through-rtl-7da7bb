// tb_math_unit: self-checking test of the Math Unit with a hand-written
// microcode schedule.
//
// The testbench plays the sequencer: it presents one microcode word per
// cycle and moves on only when stall is low. One pass of the 30-word
// program fetches x, y, z and computes
//   r0 = fa*x + fb*z      (adder, leaves 9 words later, written to the
//                          adder bank and output)
//   p  = (x*y)*post       (multiplier, leaves 15 words later, multiplier bank)
//   r1 = p + z            (output from the adder)
//   r2 = r0 * 2.0         (output from the multiplier)
// and, when the pass asks for it, compares fa*x with fb*z. The input words
// are pushed with random gaps so that fetches stall; the expected values
// come from the simulator's double precision arithmetic. The number of
// cycles of a pass without stalls must equal the program length.
// The pipeline depths, banks, factors and FIFOs follow the accelerator
// description; the stall rules and the test program are this design's own.
module tb_math_unit;
  import dpfpa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  uword_t uword;
  logic uvalid, stall, busy;
  logic in_push, in_full, ar_pop, ar_empty, lg_pop, lg_empty;
  logic [63:0] in_data, ar_data, lg_data;
  logic [5:0] in_count;
  logic [4:0] ar_count, lg_count;
  int checks = 0, failures = 0, stalls = 0;

  math_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int PLEN = 30;
  uword_t prog [PLEN];

  function automatic src_t S(input bank_e b, input int i);
    return '{bank: b, idx: 2'(i)};
  endfunction

  task automatic build(input logic [1:0] fa, input logic [1:0] fb, input mul_post_e post,
                       input logic cmp);
    for (int i = 0; i < PLEN; i++) prog[i] = '0;
    for (int i = 0; i < 3; i++) begin
      prog[i].fetch = 1'b1; prog[i].in_we = 1'b1; prog[i].in_wa = 2'(i);
    end
    // word 3: r0 = fa*x + fb*z ; p = x*y*post
    prog[3].add_en = 1'b1; prog[3].add_cmp = cmp;
    prog[3].add_a = S(BANK_IN, 0); prog[3].add_b = S(BANK_IN, 2);
    prog[3].add_sa = fa; prog[3].add_sb = fb;
    prog[3].mul_en = 1'b1; prog[3].mul_a = S(BANK_IN, 0); prog[3].mul_b = S(BANK_IN, 1);
    prog[3].mul_post = post;
    // word 12: r0 leaves the adder
    prog[12].add_we = 1'b1; prog[12].add_wa = 2'd0; prog[12].out_en = 1'b1; prog[12].out_src = 1'b0;
    // word 14: r2 = r0 * 2.0
    prog[14].mul_en = 1'b1; prog[14].mul_a = S(BANK_ADD, 0); prog[14].mul_b = S(BANK_CST, 3);
    // word 18: p leaves the multiplier
    prog[18].mul_we = 1'b1; prog[18].mul_wa = 2'd1;
    // word 19: r1 = p + z
    prog[19].add_en = 1'b1; prog[19].add_a = S(BANK_MUL, 1); prog[19].add_b = S(BANK_IN, 2);
    // word 28: r1 leaves the adder; word 29: r2 leaves the multiplier
    prog[28].out_en = 1'b1; prog[28].out_src = 1'b0;
    prog[29].out_en = 1'b1; prog[29].out_src = 1'b1;
  endtask

  real ex_q[$];
  cmp_t fl_q[$];

  // arithmetic / logical output checkers
  always @(negedge clk) begin
    ar_pop = 1'b0;
    lg_pop = 1'b0;
    if (rst_n && !ar_empty) begin
      ar_pop = 1'b1;
      checks++;
      if (ex_q.size() == 0) begin
        failures++; $display("unexpected result %h", ar_data);
      end else begin
        real e;
        e = ex_q.pop_front();
        if (ar_data !== $realtobits(e)) begin
          failures++;
          if (failures < 10) $display("result %h expected %h", ar_data, $realtobits(e));
        end
      end
    end
    if (rst_n && !lg_empty) begin
      lg_pop = 1'b1;
      checks++;
      if (fl_q.size() == 0 || lg_data[3:0] !== fl_q[0]) begin
        failures++; $display("flags %b", lg_data[3:0]);
      end
      if (fl_q.size() != 0) void'(fl_q.pop_front());
    end
  end

  // input feeder with random gaps
  logic [63:0] feed[$];
  always @(negedge clk) begin
    in_push = 1'b0;
    if (rst_n && feed.size() != 0 && !in_full && ($urandom % 4 == 0)) begin
      in_push = 1'b1;
      in_data = feed.pop_front();
    end
  end

  always @(posedge clk) if (uvalid && stall) stalls++;

  function automatic logic [63:0] rnd();
    return {1'($urandom), 11'(1023 - 20 + ($urandom % 41)), 20'($urandom), 32'($urandom)};
  endfunction

  initial begin
    int t0;
    uvalid = 1'b0; uword = '0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 60; pass++) begin
      logic [63:0] x, y, z;
      logic [1:0] fa, fb;
      mul_post_e post;
      logic cmp;
      real rx, ry, rz, r0, p, r1;
      x = rnd(); y = rnd(); z = rnd();
      fa = 2'($urandom); fb = 2'($urandom); post = mul_post_e'($urandom); cmp = 1'($urandom);
      build(fa, fb, post, cmp);
      rx = $bitstoreal(x); ry = $bitstoreal(y); rz = $bitstoreal(z);
      r0 = rx * (fa[0] ? 2.0 : 1.0) * (fa[1] ? -1.0 : 1.0)
         + rz * (fb[0] ? 0.5 : 1.0) * (fb[1] ? -1.0 : 1.0);
      p = rx * ry;
      case (post) POST_DBL: p = p * 2.0; POST_HALF: p = p * 0.5; POST_NEG: p = -p; default: ; endcase
      r1 = p + rz;
      ex_q.push_back(r0);
      ex_q.push_back(r1);
      ex_q.push_back(r0 * 2.0);
      if (cmp) begin
        real ra, rb;
        cmp_t f;
        ra = rx * (fa[0] ? 2.0 : 1.0) * (fa[1] ? -1.0 : 1.0);
        rb = rz * (fb[0] ? 0.5 : 1.0) * (fb[1] ? -1.0 : 1.0);
        f = '0;
        if (ra < rb) f.lt = 1'b1; else if (ra > rb) f.gt = 1'b1; else f.eq = 1'b1;
        fl_q.push_back(f);
      end
      // on even passes the data are all there before the pass starts
      if (pass % 2 == 0) begin
        feed.push_back(x); feed.push_back(y); feed.push_back(z);
        wait (in_count == 3);
      end else begin
        feed.push_back(x); feed.push_back(y); feed.push_back(z);
      end
      @(negedge clk);
      t0 = $time;
      for (int w = 0; w < PLEN; w++) begin
        uword = prog[w];
        uvalid = 1'b1;
        @(posedge clk);
        while (stall) @(posedge clk);
        @(negedge clk);
      end
      uvalid = 1'b0;
      if (pass % 2 == 0) begin
        checks++;
        if (($time - t0) / 10 != PLEN) begin
          failures++;
          $display("pass took %0d cycles, expected %0d", ($time - t0) / 10, PLEN);
        end
      end
    end
    repeat (20) @(negedge clk);
    checks++;
    if (ex_q.size() != 0 || fl_q.size() != 0) begin
      failures++; $display("%0d results missing", ex_q.size());
    end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall seen"); end
    $display("stalls=%0d", stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
