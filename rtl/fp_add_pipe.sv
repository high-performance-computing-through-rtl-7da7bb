// fp_add_pipe: pipelined IEEE 754 double precision adder and comparator of
// the Math Unit.
//
// Each cycle with en high one operation enters: a sum a*fa + b*fb, where the
// operand factors are fa in {1, 2, -1, -2} (sa) and fb in {1, 0.5, -1, -0.5}
// (sb). The factors cost no cycle: they only flip the sign or move the
// exponent by one. With in_cmp high the same scaled operands are compared
// as well and out_flags tells lt/eq/gt/unordered.
//
// The result leaves LATENCY enabled cycles after it entered (9 by default,
// as in the accelerator description). Stage 1 unpacks, scales, handles the
// special operands and orders the operands by magnitude; stage 2 aligns,
// adds and normalises; stage 3 rounds to nearest even and packs. The rest
// of the depth is a register chain, so en (low during a Math Unit stall)
// freezes the whole pipe and nothing is lost. Rounding is to nearest even;
// subnormal inputs and results are flushed to zero and every NaN result is
// the quiet NaN 0x7FF8000000000000, choices made by this design.
module fp_add_pipe
  import dpfpa_pkg::*;
#(
  parameter int unsigned LATENCY = 9
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        in_valid,
  input  logic        in_cmp,
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  logic [1:0]  sa,
  input  logic [1:0]  sb,
  output logic        out_valid,
  output logic        out_cmp,
  output logic [63:0] out_res,
  output cmp_t        out_flags
);

  initial assert (LATENCY >= 3) else $error("fp_add_pipe: LATENCY must be at least 3");

  // ------------------------------------------------------------ stage 1
  typedef struct packed {
    logic        valid;
    logic        cmp;
    cmp_t        flags;
    logic        special;
    logic [63:0] spec_val;
    logic        sign;      // sign of the larger operand
    logic [10:0] exp;       // exponent of the larger operand
    logic [52:0] ma;        // significand of the larger operand
    logic [52:0] mb;        // significand of the smaller operand
    logic [10:0] diff;      // exponent difference
    logic        sub;       // effective subtraction
  } s1_t;

  typedef struct packed {
    logic        valid;
    logic        cmp;
    cmp_t        flags;
    logic        special;
    logic [63:0] spec_val;
    logic        sign;
    logic        zero;
    logic signed [13:0] exp;
    logic [55:0] norm;      // 1.xxx with guard, round and sticky bits
  } s2_t;

  typedef struct packed {
    logic        valid;
    logic        cmp;
    cmp_t        flags;
    logic [63:0] res;
  } s3_t;

  s1_t s1_d, s1_q;
  s2_t s2_d, s2_q;
  s3_t s3_d;

  function automatic logic [5:0] lzc56(input logic [55:0] v);
    logic [5:0] n;
    logic       found;
    n = 6'd56;
    found = 1'b0;
    for (int i = 55; i >= 0; i--) begin
      if (!found && v[i]) begin
        n = 6'(55 - i);
        found = 1'b1;
      end
    end
    return n;
  endfunction

  always_comb begin
    logic        s_a, s_b;
    logic [10:0] e_a, e_b;
    logic [51:0] f_a, f_b;
    logic        nan_a, nan_b, inf_a, inf_b, zero_a, zero_b;
    logic        a_big;

    s_a = a[63] ^ sa[1];
    e_a = a[62:52];
    f_a = a[51:0];
    s_b = b[63] ^ sb[1];
    e_b = b[62:52];
    f_b = b[51:0];

    // flush subnormals
    if (e_a == 11'd0) f_a = '0;
    if (e_b == 11'd0) f_b = '0;

    // factor 2 on a: exponent up, overflow to infinity
    if (sa[0] && e_a != 11'd0 && e_a != 11'h7FF) begin
      e_a = e_a + 11'd1;
      if (e_a == 11'h7FF) f_a = '0;
    end
    // factor 0.5 on b: exponent down, underflow to zero
    if (sb[0] && e_b != 11'd0 && e_b != 11'h7FF) begin
      e_b = e_b - 11'd1;
      if (e_b == 11'd0) f_b = '0;
    end

    nan_a  = (e_a == 11'h7FF) && (f_a != '0);
    nan_b  = (e_b == 11'h7FF) && (f_b != '0);
    inf_a  = (e_a == 11'h7FF) && (f_a == '0);
    inf_b  = (e_b == 11'h7FF) && (f_b == '0);
    zero_a = (e_a == 11'd0);
    zero_b = (e_b == 11'd0);

    s1_d = '0;
    s1_d.valid = in_valid;
    s1_d.cmp   = in_cmp;

    // comparison of the scaled operands
    if (nan_a || nan_b) begin
      s1_d.flags.uno = 1'b1;
    end else if ((zero_a && zero_b) || ({s_a, e_a, f_a} == {s_b, e_b, f_b})) begin
      s1_d.flags.eq = 1'b1;
    end else if (s_a != s_b) begin
      s1_d.flags.lt = s_a;
      s1_d.flags.gt = s_b;
    end else if (({e_a, f_a} < {e_b, f_b}) ^ s_a) begin
      s1_d.flags.lt = 1'b1;
    end else begin
      s1_d.flags.gt = 1'b1;
    end

    // special operands
    if (nan_a || nan_b || (inf_a && inf_b && (s_a != s_b))) begin
      s1_d.special  = 1'b1;
      s1_d.spec_val = FP_QNAN;
    end else if (inf_a) begin
      s1_d.special  = 1'b1;
      s1_d.spec_val = {s_a, 11'h7FF, 52'd0};
    end else if (inf_b) begin
      s1_d.special  = 1'b1;
      s1_d.spec_val = {s_b, 11'h7FF, 52'd0};
    end else if (zero_a && zero_b) begin
      s1_d.special  = 1'b1;
      s1_d.spec_val = {s_a & s_b, 63'd0};
    end

    // order by magnitude
    a_big = ({e_a, f_a} >= {e_b, f_b});
    s1_d.sub = s_a ^ s_b;
    if (a_big) begin
      s1_d.sign = s_a;
      s1_d.exp  = e_a;
      s1_d.ma   = {!zero_a, f_a};
      s1_d.mb   = {!zero_b, f_b};
      s1_d.diff = e_a - e_b;
    end else begin
      s1_d.sign = s_b;
      s1_d.exp  = e_b;
      s1_d.ma   = {!zero_b, f_b};
      s1_d.mb   = {!zero_a, f_a};
      s1_d.diff = e_b - e_a;
    end
  end

  // ------------------------------------------------------------ stage 2
  always_comb begin
    logic [55:0] ma_x, mb_x, sh, mask;
    logic        sticky;
    logic [56:0] sum;
    logic [5:0]  lz;

    mask = '0;
    lz   = '0;
    ma_x = {s1_q.ma, 3'b000};
    mb_x = {s1_q.mb, 3'b000};
    if (s1_q.diff >= 11'd56) begin
      sh     = '0;
      sticky = |mb_x;
    end else begin
      sh     = mb_x >> s1_q.diff;
      mask   = (56'd1 << s1_q.diff) - 56'd1;
      sticky = |(mb_x & mask);
    end
    sh[0] = sh[0] | sticky;

    if (s1_q.sub) sum = {1'b0, ma_x} - {1'b0, sh};
    else          sum = {1'b0, ma_x} + {1'b0, sh};

    s2_d          = '0;
    s2_d.valid    = s1_q.valid;
    s2_d.cmp      = s1_q.cmp;
    s2_d.flags    = s1_q.flags;
    s2_d.special  = s1_q.special;
    s2_d.spec_val = s1_q.spec_val;
    s2_d.sign     = s1_q.sign;

    if (sum[56]) begin
      s2_d.norm = sum[56:1];
      s2_d.norm[0] = sum[1] | sum[0];
      s2_d.exp  = 14'(s1_q.exp) + 14'sd1;
    end else if (sum[55:0] == '0) begin
      s2_d.zero = 1'b1;
      s2_d.sign = 1'b0;      // exact cancellation gives +0
    end else begin
      lz = lzc56(sum[55:0]);
      s2_d.norm = sum[55:0] << lz;
      s2_d.exp  = 14'(s1_q.exp) - 14'(lz);
    end
  end

  // ------------------------------------------------------------ stage 3
  always_comb begin
    logic        rup;
    logic [53:0] m;
    logic signed [13:0] e;

    rup = s2_q.norm[2] & (s2_q.norm[1] | s2_q.norm[0] | s2_q.norm[3]);
    m   = {1'b0, s2_q.norm[55:3]} + 54'(rup);
    e   = s2_q.exp;
    if (m[53]) begin
      m = m >> 1;
      e = e + 14'sd1;
    end

    s3_d       = '0;
    s3_d.valid = s2_q.valid;
    s3_d.cmp   = s2_q.cmp;
    s3_d.flags = s2_q.flags;
    if (s2_q.special)        s3_d.res = s2_q.spec_val;
    else if (s2_q.zero)      s3_d.res = {s2_q.sign, 63'd0};
    else if (e >= 14'sd2047) s3_d.res = {s2_q.sign, 11'h7FF, 52'd0};
    else if (e <= 14'sd0)    s3_d.res = {s2_q.sign, 63'd0};
    else                     s3_d.res = {s2_q.sign, e[10:0], m[51:0]};
  end

  // ------------------------------------------------------------ registers
  s3_t chain [LATENCY-2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0;
      s2_q <= '0;
      for (int i = 0; i < LATENCY - 2; i++) chain[i] <= '0;
    end else if (en) begin
      s1_q     <= s1_d;
      s2_q     <= s2_d;
      chain[0] <= s3_d;
      for (int i = 1; i < LATENCY - 2; i++) chain[i] <= chain[i-1];
    end
  end

  assign out_valid = chain[LATENCY-3].valid;
  assign out_cmp   = chain[LATENCY-3].cmp;
  assign out_res   = chain[LATENCY-3].res;
  assign out_flags = chain[LATENCY-3].flags;

endmodule
