// fp_mul_pipe: pipelined IEEE 754 double precision multiplier of the Math
// Unit.
//
// Each cycle with en high one product a*b enters; its result can be doubled,
// halved or negated on the way (post), which only moves the exponent or
// flips the sign and so costs no cycle. The result leaves LATENCY enabled
// cycles later (15 by default, as in the accelerator description). Stage 1
// unpacks and handles the special operands, stage 2 forms the 106-bit
// significand product, stage 3 normalises, rounds to nearest even and packs;
// the rest of the depth is a register chain, and en low freezes the pipe.
// As in the adder, subnormals are flushed to zero and a NaN result is the
// quiet NaN; these are this design's own choices.
module fp_mul_pipe
  import dpfpa_pkg::*;
#(
  parameter int unsigned LATENCY = 15
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic        in_valid,
  input  logic [63:0] a,
  input  logic [63:0] b,
  input  mul_post_e   post,
  output logic        out_valid,
  output logic [63:0] out_res
);

  initial assert (LATENCY >= 3) else $error("fp_mul_pipe: LATENCY must be at least 3");

  typedef struct packed {
    logic        valid;
    logic        special;
    logic [63:0] spec_val;
    logic        sign;
    logic signed [13:0] exp;   // biased exponent of the product before normalisation
    logic [52:0] ma;
    logic [52:0] mb;
  } s1_t;

  typedef struct packed {
    logic         valid;
    logic         special;
    logic [63:0]  spec_val;
    logic         sign;
    logic signed [13:0] exp;
    logic [105:0] prod;
  } s2_t;

  typedef struct packed {
    logic        valid;
    logic [63:0] res;
  } s3_t;

  s1_t s1_d, s1_q;
  s2_t s2_d, s2_q;
  s3_t s3_d;

  // ------------------------------------------------------------ stage 1
  always_comb begin
    logic [10:0] e_a, e_b;
    logic [51:0] f_a, f_b;
    logic        nan_a, nan_b, inf_a, inf_b, zero_a, zero_b, sgn;

    e_a = a[62:52];
    f_a = (e_a == 11'd0) ? 52'd0 : a[51:0];
    e_b = b[62:52];
    f_b = (e_b == 11'd0) ? 52'd0 : b[51:0];
    nan_a  = (e_a == 11'h7FF) && (f_a != '0);
    nan_b  = (e_b == 11'h7FF) && (f_b != '0);
    inf_a  = (e_a == 11'h7FF) && (f_a == '0);
    inf_b  = (e_b == 11'h7FF) && (f_b == '0);
    zero_a = (e_a == 11'd0);
    zero_b = (e_b == 11'd0);
    sgn    = a[63] ^ b[63] ^ (post == POST_NEG);

    s1_d       = '0;
    s1_d.valid = in_valid;
    s1_d.sign  = sgn;
    if (nan_a || nan_b || (inf_a && zero_b) || (inf_b && zero_a)) begin
      s1_d.special  = 1'b1;
      s1_d.spec_val = FP_QNAN;
    end else if (inf_a || inf_b) begin
      s1_d.special  = 1'b1;
      s1_d.spec_val = {sgn, 11'h7FF, 52'd0};
    end else if (zero_a || zero_b) begin
      s1_d.special  = 1'b1;
      s1_d.spec_val = {sgn, 63'd0};
    end
    s1_d.ma  = {1'b1, f_a};
    s1_d.mb  = {1'b1, f_b};
    s1_d.exp = 14'(e_a) + 14'(e_b) - 14'sd1023
             + ((post == POST_DBL) ? 14'sd1 : 14'sd0)
             - ((post == POST_HALF) ? 14'sd1 : 14'sd0);
  end

  // ------------------------------------------------------------ stage 2
  always_comb begin
    s2_d.valid    = s1_q.valid;
    s2_d.special  = s1_q.special;
    s2_d.spec_val = s1_q.spec_val;
    s2_d.sign     = s1_q.sign;
    s2_d.exp      = s1_q.exp;
    s2_d.prod     = 106'(s1_q.ma) * 106'(s1_q.mb);
  end

  // ------------------------------------------------------------ stage 3
  always_comb begin
    logic [52:0] sig;
    logic        g, st, rup;
    logic [53:0] m;
    logic signed [13:0] e;

    if (s2_q.prod[105]) begin
      sig = s2_q.prod[105:53];
      g   = s2_q.prod[52];
      st  = |s2_q.prod[51:0];
      e   = s2_q.exp + 14'sd1;
    end else begin
      sig = s2_q.prod[104:52];
      g   = s2_q.prod[51];
      st  = |s2_q.prod[50:0];
      e   = s2_q.exp;
    end
    rup = g & (st | sig[0]);
    m   = {1'b0, sig} + 54'(rup);
    if (m[53]) begin
      m = m >> 1;
      e = e + 14'sd1;
    end

    s3_d.valid = s2_q.valid;
    if (s2_q.special)        s3_d.res = s2_q.spec_val;
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
  assign out_res   = chain[LATENCY-3].res;

endmodule
