// dipole_prog_pkg: microcode and reference model for the dipole-energy
// program used by the unit and system testbenches.
//
// For one dipole with angular terms SC = sin(t)cos(p), SS = sin(t)sin(p),
// C = cos(t), local field components CTX, CTY, CTZ and density constant k,
// the loop sequence computes
//   CT  = (CTX*(SC*k) + CTY*(SS*k)) + (CTZ*(C*k) + C)
//   E   = -CT*CT/2            new moments  CT*SC, CT*SS, CT*C
//   ETOT = ETOT + E           (kept in adder register 0)
// and compares E with zero, the kind of test a Metropolis step makes. It is
// a plain schedule, one dipole per 83-word pass, not the interleaved
// two-dipole schedule a tuned program would use. Per pass it fetches nine
// words: SC, SS, C, CTX, CTY, CTZ, SC, SS, C, and outputs E, CT*SC, CT*SS,
// CT*C. The set-up sequence fetches k into input register 3; the read-out
// sequence outputs ETOT.
package dipole_prog_pkg;
  import dpfpa_pkg::*;

  localparam int LOOP_LEN  = 83;
  localparam int SETUP_AT  = 0;
  localparam int LOOP_AT   = 1;
  localparam int READ_AT   = LOOP_AT + LOOP_LEN;
  localparam int READ_LEN  = 10;
  localparam int PROG_LEN  = READ_AT + READ_LEN;
  localparam logic [5:0] OP_SETUP = 6'd1, OP_LOOP = 6'd2, OP_READ = 6'd3;

  function automatic src_t S(input bank_e b, input int i);
    return '{bank: b, idx: 2'(i)};
  endfunction

  function automatic uword_t fetch_to(input int r);
    uword_t w = '0;
    w.fetch = 1'b1; w.in_we = 1'b1; w.in_wa = 2'(r);
    return w;
  endfunction

  // the whole program image, word address = array index
  function automatic void build(ref uword_t p [PROG_LEN]);
    for (int i = 0; i < PROG_LEN; i++) p[i] = '0;
    p[SETUP_AT] = fetch_to(3);                                  // k -> in3
    begin
      int b = LOOP_AT;
      p[b+0]  = fetch_to(0);                                     // SC
      p[b+1]  = fetch_to(1);                                     // SS
      p[b+1].mul_en = 1; p[b+1].mul_a = S(BANK_IN, 0); p[b+1].mul_b = S(BANK_IN, 3);   // SC*k
      p[b+2]  = fetch_to(2);                                     // C
      p[b+2].mul_en = 1; p[b+2].mul_a = S(BANK_IN, 1); p[b+2].mul_b = S(BANK_IN, 3);   // SS*k
      p[b+3]  = fetch_to(0);                                     // CTX
      p[b+3].mul_en = 1; p[b+3].mul_a = S(BANK_IN, 2); p[b+3].mul_b = S(BANK_IN, 3);   // C*k
      p[b+4]  = fetch_to(1);                                     // CTY
      p[b+5]  = fetch_to(2);                                     // CTZ
      p[b+16].mul_we = 1; p[b+16].mul_wa = 0;                    // m0 = SC*k
      p[b+17].mul_we = 1; p[b+17].mul_wa = 1;                    // m1 = SS*k
      p[b+17].mul_en = 1; p[b+17].mul_a = S(BANK_IN, 0); p[b+17].mul_b = S(BANK_MUL, 0);
      p[b+18].mul_we = 1; p[b+18].mul_wa = 2;                    // m2 = C*k
      p[b+18].mul_en = 1; p[b+18].mul_a = S(BANK_IN, 1); p[b+18].mul_b = S(BANK_MUL, 1);
      p[b+19].mul_en = 1; p[b+19].mul_a = S(BANK_IN, 2); p[b+19].mul_b = S(BANK_MUL, 2);
      p[b+20] = fetch_to(0);                                     // SC again
      p[b+21] = fetch_to(1);                                     // SS again
      p[b+22] = fetch_to(2);                                     // C again
      p[b+32].mul_we = 1; p[b+32].mul_wa = 0;                    // m0 = CTX*SC*k
      p[b+33].mul_we = 1; p[b+33].mul_wa = 1;                    // m1 = CTY*SS*k
      p[b+34].mul_we = 1; p[b+34].mul_wa = 2;                    // m2 = CTZ*C*k
      p[b+34].add_en = 1; p[b+34].add_a = S(BANK_MUL, 0); p[b+34].add_b = S(BANK_MUL, 1);
      p[b+35].add_en = 1; p[b+35].add_a = S(BANK_MUL, 2); p[b+35].add_b = S(BANK_IN, 2);
      p[b+43].add_we = 1; p[b+43].add_wa = 1;                    // a1 = s1
      p[b+44].add_we = 1; p[b+44].add_wa = 2;                    // a2 = s2
      p[b+45].add_en = 1; p[b+45].add_a = S(BANK_ADD, 1); p[b+45].add_b = S(BANK_ADD, 2);
      p[b+46].add_en = 1; p[b+46].add_a = S(BANK_ADD, 1); p[b+46].add_b = S(BANK_ADD, 2);
      p[b+46].add_sa = 2'b10; p[b+46].add_sb = 2'b10;            // -s1 + -s2
      p[b+54].add_we = 1; p[b+54].add_wa = 3;                    // a3 = CT
      p[b+55].add_we = 1; p[b+55].add_wa = 2;                    // a2 = -CT
      p[b+56].mul_en = 1; p[b+56].mul_a = S(BANK_ADD, 3); p[b+56].mul_b = S(BANK_ADD, 2);
      p[b+56].mul_post = POST_HALF;                              // E = CT*(-CT)/2
      p[b+57].mul_en = 1; p[b+57].mul_a = S(BANK_ADD, 3); p[b+57].mul_b = S(BANK_IN, 0);
      p[b+58].mul_en = 1; p[b+58].mul_a = S(BANK_ADD, 3); p[b+58].mul_b = S(BANK_IN, 1);
      p[b+59].mul_en = 1; p[b+59].mul_a = S(BANK_ADD, 3); p[b+59].mul_b = S(BANK_IN, 2);
      p[b+71].mul_we = 1; p[b+71].mul_wa = 3; p[b+71].out_en = 1; p[b+71].out_src = 1;  // E
      p[b+72].out_en = 1; p[b+72].out_src = 1;                   // CT*SC
      p[b+72].add_en = 1; p[b+72].add_a = S(BANK_ADD, 0); p[b+72].add_b = S(BANK_MUL, 3);
      p[b+73].out_en = 1; p[b+73].out_src = 1;                   // CT*SS
      p[b+73].add_en = 1; p[b+73].add_cmp = 1; p[b+73].add_a = S(BANK_MUL, 3);
      p[b+73].add_b = S(BANK_CST, 0);                            // compare E with 0
      p[b+74].out_en = 1; p[b+74].out_src = 1;                   // CT*C
      p[b+81].add_we = 1; p[b+81].add_wa = 0;                    // a0 = ETOT
    end
    p[READ_AT].add_en = 1; p[READ_AT].add_a = S(BANK_ADD, 0); p[READ_AT].add_b = S(BANK_CST, 0);
    p[READ_AT+9].out_en = 1; p[READ_AT+9].out_src = 0;
  endfunction

  // host words that load the program and bind the three op-codes
  function automatic void image(ref logic [63:0] w[$]);
    uword_t p [PROG_LEN];
    build(p);
    w.delete();
    for (int i = 0; i < PROG_LEN; i++) w.push_back(mk_wucd(11'(i), 37'(p[i])));
    w.push_back(mk_seq(OP_SETUP, 11'(SETUP_AT), 11'(SETUP_AT)));
    w.push_back(mk_seq(OP_LOOP,  11'(LOOP_AT),  11'(LOOP_AT + LOOP_LEN - 1)));
    w.push_back(mk_seq(OP_READ,  11'(READ_AT),  11'(READ_AT + READ_LEN - 1)));
  endfunction

  typedef struct {
    real sc, ss, c, ctx, cty, ctz;
  } dipole_t;

  function automatic dipole_t rnd_dipole();
    dipole_t d;
    real t, p;
    t = 3.14159 * real'($urandom % 10000) / 10000.0;
    p = 6.28318 * real'($urandom % 10000) / 10000.0;
    d.sc = $sin(t) * $cos(p);
    d.ss = $sin(t) * $sin(p);
    d.c  = $cos(t);
    d.ctx = real'(int'($urandom % 20001) - 10000) / 5000.0;
    d.cty = real'(int'($urandom % 20001) - 10000) / 5000.0;
    d.ctz = real'(int'($urandom % 20001) - 10000) / 5000.0;
    return d;
  endfunction

  // the nine words a pass fetches
  function automatic void words(input dipole_t d, ref logic [63:0] w[$]);
    w.push_back($realtobits(d.sc));  w.push_back($realtobits(d.ss));  w.push_back($realtobits(d.c));
    w.push_back($realtobits(d.ctx)); w.push_back($realtobits(d.cty)); w.push_back($realtobits(d.ctz));
    w.push_back($realtobits(d.sc));  w.push_back($realtobits(d.ss));  w.push_back($realtobits(d.c));
  endfunction

  function automatic real rnd(input real v);
    logic [63:0] b;
    b = $realtobits(v);
    return $bitstoreal(b);
  endfunction

  // the four results of a pass, same operation order as the microcode
  function automatic void expect4(input dipole_t d, input real k, ref logic [63:0] e[$],
                                  ref real etot);
    real s1, s2, ct, en;
    // every product is rounded on its own (rnd), as in the hardware, and
    // never fused with the following sum
    s1 = rnd(d.ctx * rnd(d.sc * k)) + rnd(d.cty * rnd(d.ss * k));
    s2 = rnd(d.ctz * rnd(d.c * k)) + d.c;
    ct = rnd(s1 + s2);
    en = rnd(rnd(ct * (-s1 + -s2)) * 0.5);
    e.push_back($realtobits(en));
    e.push_back($realtobits(ct * d.sc));
    e.push_back($realtobits(ct * d.ss));
    e.push_back($realtobits(ct * d.c));
    etot = etot + en;
  endfunction
endpackage
