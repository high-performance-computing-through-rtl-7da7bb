// tb_fp_add_pipe: self-checking test of the double precision adder.
//
// Random normal operands (subnormals count as zero, as in the adder) (including near-cancelling pairs), zeros,
// infinities and NaNs go through the pipe with random operand factors and
// random comparison requests. The expected sum and comparison come from the
// simulator's own double precision arithmetic on the scaled operands. The
// first phase keeps en high and checks the 9-cycle latency; the second
// drops en at random and checks that no result is lost or reordered.
module tb_fp_add_pipe;
  import dpfpa_pkg::*;

  localparam int unsigned LAT = 9;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        en, in_valid, in_cmp, out_valid, out_cmp;
  logic [63:0] a, b, out_res;
  logic [1:0]  sa, sb;
  cmp_t        out_flags;

  int checks = 0, failures = 0;
  int cycle = 0;

  fp_add_pipe #(.LATENCY(LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [63:0] res;
    cmp_t        flags;
    logic        cmp;
    int          t_in;
  } exp_t;
  exp_t q[$];

  function automatic logic [63:0] rnd_norm();
    logic [10:0] e = 11'(1023 - 40 + ($urandom % 81));
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  function automatic logic [63:0] pick();
    int k = $urandom % 20;
    case (k)
      0: return 64'h0;
      1: return 64'h8000_0000_0000_0000;
      2: return 64'h7FF0_0000_0000_0000;
      3: return 64'hFFF0_0000_0000_0000;
      4: return 64'h7FF0_0000_0000_1234;
      default: return rnd_norm();
    endcase
  endfunction

  function automatic logic isnan(input logic [63:0] v);
    return v[62:52] == 11'h7FF && v[51:0] != 0;
  endfunction

  // the adder flushes subnormal operands and results to a signed zero
  function automatic logic [63:0] ftz(input logic [63:0] v);
    return (v[62:52] == 11'd0) ? {v[63], 63'd0} : v;
  endfunction

  task automatic issue(input logic [63:0] ia, input logic [63:0] ib,
                       input logic [1:0] isa, input logic [1:0] isb, input logic ic);
    real ra, rb, rs;
    exp_t e;
    ra = $bitstoreal(ftz(ia)) * ((isa[0] ? 2.0 : 1.0) * (isa[1] ? -1.0 : 1.0));
    rb = $bitstoreal(ftz(ib)) * ((isb[0] ? 0.5 : 1.0) * (isb[1] ? -1.0 : 1.0));
    rs = ra + rb;
    e.res = ftz($realtobits(rs));
    if (isnan(e.res)) e.res = FP_QNAN;
    e.flags = '0;
    if (isnan($realtobits(ra)) || isnan($realtobits(rb))) e.flags.uno = 1'b1;
    else if (ra < rb)  e.flags.lt = 1'b1;
    else if (ra > rb)  e.flags.gt = 1'b1;
    else               e.flags.eq = 1'b1;
    e.cmp  = ic;
    e.t_in = cycle;
    q.push_back(e);
    a = ia; b = ib; sa = isa; sb = isb; in_cmp = ic; in_valid = 1'b1;
  endtask

  int enabled_since [$];
  int en_count = 0;
  always @(posedge clk) if (en) en_count <= en_count + 1;

  // output checker
  int lat_phase = 1;
  always @(negedge clk) begin
    if (rst_n && en && out_valid) begin
      exp_t e;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = q.pop_front();
        checks++;
        if (out_res !== e.res || out_cmp !== e.cmp ||
            (e.cmp && out_flags !== e.flags)) begin
          failures++;
          if (failures < 10)
            $display("mismatch: got %h cmp=%b flags=%b expected %h cmp=%b flags=%b",
                     out_res, out_cmp, out_flags, e.res, e.cmp, e.flags);
        end
        if (lat_phase == 1) begin
          checks++;
          if (cycle - e.t_in != LAT) begin
            failures++;
            $display("latency %0d, expected %0d", cycle - e.t_in, LAT);
          end
        end
      end
    end
  end

  initial begin
    logic [63:0] x, y;
    en = 1'b1; in_valid = 1'b0; in_cmp = 1'b0; a = '0; b = '0; sa = '0; sb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase 1: en always high, latency checked
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      x = pick();
      if ($urandom % 4 == 0) begin
        y = {~x[63], x[62:0]};
        y[7:0] = 8'($urandom);           // near-cancelling pair
      end else if ($urandom % 6 == 0) begin
        y = x;
      end else begin
        y = pick();
      end
      issue(x, y, 2'($urandom), 2'($urandom), 1'($urandom));
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    lat_phase = 0;
    // phase 2: random stalls
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = ($urandom % 3 != 0);
      in_valid = 1'b0;
      if (en) begin
        x = pick();
        y = ($urandom % 3 == 0) ? {~x[63], x[62:8], 8'($urandom)} : pick();
        issue(x, y, 2'($urandom), 2'($urandom), 1'($urandom));
      end
    end
    @(negedge clk) begin in_valid = 1'b0; en = 1'b1; end
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("%0d results never came out", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
