// tb_fp_mul_pipe: self-checking test of the double precision multiplier.
//
// Random normal operands, zeros, infinities and NaNs go through the pipe
// with a random result factor (x1, x2, x0.5, negate). The expected product
// comes from the simulator's own double precision arithmetic; subnormal
// operands and results count as zero, as in the multiplier. The first phase
// keeps en high and checks the 15-cycle latency; the second drops en at
// random and checks that no result is lost or reordered.
module tb_fp_mul_pipe;
  import dpfpa_pkg::*;

  localparam int unsigned LAT = 15;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        en, in_valid, out_valid;
  logic [63:0] a, b, out_res;
  mul_post_e   post;

  int checks = 0, failures = 0;
  int cycle = 0;

  fp_mul_pipe #(.LATENCY(LAT)) dut (.*);

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
    int          t_in;
  } exp_t;
  exp_t q[$];

  function automatic logic [63:0] rnd_norm(input int span);
    logic [10:0] e = 11'(1023 - span + ($urandom % (2 * span + 1)));
    return {1'($urandom), e, 20'($urandom), 32'($urandom)};
  endfunction

  function automatic logic [63:0] pick();
    int k = $urandom % 24;
    case (k)
      0: return 64'h0;
      1: return 64'h8000_0000_0000_0000;
      2: return 64'h7FF0_0000_0000_0000;
      3: return 64'hFFF0_0000_0000_0000;
      4: return 64'h7FF0_0000_0000_1234;
      5: return rnd_norm(1000);          // may overflow or underflow
      6: return FP_ONE;
      default: return rnd_norm(60);
    endcase
  endfunction

  function automatic logic isnan(input logic [63:0] v);
    return v[62:52] == 11'h7FF && v[51:0] != 0;
  endfunction

  function automatic logic [63:0] ftz(input logic [63:0] v);
    return (v[62:52] == 11'd0) ? {v[63], 63'd0} : v;
  endfunction

  task automatic issue(input logic [63:0] ia, input logic [63:0] ib, input mul_post_e ip);
    real r;
    exp_t e;
    r = $bitstoreal(ftz(ia)) * $bitstoreal(ftz(ib));
    case (ip)
      POST_DBL:  r = r * 2.0;
      POST_HALF: r = r * 0.5;
      POST_NEG:  r = -r;
      default: ;
    endcase
    e.res = ftz($realtobits(r));
    if (isnan(e.res)) e.res = FP_QNAN;
    e.t_in = cycle;
    q.push_back(e);
    a = ia; b = ib; post = ip; in_valid = 1'b1;
  endtask

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
        if (out_res !== e.res) begin
          failures++;
          if (failures < 10) $display("mismatch: got %h expected %h", out_res, e.res);
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
    en = 1'b1; in_valid = 1'b0; a = '0; b = '0; post = POST_ONE;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      issue(pick(), pick(), mul_post_e'($urandom));
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 2) @(negedge clk);
    lat_phase = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = ($urandom % 3 != 0);
      in_valid = 1'b0;
      if (en) issue(pick(), pick(), mul_post_e'($urandom));
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
