// tb_accel_unit: test of one accelerating unit on its own.
//
// The testbench plays the host and a one-bank cache. It loads the
// dipole-energy program (dipole_prog_pkg) through the host word stream,
// runs the set-up sequence on k and then the loop. The first dipoles come
// straight from the host stream; the last ones are written into the cache
// model and brought in by Memory Manager LOAD commands, and their four
// results go back by STORE commands and are read from the cache model.
// All results, the comparison flags and the energy sum are checked against
// double precision arithmetic in the simulator. With its data waiting in
// the input FIFO a pass must take exactly 83 cycles, one per microcode
// word. The cache model grants every other request, so the Memory Manager
// also waits for its bank. The unit structure and the repeat-until-next
// sequencing follow the accelerator description; the program, the cache
// model and its grant pattern are this testbench's own.
module tb_accel_unit;
  import dpfpa_pkg::*;
  import dipole_prog_pkg::*;

  localparam int ND_HOST = 6;
  localparam int ND_MM   = 3;
  localparam real K = 0.7;

  logic clk = 1'b0, rst_n = 1'b0;
  logic host_valid = 1'b0, host_ready;
  logic [63:0] host_word = '0;
  mm_cfg_t mm_cfg;
  logic cmd_valid = 1'b0, cmd_ready;
  mm_cmd_t cmd;
  logic ar_pop = 1'b0, ar_empty, lg_pop = 1'b0, lg_empty;
  logic [63:0] ar_data, lg_data;
  cache_req_t creq;
  cache_rsp_t crsp;
  unit_status_t status;
  logic busy, pass_end;
  int checks = 0, failures = 0;

  accel_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cache model: grants on odd cycles only, read data one cycle later
  logic [63:0] mem [4096];
  logic gphase = 1'b0, rv_q = 1'b0;
  logic [63:0] rd_q = '0;
  int n_bank_wait = 0;
  always_comb begin
    crsp.gnt    = creq.req && gphase;
    crsp.rvalid = rv_q;
    crsp.rdata  = rd_q;
  end
  always @(posedge clk) begin
    gphase <= !gphase;
    rv_q   <= crsp.gnt && !creq.we;
    if (crsp.gnt && !creq.we) rd_q <= mem[creq.addr[11:0]];
    if (crsp.gnt && creq.we) mem[creq.addr[11:0]] <= creq.wdata;
    if (creq.req && !crsp.gnt) n_bank_wait++;
  end

  // pass timing: cycles between two pass ends of the loop
  int cyc = 0, last_pe = -1, min_pass = 1 << 30, n_pass = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && pass_end && status.cur_op == OP_LOOP) begin
      n_pass++;
      if (last_pe >= 0 && cyc - last_pe < min_pass) min_pass = cyc - last_pe;
      last_pe <= cyc;
    end
  end

  task automatic put(input logic [63:0] w);
    @(negedge clk);
    host_word = w; host_valid = 1'b1;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    @(negedge clk);
    host_valid = 1'b0;
  endtask

  task automatic mm(input mm_op_e op, input int x, input int y, input int z);
    @(negedge clk);
    cmd = '{op: op, x: 8'(x), y: 8'(y), z: 8'(z), dx: 8'd0, dy: 8'd0, dz: 8'd0};
    cmd_valid = 1'b1;
    @(posedge clk);
    while (!cmd_ready) @(posedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  task automatic pop_ar(output logic [63:0] d);
    while (ar_empty) @(negedge clk);
    d = ar_data;
    ar_pop = 1'b1;
    @(negedge clk);
    ar_pop = 1'b0;
  endtask

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [63:0] img[$], w[$], e[$], d;
  dipole_t dp;
  real etot;

  initial begin
    etot = 0.0;
    mm_cfg = '{base: 16'd100, nx: 8'd9, ny: 8'(ND_MM), nz: 8'd2};
    cmd = '{op: MM_LOAD, default: '0};
    for (int i = 0; i < 4096; i++) mem[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    image(img);
    foreach (img[i]) put(img[i]);
    for (int i = 0; i < ND_HOST + ND_MM; i++) begin
      dp = rnd_dipole();
      if (i < ND_HOST) words(dp, w);
      else begin
        logic [63:0] t[$];
        t.delete();
        words(dp, t);
        foreach (t[f]) mem[100 + (i - ND_HOST) * 9 + f] = t[f];
      end
      expect4(dp, K, e, etot);
    end
    put(mk_exec(OP_SETUP));
    put($realtobits(K));
    while (status.in_count != 0) @(negedge clk);
    put(mk_exec(OP_LOOP));
    // host-fed dipoles: all words go in first, so the passes run back to back
    foreach (w[i]) put(w[i]);
    for (int i = 0; i < 4 * ND_HOST; i++) begin
      pop_ar(d);
      check(d, e[i], $sformatf("host result %0d", i));
    end
    // cache-fed dipoles through the Memory Manager
    for (int j = 0; j < ND_MM; j++) begin
      for (int f = 0; f < 9; f++) mm(MM_LOAD, f, j, 0);
      while (status.ar_count < 4) @(negedge clk);
      for (int q = 0; q < 4; q++) mm(MM_STORE, q, j, 1);
      while (status.mm_busy || !cmd_ready) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    for (int j = 0; j < ND_MM; j++)
      for (int q = 0; q < 4; q++)
        check(mem[100 + 9 * ND_MM + j * 9 + q], e[4 * (ND_HOST + j) + q],
              $sformatf("cache result %0d.%0d", j, q));
    // comparison flags: E <= 0 always, so "less than" or "equal"
    for (int i = 0; i < ND_HOST + ND_MM; i++) begin
      while (lg_empty) @(negedge clk);
      checks++;
      if (!(lg_data[3:0] == 4'b0001 || lg_data[3:0] == 4'b0010)) begin
        failures++; $display("flags %b", lg_data[3:0]);
      end
      lg_pop = 1'b1; @(negedge clk); lg_pop = 1'b0;
    end
    // read-out of the energy sum and halt
    put(mk_exec(OP_READ));
    put(mk_halt());
    pop_ar(d);
    check(d, $realtobits(etot), "energy sum");
    repeat (20) @(negedge clk);
    checks++;
    if (status.running) begin failures++; $display("unit did not halt"); end
    checks++;
    if (min_pass != LOOP_LEN) begin
      failures++; $display("fastest pass %0d cycles, expected %0d", min_pass, LOOP_LEN);
    end
    checks++;
    if (n_bank_wait == 0) begin failures++; $display("no bank wait"); end
    $display("passes=%0d bank_wait=%0d", n_pass, n_bank_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
