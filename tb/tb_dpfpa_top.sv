// tb_dpfpa_top: end-to-end test of the accelerator at its default size.
//
// A host model drives the sub bus. It loads the dipole-energy program
// (dipole_prog_pkg) into both accelerating units and then runs them at the
// same time, sharing the bus:
//   unit 0 gets its data words straight from the host stream, as long as
//          its input FIFO has room; the host holds back its reads until
//          the result FIFO is full, so the unit stalls on it;
//   unit 1 gets its data from the cache: the host first writes the dipole
//          records into the cache as a 9 x N x 2 matrix and then sends
//          Memory Manager commands, LOADs with offsets that wrap around the
//          matrix and STOREs of the four results into the z = 1 plane,
//          which the host reads back from the cache at the end; meanwhile
//          a third host thread reads the input plane back from the cache,
//          competing with the Memory Manager for the banks.
// Each unit runs set-up (fetch k), then the loop, then the read-out of the
// energy sum, switching sequences with executive instructions, and halts.
// Every result, the comparison flags and the energy sum are checked against
// double precision arithmetic in the simulator; a pass with its data
// waiting must take exactly 83 cycles. The test counts the mechanisms it
// relies on (input-FIFO stall, output-FIFO stall, cache bank wait, bus
// wait, sequence switch, pass loop, coordinate wrap, comparison) and fails
// if one never happened. The clock counters are read at the end.
// The two units, the shared cache and the clock counters follow the
// accelerator description; the dipole program, its plain schedule and the
// host traffic pattern are this testbench's own.
module tb_dpfpa_top;
  import dpfpa_pkg::*;
  import dipole_prog_pkg::*;

  localparam int ND = 12;          // dipoles per unit
  localparam real K = 0.3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] bus_addr;
  logic bus_write, bus_read, bus_wait, bus_rvalid;
  logic [63:0] bus_wdata, bus_rdata;
  logic [1:0] unit_running, unit_pass_end;
  int checks = 0, failures = 0;

  dpfpa_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ mechanism counters
  int n_in_stall = 0, n_out_stall = 0, n_bank_wait = 0, n_bus_wait = 0, n_switch = 0;
  int n_pass = 0, n_wrap = 0, n_cmp = 0;
  int cyc = 0, last_pe = -1, min_pass = 1 << 30;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      for (int u = 0; u < 2; u++) begin end
      if (dut.g_unit[0].u_unit.u_mu.stall && dut.g_unit[0].u_unit.u_mu.in_empty) n_in_stall++;
      if (dut.g_unit[1].u_unit.u_mu.stall && dut.g_unit[1].u_unit.u_mu.in_empty) n_in_stall++;
      if (dut.g_unit[0].u_unit.u_mu.stall && dut.g_unit[0].u_unit.u_mu.ar_full) n_out_stall++;
      for (int r = 0; r < 3; r++) if (dut.creq[r].req && !dut.crsp[r].gnt) n_bank_wait++;
      if ((bus_write || bus_read) && bus_wait) n_bus_wait++;
      if (unit_pass_end[0] && dut.g_unit[0].u_unit.status.cur_op == OP_LOOP) begin
        n_pass++;
        if (last_pe >= 0 && cyc - last_pe < min_pass) min_pass = cyc - last_pe;
        last_pe <= cyc;
      end
      if (unit_pass_end[1]) n_pass++;
    end
  end

  // ------------------------------------------------------------ bus master
  semaphore bus_lock = new(1);

  task automatic bus_wr(input logic [15:0] a, input logic [63:0] d);
    bus_lock.get(1);
    @(negedge clk);
    bus_addr = a; bus_wdata = d; bus_write = 1'b1;
    @(posedge clk);
    while (bus_wait) @(posedge clk);
    @(negedge clk);
    bus_write = 1'b0;
    bus_lock.put(1);
  endtask

  task automatic bus_rd(input logic [15:0] a, output logic [63:0] d);
    bus_lock.get(1);
    @(negedge clk);
    bus_addr = a; bus_read = 1'b1;
    @(posedge clk);
    while (bus_wait) @(posedge clk);
    @(negedge clk);
    bus_read = 1'b0;
    if (!bus_rvalid) begin failures++; $display("no read data"); end
    d = bus_rdata;
    bus_lock.put(1);
  endtask

  function automatic logic [15:0] ureg(input int u, input int r);
    return 16'((u << 8) | r);
  endfunction

  task automatic status(input int u, output unit_status_t s);
    logic [63:0] d;
    bus_rd(ureg(u, 0), d);
    s = unit_status_t'(d[$bits(unit_status_t)-1:0]);
  endtask

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic exec_op(input int u, input logic [5:0] op);
    bus_wr(ureg(u, 0), mk_exec(op));
    n_switch++;
  endtask

  // set-up: run the set-up sequence on k, then switch to the loop
  task automatic start(input int u);
    unit_status_t s;
    exec_op(u, OP_SETUP);
    bus_wr(ureg(u, 0), $realtobits(K));
    do status(u, s); while (s.in_count != 0);
    exec_op(u, OP_LOOP);
  endtask

  // read-out of the energy sum once the loop waits for data, then halt
  task automatic finish_unit(input int u, input real etot);
    unit_status_t s;
    logic [63:0] d;
    exec_op(u, OP_READ);
    bus_wr(ureg(u, 0), mk_halt());
    do status(u, s); while (s.ar_count == 0);
    bus_rd(ureg(u, 1), d);
    check(d, $realtobits(etot), "energy sum");
    repeat (20) @(negedge clk);
    status(u, s);
    checks++;
    if (s.running) begin failures++; $display("unit %0d did not halt", u); end
  endtask

  task automatic read_flags(input int u, input int n);
    logic [63:0] d;
    for (int i = 0; i < n; i++) begin
      bus_rd(ureg(u, 2), d);
      checks++;
      if (!(d[3:0] == 4'b0001 || d[3:0] == 4'b0010)) begin
        failures++; $display("unit %0d flags %b", u, d[3:0]);
      end
      n_cmp++;
    end
  endtask

  // ------------------------------------------------------------ unit 0: host stream
  task automatic run_unit0();
    logic [63:0] w[$], e[$], d;
    dipole_t dp;
    real etot = 0.0;
    unit_status_t s;
    int nread = 0;
    bit hold = 1;
    for (int i = 0; i < ND; i++) begin
      dp = rnd_dipole();
      words(dp, w);
      expect4(dp, K, e, etot);
    end
    start(0);
    // the first three dipoles go in at once, so their passes run back to back
    for (int i = 0; i < 27; i++) bus_wr(ureg(0, 0), w.pop_front());
    u0_primed = 1;
    // send words while the input FIFO has room; hold the reads back until
    // the result FIFO has been seen full, so the unit stalls on it
    while (w.size() != 0 || nread < 4 * ND) begin
      status(0, s);
      if (hold && s.ar_count == 8'(dut.OUT_DEPTH)) begin
        hold = 0;
        repeat (120) @(negedge clk);
      end
      if (w.size() != 0 && s.in_count < 8'(dut.IN_DEPTH)) bus_wr(ureg(0, 0), w.pop_front());
      if (!hold && s.ar_count != 0) begin
        bus_rd(ureg(0, 1), d);
        check(d, e[nread], $sformatf("unit 0 result %0d", nread));
        nread++;
      end
    end
    read_flags(0, ND);
    finish_unit(0, etot);
  endtask

  // ------------------------------------------------------------ unit 1: cache and Memory Manager
  function automatic logic [63:0] mmcmd(input logic st, input int x, input int y, input int z,
                                        input int dx, input int dy, input int dz);
    return {st, 15'd0, 8'(dz), 8'(dy), 8'(dx), 8'(z), 8'(y), 8'(x)};
  endfunction

  logic [63:0] cache_in [int];
  bit unit1_done = 0;
  bit u0_primed = 0;

  // a host thread that keeps reading the input plane while unit 1 works,
  // so its Memory Manager and the host meet on the same cache bank
  task automatic poll_cache();
    logic [63:0] d;
    int a;
    while (cache_in.size() == 0) @(negedge clk);
    while (!unit1_done) begin
      a = int'($urandom % cache_in.size());
      bus_rd(16'h8000 | 16'(a), d);
      check(d, cache_in[a], "cache word");
    end
  endtask

  task automatic run_unit1();
    logic [63:0] w[$], e[$], d;
    dipole_t dp;
    real etot = 0.0;
    int nx = 9, ny = ND, nz = 2;
    wait (u0_primed);
    for (int i = 0; i < ND; i++) begin
      dp = rnd_dipole();
      w.delete();
      words(dp, w);
      for (int f = 0; f < 9; f++) bus_wr(16'h8000 | 16'(i * nx + f), w[f]);
      for (int f = 0; f < 9; f++) cache_in[i * nx + f] = w[f];
      expect4(dp, K, e, etot);
    end
    bus_wr(ureg(1, 3), 64'd0);
    bus_wr(ureg(1, 4), 64'((nz << 16) | (ny << 8) | nx));
    start(1);
    for (int i = 0; i < ND; i++) begin
      for (int f = 0; f < 9; f++) begin
        // reach x = f from x = 8 - (i % 3) with an offset that may wrap
        int x0 = 8 - (i % 3);
        int dx = f - x0;
        if (dx < 0 && (i % 2 == 0)) dx = dx + nx;      // forward across the edge
        if (x0 + dx >= nx || x0 + dx < 0) n_wrap++;
        bus_wr(ureg(1, 5), mmcmd(1'b0, x0, (i + 1) % ny, 1, dx, -1, -1));
        // read the same word while the Memory Manager fetches it
        bus_rd(16'h8000 | 16'(i * nx + f), d);
        check(d, cache_in[i * nx + f], "cache word");
      end
      for (int r = 0; r < 4; r++) bus_wr(ureg(1, 5), mmcmd(1'b1, r, i, 0, 0, 0, 1));
    end
    // wait until the last store is done
    begin
      unit_status_t s;
      do status(1, s); while (s.mm_busy);
    end
    unit1_done = 1;
    for (int i = 0; i < ND; i++)
      for (int r = 0; r < 4; r++) begin
        bus_rd(16'h8000 | 16'(nx * ny + i * nx + r), d);
        check(d, e[4 * i + r], $sformatf("unit 1 result %0d", 4 * i + r));
      end
    read_flags(1, ND);
    finish_unit(1, etot);
  endtask

  initial begin
    logic [63:0] img[$], d, busy0, cycles;
    bus_addr = '0; bus_write = 0; bus_read = 0; bus_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    image(img);
    foreach (img[i]) begin
      bus_wr(ureg(0, 0), img[i]);
      bus_wr(ureg(1, 0), img[i]);
    end
    bus_wr(ureg(0, 7), 64'd0);                 // clear the clock counters
    fork
      run_unit0();
      run_unit1();
      poll_cache();
    join
    bus_rd(ureg(0, 6), busy0);
    bus_rd(ureg(0, 7), cycles);
    $display("unit 0 executed microcode in %0d of %0d cycles", busy0, cycles);
    checks++;
    if (busy0 < 64'(ND * LOOP_LEN) || busy0 > cycles) begin failures++; $display("clock counter wrong"); end
    checks++;
    if (min_pass != LOOP_LEN) begin failures++; $display("fastest pass %0d cycles, expected %0d", min_pass, LOOP_LEN); end
    $display("in_stall=%0d out_stall=%0d bank_wait=%0d bus_wait=%0d switch=%0d pass=%0d wrap=%0d cmp=%0d",
             n_in_stall, n_out_stall, n_bank_wait, n_bus_wait, n_switch, n_pass, n_wrap, n_cmp);
    checks++;
    if (n_in_stall == 0 || n_out_stall == 0 || n_bank_wait == 0 || n_bus_wait == 0 ||
        n_switch == 0 || n_pass == 0 || n_wrap == 0 || n_cmp == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
