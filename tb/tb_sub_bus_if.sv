// tb_sub_bus_if: test of the host bus slave and its clock counters.
//
// The testbench drives random bus transfers at two units and the cache.
// It plays the units' side: ready and empty flags change at random, and
// result data and status words are random per unit. It also plays a cache
// port that grants at random and returns read data one cycle later. For
// each transfer it works out which strobe must rise, whether the transfer
// must wait, and what data must come back, and checks the Memory Manager
// set-up registers and commands, the busy-cycle counters and the cycle
// counter against its own counts. The clock counters come from the
// accelerator description; the bus protocol and address map checked here
// are this design's own.
module tb_sub_bus_if;
  import dpfpa_pkg::*;

  localparam int NU = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [15:0] bus_addr = '0;
  logic bus_write = 1'b0, bus_read = 1'b0, bus_wait, bus_rvalid;
  logic [63:0] bus_wdata = '0, bus_rdata;
  logic host_valid [NU], host_ready [NU];
  logic [63:0] host_word;
  mm_cfg_t mm_cfg [NU];
  logic cmd_valid [NU], cmd_ready [NU];
  mm_cmd_t cmd;
  logic ar_pop [NU], ar_empty [NU], lg_pop [NU], lg_empty [NU], unit_busy [NU];
  logic [63:0] ar_data [NU], lg_data [NU];
  unit_status_t status [NU];
  cache_req_t creq;
  cache_rsp_t crsp;
  int checks = 0, failures = 0;

  sub_bus_if #(.N_UNITS(NU)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // unit side and cache port, new random values every cycle
  logic gnt_r = 1'b0, crv_q = 1'b0;
  logic [63:0] crd_q = '0;
  logic [63:0] cmem [int];
  always_comb begin
    crsp.gnt    = creq.req && gnt_r;
    crsp.rvalid = crv_q;
    crsp.rdata  = crd_q;
  end

  int busy_cnt [NU];
  longint cyc_cnt = 0;
  always @(posedge clk) begin
    if (crsp.gnt && creq.we) cmem[int'(creq.addr)] = creq.wdata;
    crv_q <= crsp.gnt && !creq.we;
    if (crsp.gnt && !creq.we) crd_q <= cmem.exists(int'(creq.addr)) ? cmem[int'(creq.addr)] : 64'd0;
    if (rst_n) begin
      cyc_cnt++;
      for (int i = 0; i < NU; i++) if (unit_busy[i]) busy_cnt[i]++;
    end
  end

  task automatic randomize_side();
    gnt_r = ($urandom % 3) != 0;
    for (int i = 0; i < NU; i++) begin
      host_ready[i] = ($urandom % 3) != 0;
      cmd_ready[i]  = ($urandom % 3) != 0;
      ar_empty[i]   = ($urandom % 4) == 0;
      lg_empty[i]   = ($urandom % 4) == 0;
      ar_data[i]    = {$urandom, $urandom};
      lg_data[i]    = {$urandom, $urandom};
      status[i]     = unit_status_t'($urandom);
      unit_busy[i]  = $urandom % 2;
    end
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("%0t %s", $time, what);
    end
  endtask

  // one transfer; checks the strobes in every cycle it is held
  task automatic xfer(input logic wr, input logic [15:0] a, input logic [63:0] wd,
                      output logic [63:0] rd);
    int u, r;
    logic expect_wait;
    logic [63:0] want;
    bit unit_side;
    u = int'(a[11:8]);
    r = int'(a[3:0]);
    unit_side = !a[15] && u < NU;
    @(negedge clk);
    bus_addr = a; bus_wdata = wd; bus_write = wr; bus_read = !wr;
    forever begin
      randomize_side();
      #1;
      want = '0;
      if (a[15]) expect_wait = !gnt_r;
      else if (unit_side && wr && r == 0) expect_wait = !host_ready[u];
      else if (unit_side && wr && r == 5) expect_wait = !cmd_ready[u];
      else expect_wait = 1'b0;
      check(bus_wait == expect_wait, $sformatf("wait at %h", a));
      for (int i = 0; i < NU; i++) begin
        check(host_valid[i] == (unit_side && wr && r == 0 && i == u), "host_valid");
        check(cmd_valid[i]  == (unit_side && wr && r == 5 && i == u), "cmd_valid");
        check(ar_pop[i] == (unit_side && !wr && r == 1 && i == u && !ar_empty[i]), "ar_pop");
        check(lg_pop[i] == (unit_side && !wr && r == 2 && i == u && !lg_empty[i]), "lg_pop");
      end
      if (unit_side && wr && r == 0) check(host_word == wd, "host_word");
      if (unit_side && wr && r == 5)
        check(cmd.x == wd[7:0] && cmd.dz == wd[47:40] && cmd.op == mm_op_e'(wd[63]), "command");
      if (unit_side && !wr) begin
        case (r)
          0: want = 64'(status[u]);
          1: want = ar_empty[u] ? 64'd0 : ar_data[u];
          2: want = lg_empty[u] ? 64'd0 : lg_data[u];
          6: want = 64'(busy_cnt[u]);
          7: want = 64'(cyc_cnt);
          default: want = '0;
        endcase
      end
      if (a[15] && !wr) want = cmem.exists(int'({1'b0, a[14:0]})) ? cmem[int'({1'b0, a[14:0]})] : 64'd0;
      @(posedge clk);
      if (!expect_wait) break;
      @(negedge clk);
    end
    @(negedge clk);
    bus_write = 1'b0; bus_read = 1'b0;
    check(bus_rvalid == !wr, "rvalid");
    rd = bus_rdata;
    if (!wr) check(rd == want, $sformatf("read %h: got %h expected %h", a, rd, want));
  endtask

  logic [63:0] d;
  mm_cfg_t want_cfg [NU];

  initial begin
    for (int i = 0; i < NU; i++) busy_cnt[i] = 0;
    randomize_side();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NU; i++) want_cfg[i] = '{base: '0, nx: 8'd1, ny: 8'd1, nz: 8'd1};
    for (int n = 0; n < 3000; n++) begin
      logic wr;
      logic [15:0] a;
      logic [63:0] wd;
      int kind;
      wr = $urandom % 2;
      wd = {$urandom, $urandom};
      kind = $urandom % 4;
      if (kind == 0) a = 16'h8000 | 16'($urandom % 64);
      else a = 16'((($urandom % 3) << 8) | ($urandom % 8));
      // a clear of the counters is rare, so they grow large
      if (wr && !a[15] && a[3:0] == 4'd7 && ($urandom % 8) != 0) wr = 1'b0;
      xfer(wr, a, wd, d);
      if (wr && !a[15] && a[11:8] < NU) begin
        if (a[3:0] == 4'd3) want_cfg[a[8]].base = wd[CADDR_W-1:0];
        if (a[3:0] == 4'd4) begin
          want_cfg[a[8]].nx = wd[7:0]; want_cfg[a[8]].ny = wd[15:8]; want_cfg[a[8]].nz = wd[23:16];
        end
        if (a[3:0] == 4'd7) begin
          // the clear takes effect at the end of the transfer cycle
          cyc_cnt = 0;
          for (int i = 0; i < NU; i++) busy_cnt[i] = 0;
        end
      end
      for (int i = 0; i < NU; i++) check(mm_cfg[i] == want_cfg[i], "mm_cfg");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
