// tb_mem_manager: self-checking test of the Memory Manager.
//
// The manager is connected to a cache (requester 1) that the testbench
// fills through requester 0, which has priority, with a known pattern and then keeps busy with
// random reads, so the manager sometimes waits for its bank. Random LOAD
// commands at random lattice positions with offsets of up to one side (so
// that coordinates wrap around) must push the word at
//   base + ((z+dz) mod nz)*nx*ny + ((y+dy) mod ny)*nx + ((x+dx) mod nx)
// into the input FIFO, which is full at random times. Random STORE commands
// must pop the next result of a model arithmetic FIFO and leave it at the
// same kind of address, checked by reading the cache back.
module tb_mem_manager;
  import dpfpa_pkg::*;
  localparam int unsigned AW = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  mm_cfg_t cfg;
  mm_cmd_t cmd;
  logic cmd_valid, cmd_ready, in_push, in_full, ar_pop, ar_empty, busy;
  logic [63:0] in_data, ar_data;
  cache_req_t creq, req [2];
  cache_rsp_t crsp, rsp [2];
  int checks = 0, failures = 0, waits = 0, wraps = 0;

  mem_manager #(.CACHE_AW(AW)) dut (.*);
  cache_mem #(.NREQ(2), .NBANK(4), .BANK_DEPTH(256)) u_cache (.clk, .rst_n, .req, .rsp);
  assign req[1] = creq;
  assign crsp   = rsp[1];
  cache_req_t hreq;
  assign req[0] = hreq;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] arq[$];
  assign ar_empty = (arq.size() == 0);
  assign ar_data  = ar_empty ? 64'd0 : arq[0];
  always @(posedge clk) if (ar_pop) void'(arq.pop_front());

  logic [63:0] model [1024];
  logic [63:0] pushed[$];
  always @(posedge clk) if (in_push) pushed.push_back(in_data);
  always @(posedge clk) if (creq.req && !crsp.gnt) waits++;

  function automatic int md(input int v, input int n);
    return ((v % n) + n) % n;
  endfunction

  function automatic int exp_addr(input mm_cfg_t c, input mm_cmd_t m);
    return int'(c.base) + md(int'(m.z) + int'(m.dz), int'(c.nz)) * int'(c.nx) * int'(c.ny)
         + md(int'(m.y) + int'(m.dy), int'(c.ny)) * int'(c.nx) + md(int'(m.x) + int'(m.dx), int'(c.nx));
  endfunction

  function automatic logic [63:0] pat(input int a);
    return {32'hCAFE0000 | 32'(a), 32'(a * 7)};
  endfunction

  logic interfere = 1'b0;
  always @(negedge clk) begin
    if (interfere) begin
      if (!hreq.req || rsp[0].gnt) hreq = '{req: 1'($urandom % 2), we: 1'b0, addr: 16'($urandom % 1024), wdata: '0};
    end
    in_full = ($urandom % 3 == 0);
  end

  task automatic host_rw(input logic we, input int a, input logic [63:0] d, output logic [63:0] q);
    @(negedge clk);
    hreq = '{req: 1'b1, we: we, addr: 16'(a), wdata: d};
    @(posedge clk);
    while (!rsp[0].gnt) @(posedge clk);
    @(negedge clk);
    hreq = '0;
    q = rsp[0].rdata;
  endtask

  initial begin
    logic [63:0] q;
    cmd_valid = 0; cmd = '0; hreq = '0; in_full = 0;
    cfg = '{base: 16'd100, nx: 8'd6, ny: 8'd5, nz: 8'd7};
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 1024; a++) begin host_rw(1'b1, a, pat(a), q); model[a] = pat(a); end
    interfere = 1'b1;
    for (int i = 0; i < 600; i++) begin
      mm_cmd_t m;
      int ea, np;
      logic [63:0] sv;
      m.op = mm_op_e'($urandom % 3 == 0);
      m.x = 8'($urandom % cfg.nx); m.y = 8'($urandom % cfg.ny); m.z = 8'($urandom % cfg.nz);
      m.dx = 8'(int'($urandom % (2 * cfg.nx - 1)) - int'(cfg.nx) + 1);
      m.dy = 8'(int'($urandom % (2 * cfg.ny - 1)) - int'(cfg.ny) + 1);
      m.dz = 8'(int'($urandom % (2 * cfg.nz - 1)) - int'(cfg.nz) + 1);
      ea = exp_addr(cfg, m);
      if (int'(m.x) + int'(m.dx) < 0 || int'(m.x) + int'(m.dx) >= int'(cfg.nx)) wraps++;
      sv = {$urandom, $urandom};
      if (m.op == MM_STORE) arq.push_back(sv);
      np = pushed.size();
      @(negedge clk);
      cmd = m; cmd_valid = 1;
      @(posedge clk);
      @(negedge clk);
      cmd_valid = 0;
      while (!cmd_ready) @(negedge clk);
      if (m.op == MM_LOAD) begin
        checks++;
        if (pushed.size() != np + 1 || pushed[np] !== model[ea]) begin
          failures++;
          if (failures < 10) $display("load %0d: got %h expected %h", i, pushed[pushed.size()-1], model[ea]);
        end
      end else begin
        interfere = 1'b0;
        @(negedge clk);
        hreq = '0;
        host_rw(1'b0, ea, '0, q);
        model[ea] = sv;
        checks++;
        if (q !== sv || arq.size() != 0) begin
          failures++;
          if (failures < 10) $display("store %0d: read back %h expected %h", i, q, sv);
        end
        interfere = 1'b1;
      end
    end
    $display("waits=%0d wraps=%0d", waits, wraps);
    checks++;
    if (waits == 0 || wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
