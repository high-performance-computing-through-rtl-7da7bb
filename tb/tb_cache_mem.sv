// tb_cache_mem: self-checking test of the four-bank cache.
//
// Three requesters issue random reads and writes that hold until granted.
// Each cycle the grants must follow the rule (per bank, the lowest-numbered
// requester asking for it), and every read must return, one cycle after its
// grant, the value a memory model holds. Conflicts and parallel grants to
// different banks are both counted and must both happen.
// The four banks follow the accelerator description; the interleaving and
// the fixed priority it checks are this design's own.
module tb_cache_mem;
  import dpfpa_pkg::*;
  localparam int unsigned NR = 3, NB = 4, BD = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  cache_req_t req [NR];
  cache_rsp_t rsp [NR];
  logic [63:0] model [NB*BD];
  logic [63:0] rexp [NR];
  logic        rpend [NR];
  int checks = 0, failures = 0, conflicts = 0, parallel = 0;

  cache_mem #(.NREQ(NR), .NBANK(NB), .BANK_DEPTH(BD)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < NR; r++) begin req[r] = '0; rpend[r] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill every word through requester 0
    for (int a = 0; a < NB * BD; a++) begin
      @(negedge clk);
      req[0] = '{req: 1'b1, we: 1'b1, addr: 16'(a), wdata: {$urandom, $urandom}};
      model[a] = req[0].wdata;
    end
    @(negedge clk);
    req[0] = '0;
    for (int i = 0; i < 5000; i++) begin
      int ngnt;
      @(negedge clk);
      // read data of last cycle's grants
      for (int r = 0; r < NR; r++) begin
        if (rpend[r]) begin
          checks++;
          if (!rsp[r].rvalid || rsp[r].rdata !== rexp[r]) begin
            failures++;
            if (failures < 10) $display("req %0d read %h expected %h", r, rsp[r].rdata, rexp[r]);
          end
        end else begin
          checks++;
          if (rsp[r].rvalid) begin failures++; $display("spurious rvalid %0d", r); end
        end
        rpend[r] = 0;
      end
      // new requests where the last was granted
      for (int r = 0; r < NR; r++)
        if (!req[r].req || rsp[r].gnt)
          req[r] = '{req: 1'($urandom % 4 != 0), we: 1'($urandom), addr: 16'($urandom % (NB * BD)),
                     wdata: {$urandom, $urandom}};
      #1;
      ngnt = 0;
      for (int r = 0; r < NR; r++) begin
        logic want;
        want = req[r].req;
        for (int q = 0; q < r; q++)
          if (req[q].req && req[q].addr[1:0] == req[r].addr[1:0]) want = 1'b0;
        checks++;
        if (rsp[r].gnt !== want) begin failures++; $display("grant %0d wrong", r); end
        if (req[r].req && !want) conflicts++;
        if (want) ngnt++;
      end
      if (ngnt > 1) parallel++;
      @(posedge clk);
      for (int r = 0; r < NR; r++) begin
        if (rsp[r].gnt && !req[r].we) begin rpend[r] = 1; rexp[r] = model[req[r].addr]; end
      end
      for (int r = 0; r < NR; r++) if (rsp[r].gnt && req[r].we) model[req[r].addr] = req[r].wdata;
    end
    checks++;
    if (conflicts == 0 || parallel == 0) begin failures++; $display("conflicts %0d parallel %0d", conflicts, parallel); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
