// cache_mem: the four-bank cache memory shared by the accelerating units
// and the host.
//
// NBANK banks of BANK_DEPTH 64-bit words, interleaved on the low address
// bits, so requests to different banks are served in the same cycle. NREQ
// requesters (the Memory Managers of the units, then the host) each present
// one request; for each bank the lowest-numbered requester that addresses
// it is granted (gnt in the same cycle) and the others wait. Read data come
// back one cycle after the grant, with rvalid. The four banks follow the
// accelerator description; the interleaving, the fixed priority and the
// default depth of 1024 words per bank are this design's choices.
module cache_mem
  import dpfpa_pkg::*;
#(
  parameter int unsigned NREQ       = 3,
  parameter int unsigned NBANK      = 4,
  parameter int unsigned BANK_DEPTH = 1024
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cache_req_t req [NREQ],
  output cache_rsp_t rsp [NREQ]
);

  localparam int unsigned BW = $clog2(NBANK);
  localparam int unsigned RW = $clog2(BANK_DEPTH);
  localparam int unsigned GW = (NREQ > 1) ? $clog2(NREQ) : 1;

  initial assert (BW + RW <= CADDR_W) else $error("cache_mem: cache larger than the address field");

  logic [63:0] bank_q [NBANK];

  logic [NBANK-1:0] b_act, b_we;
  logic [GW-1:0]    b_who [NBANK];
  logic [NREQ-1:0]  gnt;
  logic [NREQ-1:0]  rd_q;
  logic [BW-1:0]    rbank_q [NREQ];

  function automatic logic [BW-1:0] bank_of(input logic [CADDR_W-1:0] a);
    return a[BW-1:0];
  endfunction

  // a requester is granted unless a lower-numbered one wants the same bank
  always_comb begin
    for (int r = 0; r < NREQ; r++) begin
      gnt[r] = req[r].req;
      for (int q = 0; q < r; q++)
        if (req[q].req && bank_of(req[q].addr) == bank_of(req[r].addr)) gnt[r] = 1'b0;
    end
  end

  // the granted requester of each bank drives it
  always_comb begin
    for (int b = 0; b < NBANK; b++) begin
      b_act[b] = 1'b0;
      b_we[b]  = 1'b0;
      b_who[b] = '0;
      for (int r = NREQ - 1; r >= 0; r--) begin
        if (gnt[r] && bank_of(req[r].addr) == BW'(b)) begin
          b_act[b] = 1'b1;
          b_we[b]  = req[r].we;
          b_who[b] = GW'(r);
        end
      end
    end
  end

  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    cache_bank #(.DEPTH(BANK_DEPTH)) u_bank (
      .clk,
      .en   (b_act[b]),
      .we   (b_we[b]),
      .addr (req[b_who[b]].addr[BW +: RW]),
      .wdata(req[b_who[b]].wdata),
      .rdata(bank_q[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q <= '0;
      for (int r = 0; r < NREQ; r++) rbank_q[r] <= '0;
    end else begin
      for (int r = 0; r < NREQ; r++) begin
        rd_q[r]    <= gnt[r] && !req[r].we;
        rbank_q[r] <= bank_of(req[r].addr);
      end
    end
  end

  always_comb begin
    for (int r = 0; r < NREQ; r++) begin
      rsp[r].gnt    = gnt[r];
      rsp[r].rvalid = rd_q[r];
      rsp[r].rdata  = bank_q[rbank_q[r]];
    end
  end
endmodule
