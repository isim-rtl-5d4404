// DRAM dispatcher. Requests arrive from the MMC on the slave address (SA)
// busses and are forwarded to the RAM address (RA) bus that reaches the slave
// memory controller of their bank; read data arrive from the Accumulate/Mux
// chips on the mux data (MD) busses and are forwarded to the slave data (SD)
// bus of the requester. When two sources want the same destination in one
// cycle, a round-robin pointer per destination picks the winner and the loser
// waits (its valid stays high until ready).
// Routing, this design's choice: RA bus = bank mod NUM_RA, so with two RA busses
// the even banks share one and the odd banks the other; SD bus = top tag bit
// (0 = non-shadow requester, 1 = the remapping controller).
// Timing: combinational, a request crosses in the cycle it is accepted.
module dram_dispatcher
  import impulse_pkg::*;
#(
  parameter int NUM_SA = 2,
  parameter int NUM_RA = 2,
  parameter int NUM_MD = 2,
  localparam int NUM_SD = 2
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NUM_SA-1:0]   sa_valid,
  input  mem_req_t            sa_req [NUM_SA],
  output logic [NUM_SA-1:0]   sa_ready,
  output logic [NUM_RA-1:0]   ra_valid,
  output mem_req_t            ra_req [NUM_RA],
  input  logic [NUM_RA-1:0]   ra_ready,
  input  logic [NUM_MD-1:0]   md_valid,
  input  mem_rsp_t            md_rsp [NUM_MD],
  output logic [NUM_MD-1:0]   md_ready,
  output logic [NUM_SD-1:0]   sd_valid,
  output mem_rsp_t            sd_rsp [NUM_SD],
  output logic                ev_contention
);
  localparam int SAW = (NUM_SA > 1) ? $clog2(NUM_SA) : 1;
  localparam int MDW = (NUM_MD > 1) ? $clog2(NUM_MD) : 1;
  logic [SAW-1:0] ra_rr [NUM_RA];
  logic [MDW-1:0] sd_rr [NUM_SD];
  logic [SAW-1:0] ra_win [NUM_RA];
  logic [MDW-1:0] sd_win [NUM_SD];
  logic [NUM_RA-1:0] ra_any;
  logic [NUM_SD-1:0] sd_any;
  logic [NUM_RA-1:0] ra_multi;
  logic [NUM_SD-1:0] sd_multi;

  function automatic int ra_of(addr_t a);
    return int'(bank_of(a)) % NUM_RA;
  endfunction

  always_comb begin
    for (int r = 0; r < NUM_RA; r++) begin
      int n;
      n = 0;
      ra_any[r] = 1'b0;
      ra_win[r] = '0;
      for (int i = NUM_SA; i >= 1; i--) begin
        int s;
        s = (int'(ra_rr[r]) + i) % NUM_SA;
        if (sa_valid[s] && ra_of(sa_req[s].addr) == r) begin
          ra_any[r] = 1'b1;
          ra_win[r] = SAW'(s);
          n++;
        end
      end
      ra_multi[r] = n > 1;
      ra_valid[r] = ra_any[r];
      ra_req[r]   = sa_req[ra_win[r]];
    end
  end

  // The ready paths sit in their own blocks: they read the destinations'
  // ready, which may depend on the forwarded request.
  always_comb begin
    for (int s = 0; s < NUM_SA; s++) begin
      int r;
      r = ra_of(sa_req[s].addr);
      sa_ready[s] = ra_any[r] && int'(ra_win[r]) == s && ra_ready[r];
    end
  end

  always_comb begin
    for (int d = 0; d < NUM_SD; d++) begin
      int n;
      n = 0;
      sd_any[d] = 1'b0;
      sd_win[d] = '0;
      for (int i = NUM_MD; i >= 1; i--) begin
        int m;
        m = (int'(sd_rr[d]) + i) % NUM_MD;
        if (md_valid[m] && int'(md_rsp[m].tag[RTAG_W-1]) == d) begin
          sd_any[d] = 1'b1;
          sd_win[d] = MDW'(m);
          n++;
        end
      end
      sd_multi[d] = n > 1;
      sd_valid[d] = sd_any[d];
      sd_rsp[d]   = md_rsp[sd_win[d]];
    end
  end

  always_comb begin
    for (int m = 0; m < NUM_MD; m++) begin
      int d;
      d = int'(md_rsp[m].tag[RTAG_W-1]);
      md_ready[m] = sd_any[d] && int'(sd_win[d]) == m;
    end
  end

  assign ev_contention = (ra_multi != '0) || (sd_multi != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_RA; r++) ra_rr[r] <= '0;
      for (int d = 0; d < NUM_SD; d++) sd_rr[d] <= '0;
    end else begin
      for (int r = 0; r < NUM_RA; r++) if (ra_valid[r] && ra_ready[r]) ra_rr[r] <= ra_win[r];
      for (int d = 0; d < NUM_SD; d++) if (sd_valid[d]) sd_rr[d] <= sd_win[d];
    end
  end
endmodule
