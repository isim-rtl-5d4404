// Non-shadow path of the MMC: the memory controller cache, the prefetcher and
// the slave address bus for ordinary (non-shadow) physical addresses.
//  - a read that hits a Valid MCache line completes from the cache;
//  - a read that hits a line being prefetched waits for that prefetch and
//    completes with its data (no second DRAM access);
//  - a read that misses goes to DRAM on SA bus 0; when its data come back on
//    SD bus 0 it completes and triggers the prefetcher;
//  - a write invalidates any matching line, goes to DRAM, and completes as
//    soon as the SA bus has taken it (a write issued to DRAM is logically
//    complete);
//  - a prefetch reserves an MCache line and is sent on SA bus 0 when no demand
//    access needs the bus; the line becomes Valid when the data return.
// One prefetch is outstanding at a time and one read may wait for it; the
// completion queue is sized so that DRAM data never have to wait (an access
// is accepted only if its completion is sure to find room). These limits are
// this design's choices. Tags towards DRAM: bit 11 = 0 (non-shadow SD bus),
// bit 10 = prefetch, bit 9 = the MMC's logically-ordered-read flag (its tag
// bit 10; the MMC leaves its bit 9 at zero), bits 8:0 = the rest of its tag.
module mc_frontend
  import impulse_pkg::*;
#(
  parameter int CPL_DEPTH = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] pf_mode,
  input  logic       queues_empty,
  input  logic       mmc_idle,
  input  logic       in_valid,
  output logic       in_ready,
  input  mmc_txn_t   in_txn,
  output logic       sa_valid,
  input  logic       sa_ready,
  output mem_req_t   sa_req,
  input  logic       sd_valid,
  input  mem_rsp_t   sd_rsp,
  output logic       cpl_valid,
  input  logic       cpl_ready,
  output cpl_t       cpl,
  output logic       ev_mc_hit,
  output logic       ev_mc_pend_hit,
  output logic       ev_mc_miss,
  output logic       ev_pf_issue,
  output logic       ev_pf_drop
);
  localparam int CW = $clog2(CPL_DEPTH + 1);
  logic lk_hit, lk_pend, pf_accept;
  line_t lk_data;
  logic pfr_valid, pfr_ready;
  addr_t pfr_addr;
  logic pf_busy_q, wt_v_q;
  addr_t pf_addr_q;
  logic [RTAG_W-1:0] wt_tag_q;
  addr_t rd_addr_q [16];
  logic [CW-1:0] out_rd_q, cpl_cnt;
  logic cpl_push, cpl_empty;
  cpl_t cpl_in;

  // DRAM returns
  logic sd_pf, sd_dem;
  assign sd_pf  = sd_valid && sd_rsp.tag[TAG_SPECIAL];
  assign sd_dem = sd_valid && !sd_rsp.tag[TAG_SPECIAL];

  // Issue path
  logic room, act_hit, act_pend, act_miss, act_write, demand_sa;
  assign room = int'(cpl_cnt) + int'(out_rd_q) + 2 <= CPL_DEPTH && !sd_valid;
  assign demand_sa = in_valid && room && (in_txn.write || (!lk_hit && !lk_pend));

  mcache u_mc (
    .clk, .rst_n,
    .lk_valid(in_valid), .lk_addr(in_txn.addr), .lk_write(in_txn.write && in_ready),
    .lk_hit, .lk_pend, .lk_data,
    .pf_valid(pfr_valid && !pf_busy_q && !demand_sa), .pf_commit(sa_ready),
    .pf_addr(pfr_addr), .pf_accept, .pf_way(),
    .fill_valid(sd_pf), .fill_addr(pf_addr_q), .fill_data(sd_rsp.data));

  always_comb begin
    act_hit   = in_valid && room && !in_txn.write && lk_hit;
    act_pend  = in_valid && room && !in_txn.write && lk_pend && !wt_v_q;
    act_miss  = in_valid && room && !in_txn.write && !lk_hit && !lk_pend && sa_ready;
    act_write = in_valid && room && in_txn.write && sa_ready;
    in_ready  = act_hit || act_pend || act_miss || act_write;
  end

  // SA bus 0: demand first, then the prefetch the MCache reserved
  always_comb begin
    sa_valid = 1'b0;
    sa_req   = '0;
    if (demand_sa) begin
      sa_valid      = 1'b1;
      sa_req.write  = in_txn.write;
      sa_req.addr   = {in_txn.addr[PA_W-1:OFF_W], {OFF_W{1'b0}}};
      sa_req.tag    = {1'b0, 1'b0, in_txn.tag[10], in_txn.tag[8:0]};
      sa_req.wmask  = '1;
      sa_req.wdata  = in_txn.wdata;
    end else if (pf_accept) begin
      sa_valid      = 1'b1;
      sa_req.addr   = pfr_addr;
      sa_req.tag    = {1'b0, 1'b1, 10'd0};
    end
  end
  logic pf_sent;
  assign pf_sent   = pf_accept && sa_ready;
  // a prefetch the MCache refuses is dropped
  assign pfr_ready = pf_sent || (pfr_valid && !pf_busy_q && !demand_sa && !pf_accept);

  prefetcher u_pf (
    .clk, .rst_n, .mode(pf_mode), .queues_empty, .mmc_idle,
    .trig_valid(sd_dem), .trig_addr(rd_addr_q[{sd_rsp.tag[9], sd_rsp.tag[2:0]}]),
    .pf_valid(pfr_valid), .pf_ready(pfr_ready), .pf_addr(pfr_addr));

  // Completions
  always_comb begin
    cpl_push = 1'b0;
    cpl_in   = '0;
    if (sd_dem) begin
      cpl_push = 1'b1;
      cpl_in.tag  = {1'b0, sd_rsp.tag[9], 1'b0, sd_rsp.tag[8:0]};
      cpl_in.data = sd_rsp.data;
    end else if (sd_pf && wt_v_q) begin
      cpl_push = 1'b1;
      cpl_in.tag  = wt_tag_q;
      cpl_in.data = sd_rsp.data;
    end else if (act_hit) begin
      cpl_push = 1'b1;
      cpl_in.tag  = in_txn.tag;
      cpl_in.data = lk_data;
    end else if (act_write) begin
      cpl_push = 1'b1;
      cpl_in.write = 1'b1;
      cpl_in.tag   = in_txn.tag;
    end
  end

  sync_fifo #(.WIDTH($bits(cpl_t)), .DEPTH(CPL_DEPTH)) u_cq (
    .clk, .rst_n, .push(cpl_push), .wdata(cpl_in), .pop(cpl_valid && cpl_ready),
    .rdata(cpl), .full(), .empty(cpl_empty), .count(cpl_cnt));
  assign cpl_valid = !cpl_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pf_busy_q <= 1'b0; pf_addr_q <= '0; wt_v_q <= 1'b0; wt_tag_q <= '0; out_rd_q <= '0;
      for (int i = 0; i < 16; i++) rd_addr_q[i] <= '0;
    end else begin
      if (pf_sent) begin
        pf_busy_q <= 1'b1;
        pf_addr_q <= pfr_addr;
      end else if (sd_pf) begin
        pf_busy_q <= 1'b0;
      end
      if (act_pend) begin
        wt_v_q   <= 1'b1;
        wt_tag_q <= in_txn.tag;
      end else if (sd_pf) begin
        wt_v_q <= 1'b0;
      end
      if (act_miss) rd_addr_q[{in_txn.tag[10], in_txn.tag[2:0]}] <= in_txn.addr;
      out_rd_q <= out_rd_q + CW'(act_miss || act_pend) - CW'(sd_dem || (sd_pf && wt_v_q));
    end
  end

  assign ev_mc_hit      = act_hit;
  assign ev_mc_pend_hit = act_pend;
  assign ev_mc_miss     = act_miss;
  assign ev_pf_issue    = pf_sent;
  assign ev_pf_drop     = pfr_valid && !pf_busy_q && !demand_sa && !pf_accept;
endmodule
