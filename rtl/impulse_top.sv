// Impulse adaptable memory system: the master memory controller (MMC) with
// its memory controller cache and remapping controller, and the DRAM
// scheduler (dispatcher, slave memory controllers, Accumulate/Mux chips) in
// the configuration of two SA/SD/RA/MD busses, four SMCs and eight banks.
//
//   system bus -> mmc_core (wait/read/ready queues) -> issue
//      non-shadow (address bit 31 = 0) -> mc_frontend (MCache, prefetch) -> SA bus 0
//      shadow     (address bit 31 = 1) -> remap_controller (descriptors, MTLB) -> SA bus 1
//   SA busses -> dram_dispatcher -> RA bus (bank mod 2) -> smc (bank mod 4)
//   smc RD busses -> accum_mux (one per RA side) -> MD busses -> dram_dispatcher
//      -> SD bus 0 (non-shadow) / SD bus 1 (shadow) -> completions -> mmc_core
//   mmc_core data return queue -> system bus when bus_arbiter grants the MMC
//
// The DRAM chips, processors and I/O adapters are not part of this design:
// the SMCs' command and data pins and the bus modules' request, coherency and
// transaction signals are ports. Coherency reports arrive on coh_valid /
// coh_status, one report per coherent transaction per module, in bus order.
// A transaction on bus_* is taken in the cycle bus_valid is high; the bus
// modules must respect client_op. Read data leave on dr_* in the cycles the
// arbiter has made the MMC the bus owner.
// The shadow region (address bit 31) and the bus numbering are this design's
// choices; the topology is the one the source design draws.
module impulse_top
  import impulse_pkg::*;
#(
  parameter int         NUM_DESC   = 7,
  parameter int         NUM_CPU    = 2,
  parameter logic [3:0] PF_MODE    = 4'd1,
  parameter int         REF_PERIOD = 1560
) (
  input  logic        clk,
  input  logic        rst_n,
  // system memory bus: transactions towards the MMC
  input  logic        bus_valid,
  input  bus_hdr_t    bus_hdr,
  input  line_t       bus_wdata,
  output client_op_e  client_op,
  // coherency reports (COH_IN0..3)
  input  logic [3:0]  coh_valid,
  input  coh_e        coh_status [4],
  // arbitration
  input  logic               ioa_req,
  input  logic [NUM_CPU-1:0] cpu_req,
  input  logic               long_req,
  output logic               owner_valid,
  output logic [$clog2(NUM_CPU+2)-1:0] owner,
  // data return
  output logic        dr_valid,
  output data_ret_t   dr,
  // DRAM pins of the four SMCs
  output logic        dram_cmd_valid [4],
  output logic [2:0]  dram_cmd       [4],
  output logic        dram_bank      [4],
  output logic [17:0] dram_row       [4],
  output logic [3:0]  dram_col       [4],
  output line_t       dram_wdata     [4],
  output mask_t       dram_wmask     [4],
  input  logic        dram_dq_valid  [4],
  input  line_t       dram_dq        [4],
  // status
  output logic        mtlb_exception,
  output logic [31:0] ev
);
  // ---------------- MMC queue core ----------------
  logic        cfg_we;
  logic [4:0]  cfg_reg;
  logic [31:0] cfg_data;
  logic        cr_valid, cr_pop;
  coh_e        cr;
  logic        iss_valid, iss_ready;
  mmc_txn_t    iss;
  logic        rsp_valid;
  cpl_t        rsp;
  logic        dr_ready, queues_empty, mmc_idle;
  logic [6:0]  ev_mmc;

  coh_collector #(.NUM_MODULES(4)) u_coh (
    .clk, .rst_n, .coh_valid, .coh_status, .res_valid(cr_valid), .res(cr), .pop(cr_pop));

  mmc_core u_mmc (
    .clk, .rst_n, .bus_valid, .bus_hdr, .bus_wdata, .client_op,
    .cfg_we, .cfg_reg, .cfg_data,
    .coh_valid(cr_valid), .coh_res(cr), .coh_pop(cr_pop),
    .iss_valid, .iss_ready, .iss, .rsp_valid, .rsp,
    .dr_valid, .dr_ready, .dr, .queues_empty, .idle(mmc_idle),
    .ev_conflict(ev_mmc[0]), .ev_late_conflict(ev_mmc[1]), .ev_cpy_discard(ev_mmc[2]),
    .ev_oflow_issue(ev_mmc[3]), .ev_slave_full(ev_mmc[4]), .ev_copyout_only(ev_mmc[5]),
    .ev_deny_all(ev_mmc[6]));

  bus_arbiter #(.NUM_CPU(NUM_CPU)) u_barb (
    .clk, .rst_n, .mmc_req(dr_valid), .ioa_req, .cpu_req, .long_req, .owner_valid, .owner);
  assign dr_ready = owner_valid && owner == '0;

  // ---------------- shadow / non-shadow split ----------------
  logic is_shadow;
  logic fe_in_ready, rc_in_ready;
  assign is_shadow = iss.addr[PA_W-1];
  assign iss_ready = is_shadow ? rc_in_ready : fe_in_ready;

  logic     sa_valid [2];
  logic     sa_ready [2];
  mem_req_t sa_req   [2];
  logic     sd_valid [2];
  mem_rsp_t sd_rsp   [2];
  logic     fe_cpl_v, rc_cpl_v, fe_cpl_r, rc_cpl_r;
  cpl_t     fe_cpl, rc_cpl;
  logic [4:0] ev_fe;
  logic [4:0] ev_rc;

  mc_frontend u_fe (
    .clk, .rst_n, .pf_mode(PF_MODE), .queues_empty, .mmc_idle,
    .in_valid(iss_valid && !is_shadow), .in_ready(fe_in_ready), .in_txn(iss),
    .sa_valid(sa_valid[0]), .sa_ready(sa_ready[0]), .sa_req(sa_req[0]),
    .sd_valid(sd_valid[0]), .sd_rsp(sd_rsp[0]),
    .cpl_valid(fe_cpl_v), .cpl_ready(fe_cpl_r), .cpl(fe_cpl),
    .ev_mc_hit(ev_fe[0]), .ev_mc_pend_hit(ev_fe[1]), .ev_mc_miss(ev_fe[2]),
    .ev_pf_issue(ev_fe[3]), .ev_pf_drop(ev_fe[4]));

  remap_controller #(.NUM_DESC(NUM_DESC)) u_rc (
    .clk, .rst_n, .cfg_we, .cfg_reg, .cfg_data,
    .in_valid(iss_valid && is_shadow), .in_ready(rc_in_ready), .in_txn(iss),
    .mem_valid(sa_valid[1]), .mem_ready(sa_ready[1]), .mem_req(sa_req[1]),
    .ret_valid(sd_valid[1]), .ret(sd_rsp[1]),
    .cpl_valid(rc_cpl_v), .cpl_ready(rc_cpl_r), .cpl(rc_cpl),
    .exception(mtlb_exception), .ev_mtlb_hit(ev_rc[0]), .ev_mtlb_miss(ev_rc[1]),
    .ev_mtlb_wb(ev_rc[2]), .ev_gather(ev_rc[3]), .ev_scatter(ev_rc[4]));

  // completions into the MMC, the two paths taking turns
  logic cg_v;
  logic cg;
  rr_arbiter #(.N(2)) u_carb (
    .clk, .rst_n, .req({rc_cpl_v, fe_cpl_v}), .advance(1'b1), .grant_valid(cg_v), .grant(cg));
  assign rsp_valid = cg_v;
  assign rsp       = cg ? rc_cpl : fe_cpl;
  assign fe_cpl_r  = cg_v && !cg;
  assign rc_cpl_r  = cg_v && cg;

  // ---------------- DRAM scheduler ----------------
  logic [1:0] sa_v_vec, sa_r_vec, ra_valid, ra_ready, md_valid, md_ready, sd_v_vec;
  mem_req_t   ra_req [2];
  mem_rsp_t   md_rsp [2];
  logic       ev_disp;
  assign sa_v_vec = {sa_valid[1], sa_valid[0]};
  assign sa_ready[0] = sa_r_vec[0];
  assign sa_ready[1] = sa_r_vec[1];
  assign sd_valid[0] = sd_v_vec[0];
  assign sd_valid[1] = sd_v_vec[1];

  dram_dispatcher u_disp (
    .clk, .rst_n, .sa_valid(sa_v_vec), .sa_req, .sa_ready(sa_r_vec),
    .ra_valid, .ra_req, .ra_ready, .md_valid, .md_rsp, .md_ready,
    .sd_valid(sd_v_vec), .sd_rsp, .ev_contention(ev_disp));

  logic [3:0] smc_ra_ready, rd_v, stop_s;
  mem_rsp_t   rd_d [4];
  logic [3:0] ev_hit_s, ev_miss_s, ev_ref_s;

  for (genvar s = 0; s < 4; s++) begin : g_smc
    smc #(.SMC_ID(s), .NUM_SMC(4), .BANKS(2), .REF_PERIOD(REF_PERIOD)) u_smc (
      .clk, .rst_n,
      .ra_valid(ra_valid[s % 2]), .ra_req(ra_req[s % 2]), .ra_ready(smc_ra_ready[s]),
      .cmd_valid(dram_cmd_valid[s]), .cmd(dram_cmd[s]), .cmd_bank(dram_bank[s]),
      .cmd_row(dram_row[s]), .cmd_col(dram_col[s]), .cmd_wdata(dram_wdata[s]),
      .cmd_wmask(dram_wmask[s]), .dq_valid(dram_dq_valid[s]), .dq_data(dram_dq[s]),
      .rd_valid(rd_v[s]), .rd_data(rd_d[s]), .stop(stop_s[s]),
      .ev_row_hit(ev_hit_s[s]), .ev_row_miss(ev_miss_s[s]), .ev_refresh(ev_ref_s[s]));
  end
  assign ra_ready[0] = smc_ra_ready[0] | smc_ra_ready[2];
  assign ra_ready[1] = smc_ra_ready[1] | smc_ra_ready[3];

  for (genvar m = 0; m < 2; m++) begin : g_am
    mem_rsp_t am_in [2];
    logic     am_stop;
    assign am_in[0] = rd_d[m];
    assign am_in[1] = rd_d[m + 2];
    accum_mux #(.NUM_RD(2)) u_am (
      .clk, .rst_n, .rd_valid({rd_v[m + 2], rd_v[m]}), .rd_data(am_in),
      .md_valid(md_valid[m]), .md_ready(md_ready[m]), .md_data(md_rsp[m]), .stop(am_stop));
    assign stop_s[m]     = am_stop;
    assign stop_s[m + 2] = am_stop;
  end

  // event strobes, one bit each:
  //  0 conflict (read reissued)  1 conflict found by an issued write
  //  2 COH_CPY discard           3 ready queue issued ahead of reads
  //  4 slave queue full          5 client_op copyouts only
  //  6 client_op deny all        7 MCache hit
  //  8 MCache hit on prefetching line  9 MCache miss
  // 10 prefetch issued          11 prefetch dropped
  // 12 MTLB hit  13 MTLB miss  14 MTLB write-back  15 gather done  16 scatter done
  // 17 dispatcher contention    18 row hit  19 row conflict precharge  20 refresh
  // 21 Accumulate/Mux stop      22 data return on the bus
  assign ev = {9'd0,
               dr_valid && dr_ready,
               stop_s != '0,
               ev_ref_s != '0, ev_miss_s != '0, ev_hit_s != '0,
               ev_disp, ev_rc, ev_fe, ev_mmc};
endmodule
