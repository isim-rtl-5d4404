// Impulse remapping controller. Shadow transactions coming from the read or
// ready queue are matched against the shadow regions of NUM_DESC shadow
// descriptors and queued first-in first-out in front of the matching
// descriptor (one transaction per descriptor at a time). The descriptors
// share one MTLB through a round-robin arbiter; the MTLB's output is the
// controller's slave address bus (SA bus) into the DRAM scheduler, and data
// coming back on the slave data bus are routed by tag to the MTLB (page-table
// fills), to a descriptor's indirection-vector buffer or to its assembly
// logic. Completed transactions (a gathered dense line, or a finished scatter)
// leave on cpl_*, descriptors taking turns.
// Programming: the control registers of all descriptors share the same
// addresses. Register 31 selects the descriptor; registers 0-11 then write its
// control registers (see shadow_descriptor). A transaction whose address lies
// in no enabled region completes at once with zero data, a choice of this
// design.
module remap_controller
  import impulse_pkg::*;
#(
  parameter int NUM_DESC = 7,
  parameter int DQ_DEPTH = 8,
  parameter int MTLB_ENTRIES = 32,
  parameter int MTLB_WAYS    = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [4:0]  cfg_reg,
  input  logic [31:0] cfg_data,
  input  logic        in_valid,
  output logic        in_ready,
  input  mmc_txn_t    in_txn,
  output logic        mem_valid,
  input  logic        mem_ready,
  output mem_req_t    mem_req,
  input  logic        ret_valid,
  input  mem_rsp_t    ret,
  output logic        cpl_valid,
  input  logic        cpl_ready,
  output cpl_t        cpl,
  output logic        exception,
  output logic        ev_mtlb_hit,
  output logic        ev_mtlb_miss,
  output logic        ev_mtlb_wb,
  output logic        ev_gather,
  output logic        ev_scatter
);
  localparam int DW = $clog2(NUM_DESC + 1);
  localparam int TW = $bits(mmc_txn_t);

  logic [2:0] sel_q;
  desc_cfg_t  cfgs [NUM_DESC];
  logic [NUM_DESC-1:0] match, q_full, q_empty, d_req_ready, tl_v, done_v, d_pop;
  mmc_txn_t   q_head [NUM_DESC];
  logic [TW-1:0] q_head_raw [NUM_DESC];
  tl_req_t    tls [NUM_DESC];
  cpl_t       dones [NUM_DESC];
  logic       nm_v_q;
  cpl_t       nm_q;
  logic [DW-1:0] tsel, csel;
  logic       tg_v, cg_v;
  logic       tl_ready_m;
  tl_req_t    tl_m;
  logic [$clog2(NUM_DESC)-1:0] tsel_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_q <= '0;
    else if (cfg_we && cfg_reg == 5'd31) sel_q <= cfg_data[2:0];
  end

  // Region match
  logic any_match;
  int   mi;
  always_comb begin
    any_match = 1'b0;
    mi = 0;
    for (int d = NUM_DESC - 1; d >= 0; d--) begin
      match[d] = cfgs[d].enable && in_txn.addr >= cfgs[d].saddr_start && in_txn.addr < cfgs[d].saddr_end;
      if (match[d]) begin
        any_match = 1'b1;
        mi = d;
      end
    end
    in_ready = any_match ? !q_full[mi] : !nm_v_q;
  end

  for (genvar d = 0; d < NUM_DESC; d++) begin : g_d
    sync_fifo #(.WIDTH(TW), .DEPTH(DQ_DEPTH)) u_q (
      .clk, .rst_n,
      .push(in_valid && in_ready && any_match && mi == d), .wdata(in_txn),
      .pop(d_pop[d]), .rdata(q_head_raw[d]),
      .full(q_full[d]), .empty(q_empty[d]), .count());
    assign q_head[d] = mmc_txn_t'(q_head_raw[d]);
    assign d_pop[d]  = !q_empty[d] && d_req_ready[d];

    shadow_descriptor #(.DESC_ID(d)) u_desc (
      .clk, .rst_n,
      .cfg_we(cfg_we && cfg_reg != 5'd31 && int'(sel_q) == d), .cfg_reg(cfg_reg[3:0]),
      .cfg_data, .cfg(cfgs[d]),
      .req_valid(!q_empty[d]), .req_ready(d_req_ready[d]), .req(q_head[d]),
      .tl_valid(tl_v[d]), .tl_ready(tl_ready_m && tg_v && tsel_i == d), .tl(tls[d]),
      .ret_valid(ret_valid && ret.tag[TAG_SHADOW] && int'(ret.tag[9:7]) == d
                 && !(ret.tag[TAG_SPECIAL] && ret.tag[9:7] == DESC_MTLB)),
      .ret_iv(ret.tag[TAG_SPECIAL]), .ret_k(ret.tag[6:0]), .ret_data(ret.data),
      .done_valid(done_v[d]), .done_ready(cpl_ready && cg_v && int'(csel) == d), .done(dones[d]));
  end

  // MTLB arbitration
  rr_arbiter #(.N(NUM_DESC)) u_tarb (
    .clk, .rst_n, .req(tl_v), .advance(tl_ready_m),
    .grant_valid(tg_v), .grant(tsel_i));
  assign tsel = DW'(tsel_i);
  assign tl_m = tls[tsel_i];

  mtlb #(.ENTRIES(MTLB_ENTRIES), .WAYS(MTLB_WAYS)) u_mtlb (
    .clk, .rst_n,
    .in_valid(tg_v), .in_ready(tl_ready_m), .in_req(tl_m),
    .out_valid(mem_valid), .out_ready(mem_ready), .out_req(mem_req),
    .fill_valid(ret_valid && ret.tag[TAG_SPECIAL] && ret.tag[9:7] == DESC_MTLB),
    .fill_data(ret.data),
    .exception, .ev_hit(ev_mtlb_hit), .ev_miss(ev_mtlb_miss), .ev_buf_hit(), .ev_writeback(ev_mtlb_wb));

  // Completions
  logic [NUM_DESC:0] creq;
  logic [$clog2(NUM_DESC+1)-1:0] csel_i;
  assign creq = {nm_v_q, done_v};
  rr_arbiter #(.N(NUM_DESC + 1)) u_carb (
    .clk, .rst_n, .req(creq), .advance(cpl_ready),
    .grant_valid(cg_v), .grant(csel_i));
  assign csel      = csel_i;
  assign cpl_valid = cg_v;
  assign cpl       = (int'(csel) == NUM_DESC) ? nm_q : dones[csel_i[$clog2(NUM_DESC)-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nm_v_q <= 1'b0; nm_q <= '0;
    end else begin
      if (in_valid && in_ready && !any_match) begin
        nm_v_q     <= 1'b1;
        nm_q.write <= in_txn.write;
        nm_q.tag   <= in_txn.tag;
        nm_q.data  <= '0;
      end else if (cpl_ready && cg_v && int'(csel) == NUM_DESC) begin
        nm_v_q <= 1'b0;
      end
    end
  end

  assign ev_gather  = cpl_valid && cpl_ready && !cpl.write;
  assign ev_scatter = cpl_valid && cpl_ready && cpl.write;
endmodule
