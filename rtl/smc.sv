// Slave memory controller (SMC). Each SMC owns some memory banks that share
// one RD data bus. It watches the RA bus and takes the accesses whose bank it
// controls, keeps one first-in first-out queue per bank, tracks each bank's
// open row (page buffer), and drives SDRAM commands that respect the SDRAM
// timing rules:
//   ACT -> RD/WR      >= T_RCD      ACT -> PRE       >= T_RAS
//   PRE -> ACT        >= T_RP       CAS -> CAS       >= max(T_CCD, BURST)
//   last data-in beat of a write -> PRE >= T_DPL
// Read data come back from the chips T_AA cycles after RD (the chips keep that
// latency; the SMC pairs the data with the oldest outstanding read tag) and
// leave on the RD bus the same cycle.
// Row policy: a row stays open while accesses hit it; it is closed when the
// head access needs another row, or after ROW_HOLD idle cycles. Refresh: every
// REF_PERIOD cycles all banks are precharged and a REF command keeps the SMC
// busy for REF_DELAY cycles.
// Address map (this design's choice): bits [6:0] byte in the 128-byte line,
// [9:7] bank (line interleaving over eight banks, SMC = bank mod NUM_SMC),
// [13:10] column (line within a 2 KB row), [31:14] row. The timing defaults
// are the SDRAM values printed for the design; ROW_HOLD, REF_PERIOD,
// REF_DELAY, BURST and queue depth are this design's choices.
// One command per cycle is issued, banks taking turns when both are ready.
module smc
  import impulse_pkg::*;
#(
  parameter int SMC_ID     = 0,
  parameter int NUM_SMC    = 4,
  parameter int BANKS      = 2,
  parameter int BQ_DEPTH   = 8,
  parameter int T_RCD      = 3,
  parameter int T_AA       = 3,
  parameter int T_RAS      = 7,
  parameter int T_RP       = 3,
  parameter int T_CCD      = 1,
  parameter int T_DPL      = 2,
  parameter int BURST      = 4,
  parameter int ROW_HOLD   = 16,
  parameter int REF_PERIOD = 1560,
  parameter int REF_DELAY  = 8,
  localparam int BW        = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  // RA bus
  input  logic        ra_valid,
  input  mem_req_t    ra_req,
  output logic        ra_ready,
  // DRAM command pins
  output logic        cmd_valid,
  output logic [2:0]  cmd,          // 0 NOP 1 ACT 2 RD 3 WR 4 PRE 5 REF
  output logic [BW-1:0] cmd_bank,
  output logic [17:0] cmd_row,
  output logic [3:0]  cmd_col,
  output line_t       cmd_wdata,
  output mask_t       cmd_wmask,
  input  logic        dq_valid,
  input  line_t       dq_data,
  // RD bus towards the Accumulate/Mux chip
  output logic        rd_valid,
  output mem_rsp_t    rd_data,
  input  logic        stop,
  // statistics
  output logic        ev_row_hit,
  output logic        ev_row_miss,
  output logic        ev_refresh
);
  localparam logic [2:0] C_NOP = 3'd0, C_ACT = 3'd1, C_RD = 3'd2, C_WR = 3'd3,
                         C_PRE = 3'd4, C_REF = 3'd5;
  localparam int CNT_W = 12;
  localparam int CAS_GAP = (T_CCD > BURST) ? T_CCD : BURST;

  function automatic int local_bank(addr_t a);
    return int'(bank_of(a)) / NUM_SMC;
  endfunction

  // Bank queues
  localparam int QW = $bits(mem_req_t);
  logic [BANKS-1:0] q_full, q_empty, q_pop;
  mem_req_t q_head [BANKS];
  logic [QW-1:0] q_head_raw [BANKS];
  logic mine;
  int   tgt;

  assign mine     = (int'(bank_of(ra_req.addr)) % NUM_SMC) == SMC_ID;
  assign tgt      = local_bank(ra_req.addr);
  assign ra_ready = mine && !q_full[BW'(tgt)];

  for (genvar b = 0; b < BANKS; b++) begin : g_bq
    sync_fifo #(.WIDTH(QW), .DEPTH(BQ_DEPTH)) u_bq (
      .clk, .rst_n,
      .push(ra_valid && ra_ready && tgt == b), .wdata(ra_req),
      .pop(q_pop[b]), .rdata(q_head_raw[b]),
      .full(q_full[b]), .empty(q_empty[b]), .count());
    assign q_head[b] = mem_req_t'(q_head_raw[b]);
  end

  // Bank state
  logic [BANKS-1:0] open_q;
  logic [17:0] row_q [BANKS];
  logic [CNT_W-1:0] act_cnt [BANKS], pre_cnt [BANKS], wr_cnt [BANKS], idle_cnt [BANKS];
  logic [CNT_W-1:0] cas_cnt, ref_timer, ref_busy;
  logic ref_pending;

  // Per-bank desired command
  logic [2:0] want [BANKS];
  always_comb begin
    for (int b = 0; b < BANKS; b++) begin
      logic pre_ok;
      logic [17:0] hrow;
      hrow   = q_head[b].addr[31:14];
      pre_ok = act_cnt[b] >= CNT_W'(T_RAS) && wr_cnt[b] >= CNT_W'(BURST - 1 + T_DPL);
      want[b] = C_NOP;
      if (ref_busy != 0) begin
        want[b] = C_NOP;
      end else if (ref_pending) begin
        if (open_q[b] && pre_ok) want[b] = C_PRE;
      end else if (!q_empty[b]) begin
        if (!open_q[b]) begin
          if (pre_cnt[b] >= CNT_W'(T_RP)) want[b] = C_ACT;
        end else if (row_q[b] == hrow) begin
          if (act_cnt[b] >= CNT_W'(T_RCD) && cas_cnt >= CNT_W'(CAS_GAP)) begin
            if (q_head[b].write) want[b] = C_WR;
            else if (!stop) want[b] = C_RD;
          end
        end else if (pre_ok) begin
          want[b] = C_PRE;
        end
      end else if (open_q[b] && pre_ok && idle_cnt[b] >= CNT_W'(ROW_HOLD)) begin
        want[b] = C_PRE;
      end
    end
  end

  // Pick one command per cycle, round robin
  logic [BW-1:0] rr_q, pick;
  logic          any;
  logic          all_closed;
  always_comb begin
    any  = 1'b0;
    pick = '0;
    for (int i = BANKS; i >= 1; i--) begin
      int b;
      b = (int'(rr_q) + i) % BANKS;
      if (want[b] != C_NOP) begin
        any  = 1'b1;
        pick = BW'(b);
      end
    end
    all_closed = (open_q == '0);
    for (int b = 0; b < BANKS; b++) if (pre_cnt[b] < CNT_W'(T_RP)) all_closed = 1'b0;
  end

  logic do_ref;
  assign do_ref = ref_pending && ref_busy == 0 && all_closed;

  always_comb begin
    cmd_valid = 1'b0;
    cmd       = C_NOP;
    cmd_bank  = pick;
    cmd_row   = q_head[pick].addr[31:14];
    cmd_col   = q_head[pick].addr[13:10];
    cmd_wdata = q_head[pick].wdata;
    cmd_wmask = q_head[pick].wmask;
    q_pop     = '0;
    if (do_ref) begin
      cmd_valid = 1'b1;
      cmd       = C_REF;
    end else if (any) begin
      cmd_valid = 1'b1;
      cmd       = want[pick];
      if (cmd == C_PRE) cmd_row = row_q[pick];
      if (cmd == C_RD || cmd == C_WR) q_pop[pick] = 1'b1;
    end
  end

  // Outstanding read tags, in issue order
  logic [RTAG_W-1:0] tag_head;
  logic tag_empty;
  sync_fifo #(.WIDTH(RTAG_W), .DEPTH(4)) u_tags (
    .clk, .rst_n,
    .push(cmd_valid && cmd == C_RD), .wdata(q_head[pick].tag),
    .pop(dq_valid && !tag_empty), .rdata(tag_head),
    .full(), .empty(tag_empty), .count());

  assign rd_valid     = dq_valid;
  assign rd_data.tag  = tag_head;
  assign rd_data.data = dq_data;

  function automatic logic [CNT_W-1:0] sat(logic [CNT_W-1:0] v);
    return (v == '1) ? v : v + 1'b1;
  endfunction

  // Shared state: CAS spacing, refresh timer, bank round robin
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_q <= '0; cas_cnt <= '1; ref_timer <= '0; ref_busy <= '0; ref_pending <= 1'b0;
    end else begin
      cas_cnt   <= sat(cas_cnt);
      ref_busy  <= (ref_busy != 0) ? ref_busy - 1'b1 : '0;
      ref_timer <= ref_timer + 1'b1;
      if (ref_timer >= CNT_W'(REF_PERIOD - 1)) ref_pending <= 1'b1;
      if (cmd_valid && cmd != C_REF) rr_q <= pick;
      if (cmd_valid && (cmd == C_RD || cmd == C_WR)) cas_cnt <= CNT_W'(1);
      if (cmd_valid && cmd == C_REF) begin
        ref_pending <= 1'b0;
        ref_timer   <= '0;
        ref_busy    <= CNT_W'(REF_DELAY);
      end
    end
  end

  // Per-bank state: open row and the time since each command (a counter
  // reads 1 in the cycle after its command, so "cnt >= T" allows the next
  // command exactly T cycles after the first)
  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic sel;
    assign sel = cmd_valid && pick == BW'(b);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        open_q[b] <= 1'b0; row_q[b] <= '0;
        act_cnt[b] <= '1; pre_cnt[b] <= '1; wr_cnt[b] <= '1; idle_cnt[b] <= '0;
      end else begin
        act_cnt[b]  <= sat(act_cnt[b]);
        pre_cnt[b]  <= sat(pre_cnt[b]);
        wr_cnt[b]   <= sat(wr_cnt[b]);
        idle_cnt[b] <= sat(idle_cnt[b]);
        if (sel && cmd == C_ACT) begin
          open_q[b]   <= 1'b1;
          row_q[b]    <= cmd_row;
          act_cnt[b]  <= CNT_W'(1);
          idle_cnt[b] <= '0;
        end
        if (sel && (cmd == C_RD || cmd == C_WR)) idle_cnt[b] <= '0;
        if (sel && cmd == C_WR) wr_cnt[b] <= CNT_W'(1);
        if (sel && cmd == C_PRE) begin
          open_q[b]  <= 1'b0;
          pre_cnt[b] <= CNT_W'(1);
        end
      end
    end
  end

  // Statistics strobes
  assign ev_refresh  = cmd_valid && cmd == C_REF;
  assign ev_row_hit  = cmd_valid && (cmd == C_RD || cmd == C_WR) && idle_cnt[pick] != '0
                       && act_cnt[pick] != '0 && act_cnt[pick] > CNT_W'(T_RCD);
  assign ev_row_miss = cmd_valid && cmd == C_PRE && !q_empty[pick];

  a_rcd: assert property (@(posedge clk) disable iff (!rst_n)
           cmd_valid && (cmd == C_RD || cmd == C_WR) |-> open_q[cmd_bank] && act_cnt[cmd_bank] >= CNT_W'(T_RCD));
  a_rp:  assert property (@(posedge clk) disable iff (!rst_n)
           cmd_valid && cmd == C_ACT |-> !open_q[cmd_bank] && pre_cnt[cmd_bank] >= CNT_W'(T_RP));
  a_ras: assert property (@(posedge clk) disable iff (!rst_n)
           cmd_valid && cmd == C_PRE |-> act_cnt[cmd_bank] >= CNT_W'(T_RAS));
endmodule
