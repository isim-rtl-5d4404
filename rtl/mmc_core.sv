// Queue core of the Impulse master memory controller (MMC).
// Transactions from the system memory bus are kept in queues:
//  - wait queue: every transaction except copyouts, handled strictly in order
//    at its head; this is the logically ordered path;
//  - read queue: a second copy of every read (a "fast read"), sent to memory
//    at once without waiting for coherency checks;
//  - ready queue: copyouts straight from the bus, writes leaving the wait
//    queue, and at most one read that has to be reissued; holds 1+NUM_WDR
//    entries, NUM_WDR being the number of write data registers;
//  - data return queue: read data waiting for the system bus.
// At the head of the wait queue a read waits for its fast-read data and, if
// coherent, for the combined coherency response. COH_CPY discards the data
// (another cache supplies the line). Otherwise the read's line is checked
// against the writes in the ready queue, and against writes that were issued
// while the read waited (each issued write marks waiting reads of its line);
// with no conflict the data go to the data return queue, else the read moves
// to the ready queue as a logically ordered read, the ready queue is drained
// up to it (issue_arbiter) and its data are returned when it completes. Writes
// leave the wait queue for the ready queue once their coherency check is in.
// The slave queue is a counter of transactions issued and not yet completed;
// issue stops at SLAVEQ_DEPTH. A reissued read is issued only when the data
// return queue has a free slot.
// Predictive flow control (client_op): a queue is critically full when its
// free slots are fewer than PIPE_STARTED+1; CO_NONE when the write data
// registers, or both wait and ready queues, are critically full; CO_COPYOUT_ONLY
// when only the wait queue is.
// Writes to the page at CFG_BASE are control-register writes of the remapping
// controller: register = address bits [6:2], value = low 32 data bits.
// Issued transactions carry tag {logical, slot}; the slot is the read's wait
// queue position. Queue sizes, the overflow threshold, one reissued read at a
// time and the configuration page are this design's choices; the queue
// organisation, ordering rules and flow control follow the source design.
module mmc_core
  import impulse_pkg::*;
#(
  parameter int    WAITQ_DEPTH  = 8,
  parameter int    NUM_WDR      = 4,
  parameter int    READYQ_OFLOW = 2,
  parameter int    DRQ_DEPTH    = 4,
  parameter int    SLAVEQ_DEPTH = 8,
  parameter int    PIPE_STARTED = 1,
  parameter addr_t CFG_BASE     = 32'h7FFF_F000
) (
  input  logic        clk,
  input  logic        rst_n,
  // system memory bus
  input  logic        bus_valid,
  input  bus_hdr_t    bus_hdr,
  input  line_t       bus_wdata,
  output client_op_e  client_op,
  // remapping controller configuration
  output logic        cfg_we,
  output logic [4:0]  cfg_reg,
  output logic [31:0] cfg_data,
  // coherency
  input  logic        coh_valid,
  input  coh_e        coh_res,
  output logic        coh_pop,
  // issue towards MCache / remapping controller / DRAM
  output logic        iss_valid,
  input  logic        iss_ready,
  output mmc_txn_t    iss,
  // completions
  input  logic        rsp_valid,
  input  cpl_t        rsp,
  // data return to the bus
  output logic        dr_valid,
  input  logic        dr_ready,
  output data_ret_t   dr,
  // state for the prefetcher
  output logic        queues_empty,
  output logic        idle,
  // events
  output logic        ev_conflict,
  output logic        ev_late_conflict,
  output logic        ev_cpy_discard,
  output logic        ev_oflow_issue,
  output logic        ev_slave_full,
  output logic        ev_copyout_only,
  output logic        ev_deny_all
);
  localparam int RQ_DEPTH = 1 + NUM_WDR;
  localparam int WAW = $clog2(WAITQ_DEPTH);
  localparam int RAW = $clog2(RQ_DEPTH);
  localparam int LW  = $clog2(RQ_DEPTH + 1);

  typedef struct packed {
    bus_hdr_t hdr;
    logic     conflict;
  } wq_ent_t;

  typedef struct packed {
    logic             write;
    addr_t            addr;
    logic [WAW-1:0]   slot;
  } rq_ent_t;

  // ---------------- wait queue ----------------
  wq_ent_t        wq [WAITQ_DEPTH];
  line_t          wq_data [WAITQ_DEPTH];
  logic [WAITQ_DEPTH-1:0] wq_v;
  logic [WAW-1:0] wq_hd, wq_tl;
  logic [WAW:0]   wq_cnt;
  line_t          rdbuf [WAITQ_DEPTH];
  logic [WAITQ_DEPTH-1:0] rdv;

  // ---------------- ready queue ----------------
  rq_ent_t        rq [RQ_DEPTH];
  line_t          rq_data [RQ_DEPTH];
  logic [RAW-1:0] rq_hd;
  logic [LW-1:0]  rq_cnt;

  function automatic logic [RAW-1:0] rq_idx(logic [RAW-1:0] b, int off);
    return RAW'((int'(b) + off) % RQ_DEPTH);
  endfunction

  // logically ordered read in flight
  logic lr_busy_q, lr_issued_q, lr_shared_q;
  logic [MID_W-1:0] lr_mid_q;
  logic [TID_W-1:0] lr_tid_q;

  // slave queue counter
  logic [$clog2(SLAVEQ_DEPTH+1)-1:0] slave_q;

  // read queue
  logic rdq_empty, rdq_pop, rdq_push;
  logic [PA_W+WAW-1:0] rdq_head;

  // data return queue
  logic drq_empty, drq_push;
  logic [$clog2(DRQ_DEPTH+1)-1:0] drq_cnt;
  data_ret_t drq_in;

  // ---------------- bus acceptance ----------------
  logic is_cfg, acc_wq, acc_co;
  assign is_cfg  = bus_valid && bus_hdr.kind == TR_WRITE &&
                   bus_hdr.addr[PA_W-1:PAGE_W] == CFG_BASE[PA_W-1:PAGE_W];
  assign acc_wq  = bus_valid && !is_cfg && bus_hdr.kind != TR_COPYOUT;
  assign acc_co  = bus_valid && bus_hdr.kind == TR_COPYOUT;
  assign rdq_push = acc_wq && bus_hdr.kind == TR_READ;
  assign cfg_we   = is_cfg;
  assign cfg_reg  = bus_hdr.addr[6:2];
  assign cfg_data = bus_wdata[31:0];

  // write data registers in use: writes in the wait queue and in the ready queue
  int wdr_used, rq_writes;
  always_comb begin
    wdr_used  = 0;
    rq_writes = 0;
    for (int i = 0; i < WAITQ_DEPTH; i++)
      if (wq_v[i] && wq[i].hdr.kind == TR_WRITE) wdr_used++;
    for (int i = 0; i < RQ_DEPTH; i++)
      if (i < int'(rq_cnt) && rq[rq_idx(rq_hd, i)].write) rq_writes++;
    wdr_used += rq_writes;
  end

  // ---------------- flow control ----------------
  logic wq_crit, rq_crit, wdr_crit;
  assign wq_crit  = (WAITQ_DEPTH - int'(wq_cnt)) < PIPE_STARTED + 1;
  assign rq_crit  = (RQ_DEPTH - int'(rq_cnt)) < PIPE_STARTED + 1;
  assign wdr_crit = (NUM_WDR - wdr_used) < PIPE_STARTED + 1;
  always_comb begin
    if (wdr_crit || (wq_crit && rq_crit)) client_op = CO_NONE;
    else if (wq_crit)                     client_op = CO_COPYOUT_ONLY;
    else                                  client_op = CO_ALL;
  end
  assign ev_copyout_only = client_op == CO_COPYOUT_ONLY;
  assign ev_deny_all     = client_op == CO_NONE;

  // ---------------- data return queue budget ----------------
  int drq_free;
  assign drq_free = DRQ_DEPTH - int'(drq_cnt) - (lr_issued_q ? 1 : 0);

  // ---------------- head of the wait queue ----------------
  wq_ent_t h;
  logic    h_v, h_rd, coh_ok_to_go, rq_conf;
  logic    lr_ret;
  typedef enum logic [2:0] {H_NONE, H_DISCARD, H_RETURN, H_REISSUE, H_TOREADY} hact_e;
  hact_e   hact;
  assign h      = wq[wq_hd];
  assign h_v    = wq_v[wq_hd];
  assign h_rd   = h.hdr.kind == TR_READ;
  assign coh_ok_to_go = !h.hdr.coherent || coh_valid;
  assign lr_ret = rsp_valid && !rsp.write && rsp.tag[RTAG_W-2];

  always_comb begin
    rq_conf = 1'b0;
    for (int i = 0; i < RQ_DEPTH; i++)
      if (i < int'(rq_cnt) && rq[rq_idx(rq_hd, i)].write &&
          rq[rq_idx(rq_hd, i)].addr[PA_W-1:OFF_W] == h.hdr.addr[PA_W-1:OFF_W]) rq_conf = 1'b1;
  end

  always_comb begin
    hact = H_NONE;
    if (h_v && coh_ok_to_go && !acc_co) begin
      if (h_rd) begin
        if (rdv[wq_hd]) begin
          if (h.hdr.coherent && coh_res == COH_CPY) hact = H_DISCARD;
          else if (h.conflict || rq_conf) begin
            if (!lr_busy_q && int'(rq_cnt) < RQ_DEPTH) hact = H_REISSUE;
          end else if (drq_free > 0 && !lr_ret) hact = H_RETURN;
        end
      end else begin
        if (int'(rq_cnt) < RQ_DEPTH) hact = H_TOREADY;
      end
    end
  end
  assign coh_pop        = hact != H_NONE && h.hdr.coherent;
  assign ev_conflict    = hact == H_REISSUE;
  assign ev_late_conflict = hact == H_REISSUE && h.conflict && !rq_conf;
  assign ev_cpy_discard = hact == H_DISCARD;

  // ---------------- issue ----------------
  rq_ent_t rqh;
  logic sel_read, sel_ready, go, draining;
  assign rqh = rq[rq_hd];
  assign go  = int'(slave_q) < SLAVEQ_DEPTH;
  assign ev_slave_full = !go && (!rdq_empty || rq_cnt != 0);

  issue_arbiter #(.READYQ_OFLOW(READYQ_OFLOW), .LEN_W(LW)) u_arb (
    .clk, .rst_n, .go(go && iss_ready),
    .read_valid(!rdq_empty), .ready_valid(rq_cnt != 0),
    .ready_head_is_read(!rqh.write), .ready_len(rq_cnt),
    .ready_read_ok(drq_free > 0), .set_drain(hact == H_REISSUE),
    .sel_read, .sel_ready, .draining);

  // Issue candidate shown to the downstream path (valid/ready handshake)
  logic pre_read, pre_ready;
  always_comb begin
    pre_read = 1'b0; pre_ready = 1'b0;
    // same choice as the arbiter, without the downstream ready
    if (go) begin
      if (draining) pre_ready = (rq_cnt != 0) && (rqh.write || drq_free > 0);
      else if (rq_cnt != 0 && (int'(rq_cnt) > READYQ_OFLOW || rdq_empty))
        pre_ready = rqh.write || drq_free > 0;
      else pre_read = !rdq_empty;
    end
  end
  assign iss_valid = pre_read || pre_ready;
  always_comb begin
    iss = '0;
    if (pre_ready) begin
      iss.write = rqh.write;
      iss.addr  = rqh.addr;
      iss.tag   = RTAG_W'({1'b0, 1'b1, {(RTAG_W-2-WAW){1'b0}}, rqh.slot});
      iss.wdata = rq_data[rq_hd];
    end else begin
      iss.write = 1'b0;
      iss.addr  = rdq_head[PA_W+WAW-1:WAW];
      iss.tag   = RTAG_W'({1'b0, 1'b0, {(RTAG_W-2-WAW){1'b0}}, rdq_head[WAW-1:0]});
    end
  end
  assign rdq_pop = sel_read;
  assign ev_oflow_issue = sel_ready && !draining && !rdq_empty;

  sync_fifo #(.WIDTH(PA_W + WAW), .DEPTH(WAITQ_DEPTH)) u_rdq (
    .clk, .rst_n, .push(rdq_push), .wdata({bus_hdr.addr, wq_tl}),
    .pop(rdq_pop), .rdata(rdq_head), .full(), .empty(rdq_empty), .count());

  // ---------------- data return queue ----------------
  always_comb begin
    drq_push = 1'b0;
    drq_in   = '0;
    if (lr_ret) begin
      drq_push      = 1'b1;
      drq_in.mid    = lr_mid_q;
      drq_in.tid    = lr_tid_q;
      drq_in.shared = lr_shared_q;
      drq_in.data   = rsp.data;
    end else if (hact == H_RETURN) begin
      drq_push      = 1'b1;
      drq_in.mid    = h.hdr.mid;
      drq_in.tid    = h.hdr.tid;
      drq_in.shared = h.hdr.coherent && coh_res == COH_SHR;
      drq_in.data   = rdbuf[wq_hd];
    end
  end

  sync_fifo #(.WIDTH($bits(data_ret_t)), .DEPTH(DRQ_DEPTH)) u_drq (
    .clk, .rst_n, .push(drq_push), .wdata(drq_in),
    .pop(dr_valid && dr_ready), .rdata(dr), .full(), .empty(drq_empty), .count(drq_cnt));
  assign dr_valid = !drq_empty;

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wq_v <= '0; wq_hd <= '0; wq_tl <= '0; wq_cnt <= '0; rdv <= '0;
      rq_hd <= '0; rq_cnt <= '0;
      lr_busy_q <= 1'b0; lr_issued_q <= 1'b0; lr_shared_q <= 1'b0; lr_mid_q <= '0; lr_tid_q <= '0;
      slave_q <= '0;
      for (int i = 0; i < WAITQ_DEPTH; i++) wq[i] <= '0;
      for (int i = 0; i < RQ_DEPTH; i++) rq[i] <= '0;
    end else begin
      // wait queue push
      if (acc_wq) begin
        wq[wq_tl].hdr      <= bus_hdr;
        wq[wq_tl].conflict <= 1'b0;
        wq_data[wq_tl]     <= bus_wdata;
        wq_v[wq_tl]        <= 1'b1;
        rdv[wq_tl]         <= 1'b0;
        wq_tl              <= WAW'(wq_tl + 1'b1);
      end
      // wait queue pop
      if (hact != H_NONE) begin
        wq_v[wq_hd] <= 1'b0;
        wq_hd       <= WAW'(wq_hd + 1'b1);
      end
      wq_cnt <= wq_cnt + (WAW+1)'(acc_wq) - (WAW+1)'(hact != H_NONE);
      // issued write marks waiting reads of the same line
      if (sel_ready && rqh.write) begin
        for (int i = 0; i < WAITQ_DEPTH; i++)
          if (wq_v[i] && wq[i].hdr.kind == TR_READ &&
              wq[i].hdr.addr[PA_W-1:OFF_W] == rqh.addr[PA_W-1:OFF_W] &&
              !(acc_wq && WAW'(i) == wq_tl))
            wq[i].conflict <= 1'b1;
      end
      // ready queue: pop, then pushes (copyout from the bus, or head of wait queue)
      if (sel_ready) rq_hd <= rq_idx(rq_hd, 1);
      if (acc_co) begin
        rq[rq_idx(rq_hd, int'(rq_cnt))]      <= '{write: 1'b1, addr: bus_hdr.addr, slot: '0};
        rq_data[rq_idx(rq_hd, int'(rq_cnt))] <= bus_wdata;
      end else if (hact == H_TOREADY || hact == H_REISSUE) begin
        rq[rq_idx(rq_hd, int'(rq_cnt))]      <= '{write: hact == H_TOREADY, addr: h.hdr.addr, slot: wq_hd};
        rq_data[rq_idx(rq_hd, int'(rq_cnt))] <= wq_data[wq_hd];
      end
      rq_cnt <= rq_cnt - LW'(sel_ready)
                + LW'(acc_co || hact == H_TOREADY || hact == H_REISSUE);
      // logically ordered read
      if (hact == H_REISSUE) begin
        lr_busy_q   <= 1'b1;
        lr_mid_q    <= h.hdr.mid;
        lr_tid_q    <= h.hdr.tid;
        lr_shared_q <= h.hdr.coherent && coh_res == COH_SHR;
      end
      if (sel_ready && !rqh.write) lr_issued_q <= 1'b1;
      if (lr_ret) begin
        lr_busy_q   <= 1'b0;
        lr_issued_q <= 1'b0;
      end
      // fast read data
      if (rsp_valid && !rsp.write && !rsp.tag[RTAG_W-2]) begin
        rdbuf[rsp.tag[WAW-1:0]] <= rsp.data;
        rdv[rsp.tag[WAW-1:0]]   <= 1'b1;
      end
      // slave counter
      slave_q <= slave_q + $bits(slave_q)'(sel_read || sel_ready) - $bits(slave_q)'(rsp_valid);
    end
  end

  assign queues_empty = rdq_empty && rq_cnt == 0;
  assign idle         = queues_empty && wq_cnt == 0 && slave_q == 0;

  a_wq_room: assert property (@(posedge clk) disable iff (!rst_n) acc_wq |-> int'(wq_cnt) < WAITQ_DEPTH);
  a_rq_room: assert property (@(posedge clk) disable iff (!rst_n) acc_co |-> int'(rq_cnt) < RQ_DEPTH || sel_ready);
  a_iss_hs:  assert property (@(posedge clk) disable iff (!rst_n) (sel_read || sel_ready) |-> iss_valid && iss_ready);
endmodule
