// Self-checking test of mmc_core with an ideal memory behind its issue port
// (random acceptance, completions out of order after random delays). Random
// bus traffic (reads and writes, coherent and not, to a few lines so that
// reads often follow writes to the same line; copyouts to lines nobody else
// uses, as a cache writing back a dirty line would) obeys CLIENT_OP as a
// bus module must. Every data return must carry the data of the last write before
// the read in bus order, the shared bit of a COH_SHR answer, and nothing for
// a COH_CPY answer; register writes to the configuration page must appear on
// the configuration port. Each queue mechanism (fast read found wrong and
// reissued, late conflict, COH_CPY discard, ready queue overflow, slave
// counter full, copyouts-only and deny-all flow control) must occur.
module tb_mmc_core;
  import impulse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic bus_valid, cfg_we, coh_valid, coh_pop, iss_valid, iss_ready, rsp_valid, dr_valid, dr_ready;
  logic queues_empty, idle, ev_conflict, ev_late_conflict, ev_cpy_discard, ev_oflow_issue, ev_slave_full;
  logic ev_copyout_only, ev_deny_all;
  bus_hdr_t bus_hdr;
  line_t bus_wdata;
  client_op_e client_op;
  logic [4:0] cfg_reg;
  logic [31:0] cfg_data;
  coh_e coh_res;
  mmc_txn_t iss;
  cpl_t rsp;
  data_ret_t dr;
  mmc_core dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // memory
  line_t mem [logic [24:0]];
  function automatic line_t rdl(addr_t a);
    line_t l;
    if (mem.exists(a[31:7])) return mem[a[31:7]];
    for (int i = 0; i < 32; i++) l[32*i +: 32] = {a[31:7], 7'd0} + 32'(4 * i);
    return l;
  endfunction
  line_t ref_mem [logic [24:0]];
  function automatic line_t ref_rd(addr_t a);
    return ref_mem.exists(a[31:7]) ? ref_mem[a[31:7]] : rdl(a);
  endfunction
  typedef struct { int due; cpl_t c; } pend_t;
  pend_t pend [$];
  int now = 0, slow = 0;
  always @(negedge clk) begin
    iss_ready = ($urandom % 4) != 0;
    dr_ready = ($urandom % 3) != 0;
  end
  always @(posedge clk) begin
    now++;
    rsp_valid <= 1'b0;
    if (rst_n && iss_valid && iss_ready) begin
      pend_t p;
      p.c.write = iss.write; p.c.tag = iss.tag; p.c.data = '0;
      if (iss.write) mem[iss.addr[31:7]] = iss.wdata;
      else p.c.data = rdl(iss.addr);
      p.due = now + 1 + $urandom % (slow ? 60 : 15);
      pend.push_back(p);
    end
    if (pend.size() > 0) begin
      int i;
      i = $urandom % pend.size();
      if (pend[i].due <= now) begin
        rsp_valid <= 1'b1; rsp <= pend[i].c;
        pend.delete(i);
      end
    end
  end
  // coherency answers, in transaction order
  coh_e coh_q [$];
  bit coh_hold = 0, hold_en = 0;
  always @(negedge clk) coh_hold = hold_en && (($urandom % 20) == 0 ? !coh_hold : coh_hold);
  always_comb begin
    coh_valid = !coh_hold && coh_q.size() > 0;
    coh_res = coh_q.size() > 0 ? coh_q[0] : COH_OK;
  end
  always @(posedge clk) if (rst_n && coh_pop) void'(coh_q.pop_front());
  // data return checks
  typedef struct { line_t d; bit s; } exp_t;
  exp_t exp_m [int];
  always @(posedge clk) if (rst_n && dr_valid && dr_ready) begin
    int key;
    key = {dr.mid, dr.tid};
    checks++;
    if (!exp_m.exists(key)) begin failures++; $display("FAIL unexpected return %0d", key); end
    else begin
      if (dr.data !== exp_m[key].d || dr.shared !== exp_m[key].s) begin
        failures++;
        if (failures < 10) $display("FAIL return %0d data %h.. exp %h.. shared %b/%b", key, dr.data[63:0], exp_m[key].d[63:0], dr.shared, exp_m[key].s);
      end
      exp_m.delete(key);
    end
  end
  int cfg_seen = 0;
  logic [31:0] cfg_exp [$];
  always @(posedge clk) if (rst_n && cfg_we) begin
    checks++;
    if (cfg_exp.size() == 0 || {27'd0, cfg_reg} + cfg_data !== cfg_exp[0]) begin failures++; $display("FAIL config write"); end
    if (cfg_exp.size()) void'(cfg_exp.pop_front());
    cfg_seen++;
  end
  int evc [7];
  always @(posedge clk) if (rst_n) begin
    evc[0] += ev_conflict; evc[1] += ev_late_conflict; evc[2] += ev_cpy_discard; evc[3] += ev_oflow_issue;
    evc[4] += ev_slave_full; evc[5] += ev_copyout_only; evc[6] += ev_deny_all;
  end
  int tid = 0;
  task automatic send(tr_kind_e k, bit coh, addr_t a, line_t d, coh_e c);
    bit ok;
    ok = 0;
    while (!ok) begin
      @(negedge clk);
      ok = (k == TR_COPYOUT) ? client_op != CO_NONE : client_op == CO_ALL;
    end
    bus_valid = 1; bus_hdr.kind = k; bus_hdr.coherent = coh; bus_hdr.addr = a;
    bus_hdr.mid = 2'(tid >> 6); bus_hdr.tid = 6'(tid); bus_wdata = d;
    if (k != TR_READ) ref_mem[a[31:7]] = d;
    else if (!(coh && c == COH_CPY)) begin
      exp_t e; e.d = ref_rd(a); e.s = coh && c == COH_SHR; exp_m[tid] = e;
    end
    if (coh && k != TR_COPYOUT) coh_q.push_back(c);
    tid = (tid + 1) % 256;
    @(posedge clk); #1 bus_valid = 0;
  endtask
  task automatic drain();
    int n; n = 0;
    while ((exp_m.size() != 0 || coh_q.size() != 0 || pend.size() != 0) && n < 20000) begin @(posedge clk); n++; end
    repeat (30) @(posedge clk);
  endtask
  initial begin
    bus_valid = 0; bus_hdr = '0; bus_wdata = '0;
    for (int i = 0; i < 7; i++) evc[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // configuration page writes
    for (int r = 0; r < 4; r++) begin
      line_t d; d = '0; d[31:0] = 32'h100 * r + 7;
      cfg_exp.push_back(32'(r) + d[31:0]);
      send(TR_WRITE, 0, 32'h7FFF_F000 + 32'(4 * r), d, COH_OK);
    end
    // random traffic over 6 lines; copyouts to 4 other lines, read back later
    for (int phase = 0; phase < 4; phase++) begin
      slow = phase % 2;
      hold_en = 1;
      for (int i = 0; i < 300; i++) begin
        int x; tr_kind_e k; bit coh; coh_e c; addr_t a;
        x = $urandom % 10;
        k = x < 5 ? TR_READ : (x < 8 ? TR_WRITE : TR_COPYOUT);
        coh = ($urandom % 2) && k != TR_COPYOUT;
        x = $urandom % 10;
        c = x == 0 ? COH_CPY : (x < 3 ? COH_SHR : COH_OK);
        if (k == TR_WRITE) c = COH_OK;
        // a copyout writes back a line no other module is using
        a = k == TR_COPYOUT ? 32'h0002_0000 + 32'(128 * ($urandom % 4)) : 32'h0001_0000 + 32'(128 * ($urandom % 6));
        send(k, coh, a, {32{$urandom}}, c);
        repeat ($urandom % 3) @(posedge clk);
      end
      hold_en = 0;
      drain();
      for (int i = 0; i < 4; i++) send(TR_READ, 0, 32'h0002_0000 + 32'(128 * i), '0, COH_OK);
      drain();
    end
    checks++;
    if (exp_m.size() != 0 || cfg_seen != 4) begin failures++; $display("FAIL %0d reads missing, %0d config writes", exp_m.size(), cfg_seen); end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (evc[i] == 0) begin failures++; $display("FAIL mechanism %0d never seen", i); end
    end
    $display("events: reissue %0d late %0d cpy %0d oflow %0d slave_full %0d copyout_only %0d deny %0d",
             evc[0], evc[1], evc[2], evc[3], evc[4], evc[5], evc[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
