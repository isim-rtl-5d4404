// Self-checking test of mc_frontend with an ideal DRAM behind SA/SD bus 0
// (random acceptance, random latency, returns in random order). Sequential
// read streams with varying gaps must produce prefetches, MCache hits and
// hits on lines still being prefetched; random reads and writes to a few
// lines must always complete with the data of the last write issued before
// them (a write invalidates the cached copy); every completion must carry
// the MMC's tag, including its logically-ordered-read bit.
module tb_mc_frontend;
  import impulse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] pf_mode;
  logic queues_empty, mmc_idle, in_valid, in_ready, sa_valid, sa_ready, sd_valid, cpl_valid, cpl_ready;
  logic ev_mc_hit, ev_mc_pend_hit, ev_mc_miss, ev_pf_issue, ev_pf_drop;
  mmc_txn_t in_txn;
  mem_req_t sa_req;
  mem_rsp_t sd_rsp;
  cpl_t cpl;
  mc_frontend dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  line_t mem [logic [24:0]];
  function automatic line_t rdl(addr_t a);
    line_t l;
    if (mem.exists(a[31:7])) return mem[a[31:7]];
    for (int i = 0; i < 32; i++) l[32*i +: 32] = {a[31:7], 7'd0} + 32'(4 * i);
    return l;
  endfunction
  typedef struct { int due; mem_rsp_t r; } pend_t;
  pend_t pend [$];
  int now = 0;
  always @(negedge clk) begin sa_ready = ($urandom % 4) != 0; cpl_ready = ($urandom % 4) != 0; end
  always @(posedge clk) begin
    now++;
    sd_valid <= 1'b0;
    if (rst_n && sa_valid && sa_ready) begin
      if (sa_req.write) mem[sa_req.addr[31:7]] = sa_req.wdata;
      else begin
        pend_t p; p.due = now + 6 + $urandom % 10; p.r.tag = sa_req.tag; p.r.data = rdl(sa_req.addr);
        pend.push_back(p);
      end
    end
    if (pend.size() > 0) begin
      int i; i = $urandom % pend.size();
      if (pend[i].due <= now) begin sd_valid <= 1'b1; sd_rsp <= pend[i].r; pend.delete(i); end
    end
  end
  int evc [5];
  always @(posedge clk) if (rst_n) begin
    evc[0] += ev_mc_hit; evc[1] += ev_mc_pend_hit; evc[2] += ev_mc_miss; evc[3] += ev_pf_issue; evc[4] += ev_pf_drop;
  end
  // outstanding transactions by tag
  typedef struct { bit w; line_t d; } exp_t;
  exp_t exp_m [int];
  always @(posedge clk) if (rst_n && cpl_valid && cpl_ready) begin
    int t; t = int'(cpl.tag);
    checks++;
    if (!exp_m.exists(t)) begin failures++; $display("FAIL unexpected tag %h", cpl.tag); end
    else begin
      if (cpl.write !== exp_m[t].w || (!cpl.write && cpl.data !== exp_m[t].d)) begin
        failures++;
        if (failures < 10) $display("FAIL tag %h data %h.. exp %h..", cpl.tag, cpl.data[63:0], exp_m[t].d[63:0]);
      end
      exp_m.delete(t);
    end
  end
  line_t last [logic [24:0]];   // data of the last write issued, per line
  task automatic send(bit w, addr_t a);
    int t; exp_t e;
    do begin
      t = ($urandom % 2) << 10 | ($urandom % 8);
      if (exp_m.exists(t)) @(posedge clk);
    end while (exp_m.exists(t));
    @(negedge clk);
    in_valid = 1; in_txn.write = w; in_txn.addr = a; in_txn.tag = 12'(t); in_txn.wdata = {32{$urandom}};
    #1 while (!in_ready) begin @(negedge clk); #1; end
    e.w = w;
    if (w) last[a[31:7]] = in_txn.wdata;
    e.d = last.exists(a[31:7]) ? last[a[31:7]] : rdl(a);
    exp_m[t] = e;
    @(posedge clk); #1 in_valid = 0;
  endtask
  task automatic wait_all();
    int n; n = 0;
    while (exp_m.size() != 0 && n < 5000) begin @(posedge clk); n++; end
  endtask
  initial begin
    pf_mode = 4'd1; queues_empty = 1; mmc_idle = 1; in_valid = 0; in_txn = '0;
    for (int i = 0; i < 5; i++) evc[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // sequential streams: read a line, wait a little after it completes, read the next
    for (int s = 0; s < 12; s++)
      for (int i = 0; i < 6; i++) begin
        send(0, 32'h0100_0000 + 32'(s * 32'h10000) + 32'(128 * i));
        wait_all();
        repeat ((s % 4) * 3) @(posedge clk);
      end
    // random reads and writes over a few lines, many outstanding
    for (int i = 0; i < 600; i++) begin
      addr_t a;
      a = 32'h0200_0000 + 32'(128 * ($urandom % 8));
      // the MMC never has a read and a write to one line outstanding together
      if ($urandom % 3 == 0) wait_all();
      send($urandom % 3 == 0, a);
      if ($urandom % 4 == 0) wait_all();
    end
    wait_all();
    // prefetch disabled: no prefetch may be issued
    pf_mode = 4'd0;
    evc[3] = 0;
    for (int i = 0; i < 8; i++) begin send(0, 32'h0300_0000 + 32'(128 * i)); wait_all(); end
    checks++;
    if (evc[3] != 0) begin failures++; $display("FAIL prefetch issued while disabled"); end
    checks++;
    if (exp_m.size() != 0) begin failures++; $display("FAIL %0d transactions never completed", exp_m.size()); end
    pf_mode = 4'd1;
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (evc[i] == 0) begin failures++; $display("FAIL event %0d never seen", i); end
    end
    $display("hits %0d pending hits %0d misses %0d drops %0d", evc[0], evc[1], evc[2], evc[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
