// End-to-end test of the Impulse memory system at its default parameters.
// Four behavioural DRAM models sit on the SMC pins; the testbench plays the
// bus modules: it issues reads, writes, copyouts and remapping-controller
// register writes on the system bus, answers coherency checks from four
// modules (with adjustable delays, COH_SHR and COH_CPY answers), and raises
// CPU/IO arbitration requests. Every data return is compared with a
// reference memory kept in bus order; shadow reads are compared with the
// gather worked out here from the page tables and the remapping formulas of
// strided, indirection-vector, page-coloring and superpage remapping. The
// event counters of the design must show each mechanism at least once.
module tb_impulse_top;
  import impulse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        bus_valid;
  bus_hdr_t    bus_hdr;
  line_t       bus_wdata;
  client_op_e  client_op;
  logic [3:0]  coh_valid;
  coh_e        coh_status [4];
  logic        ioa_req, long_req;
  logic [1:0]  cpu_req;
  logic        owner_valid;
  logic [1:0]  owner;
  logic        dr_valid;
  data_ret_t   dr;
  logic        dram_cmd_valid [4];
  logic [2:0]  dram_cmd [4];
  logic        dram_bank [4];
  logic [17:0] dram_row [4];
  logic [3:0]  dram_col [4];
  line_t       dram_wdata [4];
  mask_t       dram_wmask [4];
  logic        dram_dq_valid [4];
  line_t       dram_dq [4];
  logic        mtlb_exception;
  logic [31:0] ev;

  impulse_top dut (.*);

  for (genvar s = 0; s < 4; s++) begin : g_dm
    dram_model #(.SMC_ID(s)) u (
      .clk, .cmd_valid(dram_cmd_valid[s]), .cmd(dram_cmd[s]), .bank(dram_bank[s]),
      .row(dram_row[s]), .col(dram_col[s]), .wdata(dram_wdata[s]), .wmask(dram_wmask[s]),
      .dq_valid(dram_dq_valid[s]), .dq(dram_dq[s]));
  end

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle++;

  // ---------------- reference memory ----------------
  line_t ref_mem [logic [24:0]];
  function automatic line_t pattern(logic [24:0] la);
    line_t l;
    for (int i = 0; i < LINE_BYTES / 4; i++) l[32*i +: 32] = {la, 7'd0} + 32'(4 * i);
    return l;
  endfunction
  function automatic line_t ref_line(addr_t a);
    return ref_mem.exists(a[31:7]) ? ref_mem[a[31:7]] : pattern(a[31:7]);
  endfunction
  function automatic logic [31:0] ref_word(addr_t a);
    line_t l;
    l = ref_line(a);
    return l[8 * int'(a[6:0]) +: 32];
  endfunction
  function automatic void ref_write_bytes(addr_t a, logic [63:0] v, int n);
    line_t l;
    l = ref_line(a);
    for (int b = 0; b < n; b++) l[8 * (int'(a[6:0]) + b) +: 8] = v[8*b +: 8];
    ref_mem[a[31:7]] = l;
  endfunction
  // backdoor: put a line into DRAM and into the reference
  task automatic bd(addr_t a, line_t l);
    ref_mem[a[31:7]] = l;
    case (int'(a[9:7]) % 4)
      0: g_dm[0].u.bd_write(a, l);
      1: g_dm[1].u.bd_write(a, l);
      2: g_dm[2].u.bd_write(a, l);
      default: g_dm[3].u.bd_write(a, l);
    endcase
  endtask
  task automatic bd_word(addr_t a, logic [31:0] w);
    line_t l;
    l = ref_line(a);
    l[8 * int'(a[6:0]) +: 32] = w;
    bd(a, l);
  endtask

  // ---------------- coherency responders ----------------
  coh_e coh_q [4][$];
  bit   coh_hold = 0;
  always @(posedge clk) begin
    for (int m = 0; m < 4; m++) begin
      coh_valid[m]  <= 1'b0;
      coh_status[m] <= COH_OK;
      if (!coh_hold && coh_q[m].size() > 0 && ($urandom % 3) == 0) begin
        coh_valid[m]  <= 1'b1;
        coh_status[m] <= coh_q[m].pop_front();
      end
    end
  end

  // ---------------- arbitration traffic of the other bus modules ----------------
  always @(posedge clk) begin
    cpu_req  <= 2'($urandom % 4 == 0 ? $urandom : 0);
    ioa_req  <= ($urandom % 16) == 0;
    long_req <= owner_valid && owner != 2'd0 && ($urandom % 2);
  end

  // ---------------- data return checker ----------------
  typedef struct { line_t data; bit shared; } exp_t;
  exp_t exp_map [int];
  int   returns = 0;
  longint first_ret = 0;
  always @(posedge clk) begin
    if (rst_n && dr_valid && owner_valid && owner == 2'd0) begin
      int key;
      key = {dr.mid, dr.tid};
      checks++;
      returns++;
      if (returns == 1) first_ret = cycle;
      if (!exp_map.exists(key)) begin
        failures++;
        $display("FAIL unexpected data return mid=%0d tid=%0d", dr.mid, dr.tid);
      end else begin
        if (dr.data !== exp_map[key].data || dr.shared !== exp_map[key].shared) begin
          failures++;
          $display("FAIL data return mid=%0d tid=%0d got %h.. exp %h.. shared %0d/%0d",
                   dr.mid, dr.tid, dr.data[63:0], exp_map[key].data[63:0], dr.shared, exp_map[key].shared);
        end
        exp_map.delete(key);
      end
    end
  end

  // ---------------- bus driver ----------------
  int tid_ctr = 0;
  task automatic send(tr_kind_e kind, bit coherent, addr_t a, line_t wd, output int key);
    bit ok;
    ok = 0;
    while (!ok) begin
      @(negedge clk);
      ok = (kind == TR_COPYOUT) ? client_op != CO_NONE : client_op == CO_ALL;
    end
    key = tid_ctr % 256;
    tid_ctr++;
    bus_valid     = 1'b1;
    bus_hdr.kind  = kind;
    bus_hdr.coherent = coherent;
    bus_hdr.addr  = a;
    bus_hdr.mid   = 2'(key >> 6);
    bus_hdr.tid   = 6'(key);
    bus_wdata     = wd;
    @(posedge clk);
    #1 bus_valid  = 1'b0;
  endtask

  task automatic rd(addr_t a, bit coherent = 0, coh_e c0 = COH_OK, coh_e c1 = COH_OK, line_t exp_override = '0,
                    bit use_override = 0);
    int key;
    exp_t e;
    bit shr, cpy;
    cpy = c0 == COH_CPY || c1 == COH_CPY;
    shr = !cpy && (c0 == COH_SHR || c1 == COH_SHR);
    e.data   = use_override ? exp_override : ref_line(a);
    e.shared = coherent && shr;
    send(TR_READ, coherent, a, '0, key);
    if (!(coherent && cpy)) exp_map[key] = e;
    if (coherent) begin
      coh_q[0].push_back(c0); coh_q[1].push_back(c1);
      coh_q[2].push_back(COH_OK); coh_q[3].push_back(COH_OK);
    end
  endtask

  task automatic wr(addr_t a, line_t d, bit coherent = 0, bit copyout = 0);
    int key;
    ref_mem[a[31:7]] = d;
    send(copyout ? TR_COPYOUT : TR_WRITE, coherent, a, d, key);
    if (coherent && !copyout) begin
      for (int m = 0; m < 4; m++) coh_q[m].push_back(COH_OK);
    end
  endtask

  task automatic cfg(int r, logic [31:0] v);
    int key;
    line_t d;
    d = '0;
    d[31:0] = v;
    send(TR_WRITE, 0, 32'h7FFF_F000 + 32'(4 * r), d, key);
  endtask

  function automatic line_t rnd_line();
    line_t l;
    for (int i = 0; i < LINE_BYTES / 4; i++) l[32*i +: 32] = $urandom;
    return l;
  endfunction

  // ---------------- remapping set-up and expected gathers ----------------
  localparam addr_t PT0 = 32'h0010_0000, PT1 = 32'h0011_0000, PT2 = 32'h0012_0000, PT3 = 32'h0013_0000;
  localparam addr_t IVB = 32'h0030_0000;
  localparam addr_t S0 = 32'h8000_0000, S1 = 32'h8100_0000, S2 = 32'h8200_0000, S3 = 32'h8300_0000;

  function automatic logic [19:0] frame_of(int d, int vpn);
    case (d)
      0: return 20'(32'h400 + vpn);
      1: return 20'(32'h500 + vpn);
      2: return 20'(32'h600 + vpn);
      default: return 20'(32'h700 + (vpn * 5) % 16);
    endcase
  endfunction
  function automatic addr_t xlate(int d, logic [31:0] v);
    return {frame_of(d, int'(v >> 12)), v[11:0]};
  endfunction
  function automatic logic [31:0] iv_elem(int i);
    return 32'((i * 37 + 5) % 2000);
  endfunction

  task automatic setup_desc(int d, int mode, addr_t st, addr_t en, int stride, int obj_lg, int ooff,
                            addr_t pt, int cache_lg = 0, int csize = 0, int coff = 0);
    cfg(31, d);
    cfg(1, st); cfg(2, en); cfg(3, stride); cfg(4, obj_lg); cfg(5, ooff);
    cfg(6, 2); cfg(7, IVB); cfg(8, pt); cfg(9, cache_lg); cfg(10, csize); cfg(11, coff);
    cfg(0, (mode << 1) | 1);
  endtask

  function automatic line_t gather_exp(int d, addr_t sa);
    line_t l;
    logic [31:0] so, idx, v;
    l  = '0;
    case (d)
      0: begin                                 // stride 48, 4-byte objects at offset 8
        so = sa - S0; idx = so >> 2;
        for (int k = 0; k < 32; k++) begin
          v = (idx + 32'(k)) * 48 + 8;
          l[32*k +: 32] = ref_word(xlate(0, v));
        end
      end
      1: begin                                 // indirection vector, 8-byte objects, stride 24
        so = sa - S1; idx = so >> 3;
        for (int k = 0; k < 16; k++) begin
          v = iv_elem(int'(idx) + k) * 24;
          l[64*k +: 32]      = ref_word(xlate(1, v));
          l[64*k + 32 +: 32] = ref_word(xlate(1, v + 4));
        end
      end
      2: begin                                 // page coloring: 128 KB way, 32 KB color at 64 KB
        so = sa - S2;
        v  = (so >> 17) * 32768 + (so & 32'h1FFFF) - 65536;
        l  = ref_line(xlate(2, v));
      end
      default: begin
        so = sa - S3;
        l  = ref_line(xlate(3, so));
      end
    endcase
    return l;
  endfunction

  task automatic srd(int d, addr_t sa);
    rd(sa, 0, COH_OK, COH_OK, gather_exp(d, sa), 1);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- event counters ----------------
  int evc [23];
  initial for (int i = 0; i < 23; i++) evc[i] = 0;
  always @(posedge clk) if (rst_n) for (int i = 0; i < 23; i++) if (ev[i]) evc[i]++;
  int exc_cnt = 0;
  always @(posedge clk) if (rst_n && mtlb_exception) exc_cnt++;

  task automatic drain(int max_cycles = 20000);
    int n;
    n = 0;
    while ((exp_map.size() != 0 || coh_q[0].size() != 0 || coh_q[1].size() != 0 ||
            coh_q[2].size() != 0 || coh_q[3].size() != 0) && n < max_cycles) begin
      @(posedge clk);
      n++;
    end
    repeat (50) @(posedge clk);
    if (n >= max_cycles)
      $display("DBG drain timeout exp=%0d wq=%0d rq=%0d slave=%0d lr=%0d/%0d op=%0d drq=%0d iss=%0d/%0d fe_cpl=%0d",
        exp_map.size(), dut.u_mmc.wq_cnt, dut.u_mmc.rq_cnt, dut.u_mmc.slave_q, dut.u_mmc.lr_busy_q,
        dut.u_mmc.lr_issued_q, client_op, dut.u_mmc.drq_cnt, dut.u_mmc.iss_valid, dut.u_mmc.iss_ready, dut.u_fe.cpl_cnt);
  endtask

  int lat_start, lat;
  initial begin
    bus_valid = 0; bus_hdr = '0; bus_wdata = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // page tables (valid bit 31, frame in 27:8) and indirection vector
    for (int d = 0; d < 4; d++) begin
      addr_t pt;
      pt = (d == 0) ? PT0 : (d == 1) ? PT1 : (d == 2) ? PT2 : PT3;
      for (int vpn = 0; vpn < 64; vpn++) bd_word(pt + 32'(4 * vpn), {4'b1000, frame_of(d, vpn), 8'h00});
    end
    for (int i = 0; i < 1024; i++) bd_word(IVB + 32'(4 * i), iv_elem(i));

    // 1. single non-shadow read: latency of a closed-row miss
    $display("phase %0d at cycle %0d", 1, cycle);
    lat_start = int'(cycle);
    rd(32'h0000_1000);
    drain();
    lat = int'(first_ret) - lat_start;
    checks++;
    if (returns != 1) begin failures++; $display("FAIL first read not returned"); end

    // 2. sequential stream: prefetch, MCache hits and hits on lines being prefetched
    $display("phase %0d at cycle %0d", 2, cycle);
    for (int i = 0; i < 24; i++) begin
      rd(32'h0002_0000 + 32'(128 * i));
      repeat (i % 12) @(posedge clk);
    end
    drain();

    // 3. write then read of the same line: the fast read is wrong, the read is reissued
    $display("phase %0d at cycle %0d", 3, cycle);
    for (int i = 0; i < 4; i++) begin
      wr(32'h0004_0000 + 32'(128 * i), rnd_line());
      rd(32'h0004_0000 + 32'(128 * i));
    end
    drain();

    // 4. write, then coherent read whose check comes late: the write issues first
    $display("phase %0d at cycle %0d", 4, cycle);
    coh_hold = 1;
    wr(32'h0005_0000, rnd_line());
    rd(32'h0005_0000, 1);
    repeat (60) @(posedge clk);
    coh_hold = 0;
    drain();

    // 5. coherency answers: shared and modified-elsewhere
    $display("phase %0d at cycle %0d", 5, cycle);
    rd(32'h0006_0000, 1, COH_SHR, COH_OK);
    rd(32'h0006_0080, 1, COH_OK, COH_CPY);
    rd(32'h0006_0100, 1, COH_OK, COH_OK);
    drain();

    // 6. flow control: hold coherency so the wait queue and write registers fill
    $display("phase %0d at cycle %0d", 6, cycle);
    coh_hold = 1;
    rd(32'h0007_0000, 1);
    for (int i = 0; i < 2; i++) wr(32'h0007_1000 + 32'(128 * i), rnd_line(), 1);
    for (int i = 0; i < 4; i++) rd(32'h0007_2000 + 32'(128 * i), 1);
    repeat (40) @(posedge clk);
    coh_hold = 0;
    drain();
    coh_hold = 1;
    for (int i = 0; i < 7; i++) rd(32'h0007_4000 + 32'(128 * i), 1);
    repeat (20) @(posedge clk);
    coh_hold = 0;
    drain();

    // 7. burst of copyouts and reads to one bank: slave counter full, ready queue overflow
    $display("phase %0d at cycle %0d", 7, cycle);
    fork
      for (int i = 0; i < 12; i++) wr(32'h0008_0000 + 32'(1024 * i), rnd_line(), 0, 1);
    join
    for (int i = 0; i < 16; i++) rd(32'h0009_0000 + 32'(1024 * i));
    for (int i = 0; i < 6; i++) begin
      wr(32'h000A_0000 + 32'(1024 * i), rnd_line(), 0, 1);
      rd(32'h000B_0000 + 32'(1024 * i));
    end
    drain();

    // 7b. hits on lines that are still being prefetched
    for (int d = 0; d < 16; d++) begin
      int r0;
      r0 = returns;
      rd(32'h0010_0000 + 32'(8192 * d) + 32'h4000);
      while (returns == r0) @(posedge clk);
      repeat (d % 8) @(posedge clk);
      rd(32'h0010_0000 + 32'(8192 * d) + 32'h4080);
    end
    drain();

    // 8. remapping: program four descriptors
    $display("phase %0d at cycle %0d", 8, cycle);
    setup_desc(0, 0, S0, S1, 48, 2, 8, PT0);
    setup_desc(1, 1, S1, S2, 24, 3, 0, PT1);
    setup_desc(2, 2, S2, S3, 0, 0, 0, PT2, 17, 32768, 65536);
    setup_desc(3, 3, S3, 32'h8400_0000, 0, 0, 0, PT3);
    repeat (10) @(posedge clk);
    for (int i = 0; i < 6; i++) srd(0, S0 + 32'(128 * i));
    drain();
    for (int i = 0; i < 4; i++) srd(1, S1 + 32'(128 * i));
    drain();
    srd(2, S2 + 32'h0001_0100);
    srd(2, S2 + 32'h0003_0080);
    srd(3, S3 + 32'h0000_2000);
    srd(3, S3 + 32'h0000_5180);
    drain();
    // shadow and non-shadow traffic together
    fork
      for (int i = 0; i < 8; i++) srd(0, S0 + 32'h400 + 32'(128 * i));
    join
    for (int i = 0; i < 8; i++) rd(32'h000C_0000 + 32'(128 * i));
    drain();

    // 9. scatter: a shadow write spreads one dense line over the strided objects
    $display("phase %0d at cycle %0d", 9, cycle);
    begin
      line_t d;
      logic [31:0] v;
      d = rnd_line();
      for (int k = 0; k < 32; k++) begin
        v = ((32'h2000 >> 2) + 32'(k)) * 48 + 8;
        ref_write_bytes(xlate(0, v), 64'(d[32*k +: 32]), 4);
      end
      wr(S0 + 32'h2000, d);
      repeat (200) @(posedge clk);
      srd(0, S0 + 32'h2000);
      drain();
    end

    // 9b. slow scatters and gathers fill the slave queue; copyouts then pile
    // up in the ready queue behind them and overflow ahead of waiting reads
    for (int i = 0; i < 4; i++) begin
      line_t d;
      logic [31:0] v;
      d = rnd_line();
      for (int k = 0; k < 32; k++) begin
        v = (((32'h3000 + 32'(128 * i)) >> 2) + 32'(k)) * 48 + 8;
        ref_write_bytes(xlate(0, v), 64'(d[32*k +: 32]), 4);
      end
      wr(S0 + 32'h3000 + 32'(128 * i), d);
    end
    for (int i = 0; i < 4; i++) srd(1, S1 + 32'h800 + 32'(128 * i));
    rd(32'h000E_0000);
    rd(32'h000E_0400);
    for (int i = 0; i < 3; i++) wr(32'h000F_0000 + 32'(1024 * i), rnd_line(), 0, 1);
    drain();

    // 10. run past a refresh period with a little traffic
    $display("phase %0d at cycle %0d", 10, cycle);
    for (int i = 0; i < 16; i++) begin
      rd(32'h000D_0000 + 32'(4096 * i));
      repeat (100) @(posedge clk);
    end
    drain();

    // ---------------- report ----------------
    checks++;
    if (exp_map.size() != 0) begin failures++; $display("FAIL %0d reads never returned", exp_map.size()); end
    for (int s = 0; s < 4; s++) begin
      checks++;
      if (s == 0 && g_dm[0].u.errors != 0) failures++;
      if (s == 1 && g_dm[1].u.errors != 0) failures++;
      if (s == 2 && g_dm[2].u.errors != 0) failures++;
      if (s == 3 && g_dm[3].u.errors != 0) failures++;
    end
    checks++;
    if (exc_cnt != 0) begin failures++; $display("FAIL MTLB exception"); end
    begin
      string names [23] = '{"read reissue", "late conflict", "COH_CPY discard", "ready queue overflow issue",
                            "slave queue full", "copyouts only", "deny all", "MCache hit",
                            "hit on prefetching line", "MCache miss", "prefetch issued", "prefetch dropped",
                            "MTLB hit", "MTLB miss", "MTLB write-back", "gather", "scatter",
                            "dispatcher contention", "row hit", "row conflict", "refresh",
                            "Accumulate/Mux stop", "data return"};
      for (int i = 0; i < 23; i++) begin
        $display("  %-28s %0d", names[i], evc[i]);
        if (i != 11 && i != 21) begin
          checks++;
          if (evc[i] == 0) begin failures++; $display("FAIL mechanism never seen: %s", names[i]); end
        end
      end
    end
    $display("first read returned after %0d cycles; %0d data returns checked", lat, returns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
