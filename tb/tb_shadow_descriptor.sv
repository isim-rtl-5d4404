// Self-checking test of shadow_descriptor alone. The testbench stands in for
// the MTLB and DRAM: a translation is the fixed mapping physical = 0x0040_0000
// + pseudo-virtual offset, data return in random order after random delays.
// Checked: control-register read-out, gathers of 4-, 8-, 32- and 256-byte
// strided objects, an indirection-vector gather (which first reads the vector
// line), page coloring, a scatter followed by a gather of the same line,
// the number of DRAM items per line (128 / object size), and the issue rate
// of one item address per cycle while the MTLB accepts.
module tb_shadow_descriptor;
  import impulse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we, req_valid, req_ready, tl_valid, tl_ready, ret_valid, ret_iv, done_valid, done_ready;
  logic [3:0] cfg_reg;
  logic [31:0] cfg_data;
  logic [6:0] ret_k;
  desc_cfg_t cfg;
  mmc_txn_t req;
  tl_req_t tl;
  line_t ret_data;
  cpl_t done;
  shadow_descriptor #(.DESC_ID(2)) dut (.*);
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
  function automatic logic [7:0] rdb(addr_t a); line_t l; l = rdl(a); return l[8 * int'(a[6:0]) +: 8]; endfunction
  function automatic addr_t ph(logic [31:0] v); return 32'h0040_0000 + v; endfunction
  typedef struct { int due; bit iv; logic [6:0] k; line_t d; } pend_t;
  pend_t pend [$];
  int now = 0, items = 0;
  bit full_rate = 0;
  int first_item = -1, last_item = -1;
  always @(negedge clk) begin tl_ready = full_rate || ($urandom % 4) != 0; done_ready = ($urandom % 2); end
  always @(posedge clk) begin
    now++;
    ret_valid <= 1'b0;
    if (rst_n && tl_valid && tl_ready) begin
      addr_t a;
      a = tl.phys ? tl.addr : ph(tl.addr);
      if (!tl.phys) begin items++; if (first_item < 0) first_item = now; last_item = now; end
      if (tl.write) begin
        line_t l;
        l = rdl(a);
        for (int b = 0; b < 128; b++) if (tl.wmask[b]) l[8*b +: 8] = tl.wdata[8*b +: 8];
        mem[a[31:7]] = l;
      end else begin
        pend_t p;
        p.due = now + 2 + $urandom % 10; p.iv = tl.phys; p.k = tl.tag[6:0]; p.d = rdl(a);
        pend.push_back(p);
      end
    end
    if (pend.size() > 0) begin
      int i;
      i = $urandom % pend.size();
      if (pend[i].due <= now) begin
        ret_valid <= 1'b1; ret_iv <= pend[i].iv; ret_k <= pend[i].k; ret_data <= pend[i].d;
        pend.delete(i);
      end
    end
  end
  task automatic wcfg(int r, logic [31:0] v);
    @(negedge clk); cfg_we = 1; cfg_reg = 4'(r); cfg_data = v;
    @(posedge clk); #1 cfg_we = 0;
  endtask
  task automatic run(bit w, addr_t a, line_t wd, output line_t got);
    @(negedge clk); req_valid = 1; req.write = w; req.addr = a; req.tag = 12'h9AB; req.wdata = wd;
    #1 while (!req_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 req_valid = 0;
    @(negedge clk); #1 while (!(done_valid && done_ready)) begin @(negedge clk); #1; end
    got = done.data;
    checks++;
    if (done.tag !== 12'h9AB || done.write !== w) begin failures++; $display("FAIL completion tag/kind"); end
    @(posedge clk);
  endtask
  task automatic chk_line(line_t got, line_t exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h.. exp %h..", what, got[63:0], exp[63:0]); end
  endtask
  localparam addr_t S = 32'h8800_0000;
  initial begin
    line_t got, e, d;
    cfg_we = 0; cfg_reg = 0; cfg_data = 0; req_valid = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wcfg(1, S); wcfg(2, S + 32'h0100_0000); wcfg(5, 12); wcfg(6, 2); wcfg(7, 32'h0030_0000);
    wcfg(9, 16); wcfg(10, 16384); wcfg(11, 32768);
    checks++;
    if (cfg.saddr_start !== S || cfg.object_offset !== 12 || cfg.cache_lg !== 16) begin failures++; $display("FAIL register read-out"); end
    // strided gathers for several object sizes
    for (int lg = 2; lg <= 8; lg++) begin
      int osz, n0;
      if (lg == 4 || lg == 6 || lg == 7) continue;
      osz = 1 << lg;
      // objects aligned to their size (they may not cross a DRAM line)
      wcfg(3, 5 * osz); wcfg(4, lg); wcfg(5, osz < 128 ? 3 * osz : 384); wcfg(0, 1);
      for (int line = 0; line < 3; line++) begin
        addr_t a; int cnt;
        a = S + 32'(128 * line);
        cnt = osz >= 128 ? 1 : 128 / osz;
        for (int b = 0; b < 128; b++) begin
          int so, obj, wpos;
          so = 128 * line + b;
          obj = so / osz; wpos = so % osz;
          e[8*b +: 8] = rdb(ph(32'(obj * 5 * osz + (osz < 128 ? 3 * osz : 384) + wpos)));
        end
        n0 = items;
        run(0, a, '0, got);
        chk_line(got, e, $sformatf("strided gather obj %0d line %0d", osz, line));
        checks++;
        if (items - n0 != cnt) begin failures++; $display("FAIL %0d items for object size %0d", items - n0, osz); end
      end
    end
    // rate: with the MTLB always ready, one item address per cycle (32 items in 32 cycles)
    wcfg(3, 20); wcfg(4, 2); wcfg(5, 0); wcfg(0, 1);
    full_rate = 1; first_item = -1;
    run(0, S + 32'h1000, '0, got);
    full_rate = 0;
    checks++;
    if (last_item - first_item != 31) begin failures++; $display("FAIL 32 items took %0d cycles", last_item - first_item + 1); end
    // scatter then gather, 8-byte objects
    wcfg(3, 200); wcfg(4, 3); wcfg(5, 16); wcfg(0, 1);
    d = {32{$urandom}} ^ line_t'({$urandom, $urandom, $urandom});
    run(1, S + 32'h400, d, got);
    run(0, S + 32'h400, '0, got);
    chk_line(got, d, "scatter read-back");
    // indirection vector: index i at 0x0030_0000 + 4i
    for (int i = 0; i < 64; i++) begin
      line_t l; addr_t a;
      a = 32'h0030_0000 + 32'(4 * i);
      l = rdl(a); l[8 * int'(a[6:0]) +: 32] = 32'((i * 13 + 3) % 500); mem[a[31:7]] = l;
    end
    wcfg(3, 64); wcfg(4, 3); wcfg(5, 0); wcfg(0, 3);    // indirect, 8-byte objects
    for (int line = 0; line < 2; line++) begin
      for (int k = 0; k < 16; k++) for (int b = 0; b < 8; b++)
        e[64*k + 8*b +: 8] = rdb(ph(32'(((16 * line + k) * 13 + 3) % 500 * 64 + b)));
      run(0, S + 32'(128 * line), '0, got);
      chk_line(got, e, $sformatf("indirection-vector gather line %0d", line));
    end
    // page coloring: 64 KB ways, 16 KB color at 32 KB
    wcfg(0, 5);
    run(0, S + 32'h0001_0000 + 32'h8000 + 32'h180, '0, got);
    chk_line(got, rdl(ph(32'h4000 + 32'h180)), "page coloring");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
