// Self-checking test of remap_controller with an ideal memory behind it
// (random latency, out-of-order returns). Four descriptors are programmed
// through the register interface (register 31 selects the descriptor): a
// strided gather of 4-byte objects, an indirection-vector gather of 8-byte
// objects, page coloring and a superpage. Every completion is compared with a
// gather worked out here from the page tables; a scatter write followed by a
// read of the same shadow line must give the written data back; an address
// outside every region must complete with zero data; MTLB hits, misses and
// write-backs must occur.
module tb_remap_controller;
  import impulse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we, in_valid, in_ready, mem_valid, mem_ready, ret_valid, cpl_valid, cpl_ready, exception;
  logic ev_mtlb_hit, ev_mtlb_miss, ev_mtlb_wb, ev_gather, ev_scatter;
  logic [4:0] cfg_reg;
  logic [31:0] cfg_data;
  mmc_txn_t in_txn;
  mem_req_t mem_req;
  mem_rsp_t ret;
  cpl_t cpl;
  remap_controller dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // ---------------- memory ----------------
  line_t mem [logic [24:0]];
  function automatic line_t pattern(logic [24:0] la);
    line_t l;
    for (int i = 0; i < 32; i++) l[32*i +: 32] = {la, 7'd0} + 32'(4 * i);
    return l;
  endfunction
  function automatic line_t rdl(addr_t a);
    return mem.exists(a[31:7]) ? mem[a[31:7]] : pattern(a[31:7]);
  endfunction
  function automatic logic [31:0] rdw(addr_t a);
    line_t l; l = rdl(a); return l[8 * int'(a[6:0]) +: 32];
  endfunction
  function automatic void wrw(addr_t a, logic [31:0] w);
    line_t l; l = rdl(a); l[8 * int'(a[6:0]) +: 32] = w; mem[a[31:7]] = l;
  endfunction
  typedef struct { int due; mem_rsp_t r; } pend_t;
  pend_t pend [$];
  int n_hit = 0, n_miss = 0, n_wb = 0, n_g = 0, n_s = 0, n_exc = 0;
  always @(posedge clk) if (rst_n) begin
    n_hit += ev_mtlb_hit; n_miss += ev_mtlb_miss; n_wb += ev_mtlb_wb; n_g += ev_gather; n_s += ev_scatter; n_exc += exception;
  end
  always @(negedge clk) mem_ready = ($urandom % 5) != 0;
  int now = 0;
  always @(posedge clk) begin
    now++;
    ret_valid <= 1'b0;
    if (rst_n && mem_valid && mem_ready) begin
      if (mem_req.write) begin
        line_t l;
        l = rdl(mem_req.addr);
        for (int b = 0; b < 128; b++) if (mem_req.wmask[b]) l[8*b +: 8] = mem_req.wdata[8*b +: 8];
        mem[mem_req.addr[31:7]] = l;
      end else begin
        pend_t p;
        p.due = now + 4 + $urandom % 12;
        p.r.tag = mem_req.tag;
        p.r.data = rdl(mem_req.addr);
        pend.push_back(p);
      end
    end
    for (int i = 0; i < pend.size(); i++) if (pend[i].due <= now) begin
      ret_valid <= 1'b1;
      ret <= pend[i].r;
      pend.delete(i);
      break;
    end
  end
  // ---------------- remapping reference ----------------
  localparam addr_t S0 = 32'h8000_0000, S1 = 32'h8100_0000, S2 = 32'h8200_0000, S3 = 32'h8300_0000;
  localparam addr_t IVB = 32'h0030_0000;
  function automatic addr_t pt_of(int d); return 32'h0010_0000 + 32'(d * 32'h1000); endfunction
  function automatic logic [19:0] frame_of(int d, int vpn);
    return d == 3 ? 20'(32'h700 + (vpn * 5) % 16) : 20'(32'h400 + 32'h100 * d + vpn);
  endfunction
  function automatic addr_t xl(int d, logic [31:0] v); return {frame_of(d, int'(v >> 12)), v[11:0]}; endfunction
  function automatic logic [31:0] ive(int i); return 32'((i * 37 + 5) % 2000); endfunction
  function automatic line_t gather(int d, addr_t sa);
    line_t l; logic [31:0] so, idx, v;
    l = '0;
    case (d)
      0: begin so = sa - S0; idx = so >> 2;
        for (int k = 0; k < 32; k++) begin v = (idx + 32'(k)) * 48 + 8; l[32*k +: 32] = rdw(xl(0, v)); end end
      1: begin so = sa - S1; idx = so >> 3;
        for (int k = 0; k < 16; k++) begin
          v = ive(int'(idx) + k) * 24;
          l[64*k +: 32] = rdw(xl(1, v)); l[64*k + 32 +: 32] = rdw(xl(1, v + 4));
        end end
      2: begin so = sa - S2; v = (so >> 17) * 32768 + (so & 32'h1FFFF) - 65536; l = rdl(xl(2, v)); end
      default: begin so = sa - S3; l = rdl(xl(3, so)); end
    endcase
    return l;
  endfunction
  // ---------------- drivers ----------------
  task automatic cfg(int r, logic [31:0] v);
    @(negedge clk); cfg_we = 1; cfg_reg = 5'(r); cfg_data = v;
    @(posedge clk); #1 cfg_we = 0;
  endtask
  task automatic setup(int d, int mode, addr_t st, addr_t en, int stride, int obj_lg, int ooff, int cl = 0, int cs = 0, int co = 0);
    cfg(31, d); cfg(1, st); cfg(2, en); cfg(3, stride); cfg(4, obj_lg); cfg(5, ooff);
    cfg(6, 2); cfg(7, IVB); cfg(8, pt_of(d)); cfg(9, cl); cfg(10, cs); cfg(11, co); cfg(0, (mode << 1) | 1);
  endtask
  line_t exp_c [int];
  int tg = 0;
  task automatic send(bit w, addr_t a, line_t d, line_t e);
    @(negedge clk);
    in_valid = 1; in_txn.write = w; in_txn.addr = a; in_txn.tag = 12'(tg); in_txn.wdata = d;
    exp_c[tg] = w ? '0 : e;
    tg = (tg + 1) % 1024;
    #1 while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 in_valid = 0;
  endtask
  always @(negedge clk) cpl_ready = ($urandom % 3) != 0;
  always @(posedge clk) if (rst_n && cpl_valid && cpl_ready) begin
    checks++;
    if (!exp_c.exists(int'(cpl.tag))) begin failures++; $display("FAIL unexpected completion tag %0d", cpl.tag); end
    else begin
      if (!cpl.write && cpl.data !== exp_c[int'(cpl.tag)]) begin
        failures++;
        if (failures < 10) $display("FAIL completion tag %0d data %h.. exp %h..", cpl.tag, cpl.data[63:0], exp_c[int'(cpl.tag)][63:0]);
      end
      exp_c.delete(int'(cpl.tag));
    end
  end
  task automatic drain();
    int n; n = 0;
    while (exp_c.size() != 0 && n < 20000) begin @(posedge clk); n++; end
    repeat (20) @(posedge clk);
  endtask
  initial begin
    cfg_we = 0; cfg_reg = '0; cfg_data = '0; in_valid = 0; in_txn = '0; ret = '0;
    for (int d = 0; d < 4; d++) for (int p = 0; p < 64; p++) wrw(pt_of(d) + 32'(4 * p), {4'b1000, frame_of(d, p), 8'h00});
    for (int i = 0; i < 1024; i++) wrw(IVB + 32'(4 * i), ive(i));
    repeat (3) @(posedge clk);
    rst_n = 1;
    setup(0, 0, S0, S1, 48, 2, 8);
    setup(1, 1, S1, S2, 24, 3, 0);
    setup(2, 2, S2, S3, 0, 0, 0, 17, 32768, 65536);
    setup(3, 3, S3, 32'h8400_0000, 0, 0, 0);
    // gathers on every descriptor, interleaved
    for (int i = 0; i < 8; i++) begin
      send(0, S0 + 32'(128 * i), '0, gather(0, S0 + 32'(128 * i)));
      send(0, S1 + 32'(128 * i), '0, gather(1, S1 + 32'(128 * i)));
      send(0, S2 + 32'h0001_0000 + 32'(128 * i), '0, gather(2, S2 + 32'h0001_0000 + 32'(128 * i)));
      send(0, S3 + 32'(4096 * i), '0, gather(3, S3 + 32'(4096 * i)));
    end
    drain();
    // outside every region
    send(0, 32'h9000_0000, '0, '0);
    drain();
    // scatter then read back, strided and indirection vector
    for (int i = 0; i < 4; i++) begin
      line_t d; d = {32{$urandom}} ^ {1024{1'b1}} ^ line_t'($urandom);
      send(1, S0 + 32'h4000 + 32'(128 * i), d, '0);
      send(0, S0 + 32'h4000 + 32'(128 * i), '0, d);
      send(1, S1 + 32'h800 + 32'(128 * i), d, '0);
      send(0, S1 + 32'h800 + 32'(128 * i), '0, d);
      drain();
    end
    checks++;
    if (exp_c.size() != 0) begin failures++; $display("FAIL %0d completions missing", exp_c.size()); end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_wb == 0 || n_g == 0 || n_s == 0 || n_exc != 0) begin
      failures++; $display("FAIL events hit %0d miss %0d wb %0d gather %0d scatter %0d exc %0d", n_hit, n_miss, n_wb, n_g, n_s, n_exc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
