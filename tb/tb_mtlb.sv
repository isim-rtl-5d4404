// Self-checking test of mtlb. The testbench holds four page tables in a small
// memory, answers page-table line reads after a random delay and applies
// page-table write-backs. Random translations from four descriptors over
// 48 pages each (more than the 32 entries) must produce frame:offset line
// addresses in request order; physical requests must pass unchanged; every
// referenced page must end with its reference bit set in memory and every
// written page with its modify bit; hits, misses, buffer hits and write-backs
// must all occur; the exception output must flag an invalid entry.
module tb_mtlb;
  import impulse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready, fill_valid, exception;
  logic ev_hit, ev_miss, ev_buf_hit, ev_writeback;
  tl_req_t in_req;
  mem_req_t out_req;
  line_t fill_data;
  mtlb dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // page tables: descriptor d at 0x0010_0000 + d*0x1000, page p -> frame 0x100*d + 3*p + 7
  line_t mem [logic [24:0]];
  function automatic addr_t pt_of(int d); return 32'h0010_0000 + 32'(d * 4096); endfunction
  function automatic logic [19:0] frame(int d, int p); return 20'(256 * d + 3 * p + 7); endfunction
  function automatic logic [31:0] pte_rd(addr_t a);
    line_t l; l = mem.exists(a[31:7]) ? mem[a[31:7]] : '0;
    return l[8 * int'(a[6:0]) +: 32];
  endfunction
  int n_hit = 0, n_miss = 0, n_buf = 0, n_wb = 0, n_exc = 0;
  always @(posedge clk) if (rst_n) begin
    n_hit += ev_hit; n_miss += ev_miss; n_buf += ev_buf_hit; n_wb += ev_writeback; n_exc += exception;
  end
  // memory side
  addr_t fill_q [$];
  int fill_delay = 0;
  mem_req_t exp_q [$];
  always @(negedge clk) out_ready = ($urandom % 4) != 0;
  always @(posedge clk) if (rst_n) begin
    fill_valid <= 1'b0;
    if (fill_q.size() > 0) begin
      if (fill_delay == 0) begin
        addr_t a;
        a = fill_q.pop_front();
        fill_valid <= 1'b1;
        fill_data  <= mem.exists(a[31:7]) ? mem[a[31:7]] : '0;
        fill_delay = 3 + $urandom % 6;
      end else fill_delay--;
    end
    if (out_valid && out_ready) begin
      if (out_req.tag == {1'b1, 1'b1, DESC_MTLB, 7'd0}) fill_q.push_back(out_req.addr);
      else if (out_req.tag == {1'b1, 1'b1, DESC_MTLB, 7'd1}) begin
        line_t l;
        l = mem.exists(out_req.addr[31:7]) ? mem[out_req.addr[31:7]] : '0;
        for (int b = 0; b < 128; b++) if (out_req.wmask[b]) l[8*b +: 8] = out_req.wdata[8*b +: 8];
        mem[out_req.addr[31:7]] = l;
      end else begin
        checks++;
        if (exp_q.size() == 0 || out_req !== exp_q[0]) begin
          failures++;
          if (failures < 10) $display("FAIL out %h tag %h exp %h tag %h", out_req.addr, out_req.tag,
                                      exp_q.size() ? exp_q[0].addr : 0, exp_q.size() ? exp_q[0].tag : 0);
        end
        if (exp_q.size()) void'(exp_q.pop_front());
      end
    end
  end
  bit used [4][48], wrote [4][48];
  task automatic send(tl_req_t r);
    @(negedge clk);
    in_valid = 1; in_req = r;
    #1 while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk); #1 in_valid = 0;
  endtask
  initial begin
    in_valid = 0; in_req = '0; fill_valid = 0; fill_data = '0;
    for (int d = 0; d < 4; d++)
      for (int p = 0; p < 48; p++) begin
        addr_t a; line_t l;
        a = pt_of(d) + 32'(4 * p);
        l = mem.exists(a[31:7]) ? mem[a[31:7]] : '0;
        l[8 * int'(a[6:0]) +: 32] = {4'b1000, frame(d, p), 8'h00};
        mem[a[31:7]] = l;
      end
    // an invalid entry: descriptor 5, page 0
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      tl_req_t r; mem_req_t e; int d, p;
      r = '0;
      d = $urandom % 4;
      p = (i % 3 == 0) ? $urandom % 48 : (i / 40) % 48;   // some locality
      r.phys = ($urandom % 10) == 0;
      r.write = ($urandom % 4) == 0;
      r.desc = 3'(d);
      r.addr = {8'd0, 12'(p), 12'($urandom)};
      if (r.phys) r.addr = $urandom;
      r.ptable = pt_of(d);
      r.tag = {1'b1, 1'b0, 3'(d), 7'(i)};
      r.wmask = mask_t'({$urandom, $urandom, $urandom, $urandom});
      r.wdata = {32{$urandom}};
      e.write = r.write; e.tag = r.tag; e.wmask = r.wmask; e.wdata = r.wdata;
      e.addr = r.phys ? r.addr : {frame(d, p), r.addr[11:0]};
      e.addr[6:0] = '0;
      if (!r.phys) begin
        used[d][p] = 1;
        if (r.write) wrote[d][p] = 1;
      end
      exp_q.push_back(e);
      send(r);
    end
    // invalid page-table entry
    begin
      tl_req_t r; mem_req_t e;
      r = '0; r.desc = 3'd5; r.ptable = 32'h0020_0000; r.tag = 12'h8AA;
      e = '0; e.tag = r.tag; e.wmask = '0; e.addr = '0;
      exp_q.push_back(e);
      send(r);
    end
    repeat (200) @(posedge clk);
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d translations missing", exp_q.size()); end
    for (int d = 0; d < 4; d++)
      for (int p = 0; p < 48; p++) begin
        logic [31:0] pte;
        pte = pte_rd(pt_of(d) + 32'(4 * p));
        checks++;
        if (pte[30] !== used[d][p] || pte[29] !== wrote[d][p] || pte[27:8] !== frame(d, p)) begin
          failures++;
          if (failures < 20) $display("FAIL PTE d%0d p%0d = %h (used %0d wrote %0d)", d, p, pte, used[d][p], wrote[d][p]);
        end
      end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_buf == 0 || n_wb == 0 || n_exc == 0) begin
      failures++; $display("FAIL events hit %0d miss %0d buf %0d wb %0d exc %0d", n_hit, n_miss, n_buf, n_wb, n_exc);
    end
    $display("hits %0d misses %0d buffer hits %0d write-backs %0d", n_hit, n_miss, n_buf, n_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
