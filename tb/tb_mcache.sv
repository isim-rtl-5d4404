// Self-checking test of mcache: reservation of a line for a prefetch
// (Prefetching state, seen by lookups as a pending hit), the fill that makes
// it Valid, hits returning the filled data in the same cycle, FIFO
// replacement within a set, refusal to victimize lines still being
// prefetched, refusal of a line already present, and write-invalidate (also
// of a line still being prefetched, whose late fill must then be dropped).
module tb_mcache;
  import impulse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic lk_valid, lk_write, lk_hit, lk_pend, pf_valid, pf_commit, pf_accept, fill_valid;
  addr_t lk_addr, pf_addr, fill_addr;
  line_t lk_data, fill_data;
  logic [1:0] pf_way;
  mcache dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  function automatic addr_t la(int set, int t);  // line address in a set
    return addr_t'(t) << 10 | addr_t'(set) << 7;
  endfunction
  function automatic line_t pat(addr_t a);
    return {32{a ^ 32'h5A5A_0000}};
  endfunction
  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic look(addr_t a, bit w, output bit hit, output bit pend, output line_t d);
    @(negedge clk);
    lk_valid = 1; lk_addr = a; lk_write = w;
    #1 hit = lk_hit; pend = lk_pend; d = lk_data;
    @(posedge clk); #1 lk_valid = 0; lk_write = 0;
  endtask
  task automatic pf(addr_t a, output bit acc);
    @(negedge clk);
    pf_valid = 1; pf_commit = 1; pf_addr = a;
    #1 acc = pf_accept;
    @(posedge clk); #1 pf_valid = 0; pf_commit = 0;
  endtask
  task automatic fill(addr_t a);
    @(negedge clk);
    fill_valid = 1; fill_addr = a; fill_data = pat(a);
    @(posedge clk); #1 fill_valid = 0;
  endtask
  initial begin
    bit h, p, acc;
    line_t d;
    {lk_valid, lk_write, pf_valid, pf_commit, fill_valid} = '0;
    lk_addr = '0; pf_addr = '0; fill_addr = '0; fill_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    look(la(0, 1), 0, h, p, d); chk(!h && !p, "empty cache hit");
    pf(la(0, 1), acc);          chk(acc, "prefetch refused in empty set");
    look(la(0, 1), 0, h, p, d); chk(!h && p, "no pending hit on Prefetching line");
    pf(la(0, 1), acc);          chk(!acc, "line prefetched twice");
    fill(la(0, 1));
    look(la(0, 1), 0, h, p, d); chk(h && !p && d == pat(la(0, 1)), "no hit after fill");
    // FIFO replacement: four more lines push out the first
    for (int t = 2; t <= 5; t++) begin
      pf(la(0, t), acc); chk(acc, "prefetch refused"); fill(la(0, t));
    end
    look(la(0, 1), 0, h, p, d); chk(!h && !p, "oldest line not replaced");
    for (int t = 2; t <= 5; t++) begin
      look(la(0, t), 0, h, p, d); chk(h && d == pat(la(0, t)), "newer line lost");
    end
    // Prefetching lines are not victimized
    for (int t = 1; t <= 4; t++) begin pf(la(1, t), acc); chk(acc, "reserve refused"); end
    pf(la(1, 9), acc); chk(!acc, "victimized a Prefetching line");
    fill(la(1, 2));
    pf(la(1, 9), acc); chk(acc, "Valid line not reused");
    look(la(1, 2), 0, h, p, d); chk(!h && !p, "wrong victim");
    // write-invalidate of a Valid line and of a Prefetching line
    look(la(0, 3), 1, h, p, d); chk(h, "write did not see the line");
    look(la(0, 3), 0, h, p, d); chk(!h && !p, "write did not invalidate");
    look(la(1, 3), 1, h, p, d); chk(p, "write did not see the Prefetching line");
    fill(la(1, 3));
    look(la(1, 3), 0, h, p, d); chk(!h && !p, "fill of invalidated line kept");
    // uncommitted reservation leaves the cache unchanged
    @(negedge clk); pf_valid = 1; pf_commit = 0; pf_addr = la(2, 7);
    @(posedge clk); #1 pf_valid = 0;
    look(la(2, 7), 0, h, p, d); chk(!h && !p, "uncommitted prefetch reserved a line");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
