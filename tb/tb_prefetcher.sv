// Self-checking test of prefetcher: a returned demand read at line L must
// produce a prefetch request for line L+1 in the next cycle; a newer trigger
// replaces an unsent request; mode bit 0 turns prefetching off and mode bits
// 2 and 3 hold the request until the queues are empty or the MMC is idle.
module tb_prefetcher;
  import impulse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] mode;
  logic queues_empty, mmc_idle, trig_valid, pf_valid, pf_ready;
  addr_t trig_addr, pf_addr;
  prefetcher dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  bit pv; addr_t pa;
  int sent = 0;
  initial begin
    {mode, queues_empty, mmc_idle, trig_valid, pf_ready} = '0; trig_addr = '0;
    pv = 0; pa = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      bit allow, ev;
      @(negedge clk);
      if (c % 500 == 0) mode = (c < 500) ? 4'd1 : (c < 1000) ? 4'd5 : (c < 1500) ? 4'd9 : (c < 2000) ? 4'd0 : 4'd1;
      queues_empty = $urandom;
      mmc_idle = $urandom;
      pf_ready = ($urandom % 3) != 0;
      trig_valid = ($urandom % 7) == 0;
      trig_addr = $urandom;
      #1;
      allow = mode[3] ? mmc_idle : (mode[2] ? queues_empty : 1);
      ev = pv && allow;
      checks++;
      if (pf_valid !== ev || (ev && pf_addr !== pa)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d pf %b %h exp %b %h", c, pf_valid, pf_addr, ev, pa);
      end
      if (ev && pf_ready) sent++;
      if (trig_valid && mode[0]) begin pv = 1; pa = {trig_addr[31:7] + 25'd1, 7'd0}; end
      else if (ev && pf_ready) pv = 0;
    end
    checks++;
    if (sent < 10) begin failures++; $display("FAIL only %0d prefetches", sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
