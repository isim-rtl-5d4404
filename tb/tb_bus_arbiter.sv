// Self-checking test of bus_arbiter: random requests from the MMC, the I/O
// adapter and two CPUs. A reference arbiter gives the owner two cycles after
// the requests (the document's arbitration-to-access latency), the MMC before
// the I/O adapter before the CPUs, CPUs in round robin, and a long
// transaction keeps the bus for at most MAX_LONG extra cycles.
module tb_bus_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic mmc_req, ioa_req, long_req;
  logic [1:0] cpu_req;
  logic owner_valid;
  logic [1:0] owner;
  bus_arbiter dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // reference
  bit m_q, i_q; bit [1:0] c_q; bit ov; bit [1:0] ow; int rr, lc;
  int n_mmc = 0, n_cpu = 0, n_long = 0, n_lat = 0;
  initial begin
    {mmc_req, ioa_req, long_req, cpu_req} = '0;
    m_q = 0; i_q = 0; c_q = 0; ov = 0; ow = 0; rr = 0; lc = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // latency: a lone MMC request owns the bus two cycles later
    @(negedge clk); mmc_req = 1;
    @(negedge clk); mmc_req = 0;
    checks++; if (owner_valid) begin failures++; $display("FAIL owner after one cycle"); end
    @(negedge clk);
    checks++; if (!(owner_valid && owner == 0)) begin failures++; $display("FAIL MMC not owner after two cycles"); end
    else n_lat++;
    repeat (3) @(negedge clk);
    m_q = 0; i_q = 0; c_q = 0; ov = owner_valid; ow = owner; lc = 0;
    for (int c = 0; c < 3000; c++) begin
      bit wv; bit [1:0] w;
      @(negedge clk);
      checks++;
      if (owner_valid !== ov || (ov && owner !== ow)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d owner %b/%0d exp %b/%0d", c, owner_valid, owner, ov, ow);
      end
      mmc_req = ($urandom % 6) == 0;
      ioa_req = ($urandom % 8) == 0;
      cpu_req = 2'($urandom);
      long_req = ($urandom % 3) != 0;
      // reference for the next edge: registered requests, current long_req
      wv = 0; w = 0;
      if (ov && long_req && lc < 4) begin wv = 1; w = ow; n_long++; end
      else if (m_q) begin wv = 1; w = 0; n_mmc++; end
      else if (i_q) begin wv = 1; w = 1; end
      else for (int i = 2; i >= 1; i--) begin
        int k; k = (rr + i) % 2;
        if (c_q[k]) begin wv = 1; w = 2'(k + 2); end
      end
      if (wv && w >= 2) n_cpu++;
      lc = (wv && ov && w == ow && long_req) ? lc + 1 : 0;
      if (wv && w >= 2) rr = w - 2;
      m_q = mmc_req; i_q = ioa_req; c_q = cpu_req;
      ov = wv; ow = w;
    end
    checks++;
    if (n_mmc == 0 || n_cpu == 0 || n_long == 0) begin failures++; $display("FAIL mechanism missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
