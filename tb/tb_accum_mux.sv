// Self-checking test of accum_mux: two RD busses deliver data (together or
// one at a time) while the MD bus takes them at random; every item must come
// out once, in arrival order (RD bus 0 before RD bus 1 in the same cycle),
// and the stop signal must be raised whenever fewer than four slots are free.
module tb_accum_mux;
  import impulse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] rd_valid;
  mem_rsp_t rd_data [2];
  logic md_valid, md_ready, stop;
  mem_rsp_t md_data;
  accum_mux dut (.*);
  int checks = 0, failures = 0;
  mem_rsp_t q [$];
  int stops = 0;
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int outn;
    outn = 0;
    rd_valid = '0; md_ready = 0; rd_data[0] = '0; rd_data[1] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      checks++;
      if (stop !== (8 - q.size() < 4)) begin failures++; if (failures < 10) $display("FAIL stop %b with %0d held", stop, q.size()); end
      if (stop) stops++;
      md_ready = (c > 1500) ? ($urandom % 2) : ($urandom % 4 == 0);
      if (md_valid !== (q.size() != 0)) begin failures++; $display("FAIL md_valid"); end
      if (md_valid && md_ready) begin
        checks++;
        if (md_data !== q[0]) begin failures++; if (failures < 10) $display("FAIL item %0d tag %h exp %h", outn, md_data.tag, q[0].tag); end
        void'(q.pop_front());
        outn++;
      end
      for (int i = 0; i < 2; i++) begin
        rd_valid[i] = !stop && ($urandom % 3 == 0);
        rd_data[i].tag = 12'($urandom);
        rd_data[i].data = {32{$urandom}};
        if (rd_valid[i]) q.push_back(rd_data[i]);
      end
    end
    checks++;
    if (stops == 0 || outn < 100) begin failures++; $display("FAIL stops %0d items %0d", stops, outn); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
