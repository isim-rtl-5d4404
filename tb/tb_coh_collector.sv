// Self-checking test of coh_collector: four modules answer coherency checks
// at random times; the combined answer for each transaction (COH_CPY over
// COH_SHR over COH_OK) must appear, in order, once every module has answered.
module tb_coh_collector;
  import impulse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [3:0] coh_valid;
  coh_e coh_status [4];
  logic res_valid, pop;
  coh_e res;
  coh_collector dut (.*);
  int checks = 0, failures = 0;
  coh_e ans [4][$];
  int sent [4];
  coh_e exp_q [$];
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int got, seen_cpy, seen_shr;
    got = 0; seen_cpy = 0; seen_shr = 0;
    coh_valid = '0; pop = 0;
    for (int m = 0; m < 4; m++) coh_status[m] = COH_OK;
    // 200 transactions with random answers
    for (int t = 0; t < 200; t++) begin
      coh_e c, r;
      r = COH_OK;
      for (int m = 0; m < 4; m++) begin
        int x;
        x = $urandom % 10;
        c = x == 0 ? COH_CPY : (x < 3 ? COH_SHR : COH_OK);
        ans[m].push_back(c);
        if (c == COH_CPY) r = COH_CPY;
        else if (c == COH_SHR && r != COH_CPY) r = COH_SHR;
      end
      exp_q.push_back(r);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000 && got < 200; cyc++) begin
      @(negedge clk);
      for (int m = 0; m < 4; m++) begin
        coh_valid[m] = 0;
        // keep each module at most 6 answers ahead of the consumer
        if (ans[m].size() > 0 && (200 - ans[m].size()) - got < 6 && ($urandom % 3 == 0)) begin
          coh_valid[m] = 1;
          coh_status[m] = ans[m].pop_front();
        end
      end
      pop = res_valid && ($urandom % 2);
      if (pop) begin
        checks++;
        if (res !== exp_q[0]) begin
          failures++;
          if (failures < 10) $display("FAIL transaction %0d res %0d exp %0d", got, res, exp_q[0]);
        end
        if (res == COH_CPY) seen_cpy++;
        if (res == COH_SHR) seen_shr++;
        void'(exp_q.pop_front());
        got++;
      end
    end
    @(negedge clk); coh_valid = '0; pop = 0;
    checks++;
    if (got != 200 || seen_cpy == 0 || seen_shr == 0) begin
      failures++; $display("FAIL only %0d results (cpy %0d shr %0d)", got, seen_cpy, seen_shr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
