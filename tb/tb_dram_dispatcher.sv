// Self-checking test of dram_dispatcher: two SA sources and two MD sources
// offer random traffic (holding each item until it is taken) while the RA
// sinks accept at random. Every request must reach the RA bus of its bank
// (bank mod 2) exactly once and in its source's order, every data item must
// reach the SD bus named by its top tag bit in the cycle it is taken, and
// under contention the round robin must serve both sources.
module tb_dram_dispatcher;
  import impulse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0] sa_valid, sa_ready, ra_valid, ra_ready, md_valid, md_ready, sd_valid;
  mem_req_t sa_req [2], ra_req [2];
  mem_rsp_t md_rsp [2], sd_rsp [2];
  logic ev_contention;
  dram_dispatcher dut (.*);
  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  int sent [2], got_ra = 0, got_sd = 0, cont = 0;
  int wins [2];
  initial begin
    sa_valid = 0; md_valid = 0; ra_ready = 0;
    for (int i = 0; i < 2; i++) begin sa_req[i] = '0; md_rsp[i] = '0; sent[i] = 0; wins[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      // new items where the old ones were taken (or none yet)
      for (int i = 0; i < 2; i++) begin
        if (!sa_valid[i] && ($urandom % 2)) begin
          sa_valid[i] = 1;
          sa_req[i].addr = {$urandom} & ~32'h7F;
          if (c > 3000) sa_req[i].addr[7] = 1'b1;   // heavy contention at the end
          sa_req[i].tag = {1'(i), 11'(sent[i])};
          sa_req[i].write = $urandom;
          sent[i]++;
        end
        if (!md_valid[i] && ($urandom % 2)) begin
          md_valid[i] = 1;
          md_rsp[i].tag = 12'($urandom);
          md_rsp[i].data = {32{$urandom}};
        end
        ra_ready[i] = ($urandom % 4) != 0;
      end
      #1;
      // check RA outputs
      for (int r = 0; r < 2; r++) if (ra_valid[r] && ra_ready[r]) begin
        int s;
        s = ra_req[r].tag[11];
        checks++;
        if (int'(ra_req[r].addr[9:7]) % 2 != r || !sa_valid[s] || ra_req[r] !== sa_req[s] || !sa_ready[s]) begin
          failures++;
          if (failures < 10) $display("FAIL RA %0d got wrong request from SA %0d", r, s);
        end
        got_ra++;
        if (c > 3000) wins[s]++;
      end
      for (int s = 0; s < 2; s++) if (sa_ready[s]) begin
        int r;
        r = int'(sa_req[s].addr[9:7]) % 2;
        checks++;
        if (!(ra_valid[r] && ra_ready[r] && ra_req[r] === sa_req[s])) begin failures++; $display("FAIL SA %0d taken but not forwarded", s); end
      end
      // check SD outputs
      for (int m = 0; m < 2; m++) if (md_valid[m] && md_ready[m]) begin
        int d;
        d = md_rsp[m].tag[11];
        checks++;
        if (!sd_valid[d] || sd_rsp[d] !== md_rsp[m]) begin failures++; $display("FAIL MD %0d not on SD %0d", m, d); end
        got_sd++;
      end
      for (int d = 0; d < 2; d++) if (sd_valid[d]) begin
        int n;
        n = 0;
        for (int m = 0; m < 2; m++) if (md_valid[m] && md_ready[m] && md_rsp[m].tag[11] == d) n++;
        checks++;
        if (n != 1) begin failures++; $display("FAIL SD %0d valid without exactly one MD taken", d); end
      end
      if (ev_contention) cont++;
      @(posedge clk);
      #1;
      for (int i = 0; i < 2; i++) begin
        if (sa_valid[i] && sa_ready[i]) sa_valid[i] = 0;
        if (md_valid[i] && md_ready[i]) md_valid[i] = 0;
      end
    end
    checks++;
    if (got_ra < 1000 || got_sd < 1000 || cont == 0 || wins[0] < 50 || wins[1] < 50) begin
      failures++; $display("FAIL traffic ra %0d sd %0d contention %0d wins %0d/%0d", got_ra, got_sd, cont, wins[0], wins[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
