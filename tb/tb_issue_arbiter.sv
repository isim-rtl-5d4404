// Self-checking test of issue_arbiter: random queue states are applied and
// the selection is compared every cycle with a reference written from the
// issue rules (drain first, then ready-queue overflow or an empty read queue,
// otherwise the read queue), including the drain flag's set and clear.
module tb_issue_arbiter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic go, read_valid, ready_valid, ready_head_is_read, ready_read_ok, set_drain;
  logic [3:0] ready_len;
  logic sel_read, sel_ready, draining;
  issue_arbiter dut (.*);
  int checks = 0, failures = 0;
  bit drain_m = 0;
  int n_ovf = 0, n_drain = 0;
  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    {go, read_valid, ready_valid, ready_head_is_read, ready_read_ok, set_drain, ready_len} = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      bit er, ey;
      @(negedge clk);
      go = ($urandom % 5) != 0;
      read_valid = $urandom;
      ready_len = 4'($urandom % 6);
      ready_valid = ready_len != 0;
      ready_head_is_read = ($urandom % 3) == 0;
      ready_read_ok = ($urandom % 4) != 0;
      set_drain = ($urandom % 16) == 0;
      #1;
      er = 0; ey = 0;
      if (go) begin
        if (drain_m) ey = ready_valid && (!ready_head_is_read || ready_read_ok);
        else if (ready_valid && (ready_len > 2 || !read_valid))
          ey = ready_valid && (!ready_head_is_read || ready_read_ok);
        else er = read_valid;
      end
      checks++;
      if (sel_read !== er || sel_ready !== ey || draining !== drain_m) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d sel %b%b exp %b%b drain %b exp %b", c, sel_read, sel_ready, er, ey, draining, drain_m);
      end
      if (ey && !drain_m && ready_len > 2 && read_valid) n_ovf++;
      if (ey && drain_m) n_drain++;
      @(posedge clk);
      if (set_drain) drain_m = 1;
      else if (ey && ready_head_is_read) drain_m = 0;
    end
    checks++;
    if (n_ovf == 0 || n_drain == 0) begin failures++; $display("FAIL overflow or drain issue never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
