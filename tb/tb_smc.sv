// Self-checking test of smc (SMC 1 of 4, banks 1 and 5) driving a
// behavioural SDRAM. Checked: the ACT-to-READ gap equals tRCD (3), the
// READ-to-data gap equals tAA (3), a row conflict waits tRAS after ACT and
// tRP after PRE, data read back equal the data written (with byte masks),
// read tags come back with their data, accesses for other SMCs are refused,
// the refresh happens once per REF_PERIOD, and the DRAM sees no command for a
// closed row.
module tb_smc;
  import impulse_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic ra_valid, ra_ready, cmd_valid, dq_valid, rd_valid, stop, ev_row_hit, ev_row_miss, ev_refresh;
  mem_req_t ra_req;
  logic [2:0] cmd;
  logic [0:0] cmd_bank;
  logic [17:0] cmd_row;
  logic [3:0] cmd_col;
  line_t cmd_wdata, dq_data;
  mask_t cmd_wmask;
  mem_rsp_t rd_data;
  smc #(.SMC_ID(1)) dut (.*);
  dram_model #(.SMC_ID(1)) u_dram (.clk, .cmd_valid, .cmd, .bank(cmd_bank[0]), .row(cmd_row), .col(cmd_col),
    .wdata(cmd_wdata), .wmask(cmd_wmask), .dq_valid, .dq(dq_data));
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;
  initial begin
    repeat (30000) @(posedge clk);
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask
  // command trace
  longint t_act = -1, t_rd = -1, t_pre = -1, t_data = -1, pre_act = -1;
  bit rand_stop = 0;
  always @(negedge clk) stop = rand_stop && ($urandom % 5) == 0;
  int refreshes = 0, hits = 0;
  always @(posedge clk) if (rst_n) begin
    if (cmd_valid && cmd == 3'd1) begin t_act = cyc; if (t_pre >= 0) pre_act = cyc - t_pre; end
    if (cmd_valid && cmd == 3'd2 && t_rd < 0) t_rd = cyc;
    if (cmd_valid && cmd == 3'd4) t_pre = cyc;
    if (ev_refresh) refreshes++;
    if (ev_row_hit) hits++;
  end
  // reference memory and outstanding reads
  line_t mem [logic [24:0]];
  line_t exp_rd [int];
  function automatic line_t cur(addr_t a);
    return mem.exists(a[31:7]) ? mem[a[31:7]] : u_dram.pattern(a[31:7]);
  endfunction
  always @(posedge clk) if (rst_n && rd_valid) begin
    if (t_data < 0) t_data = cyc;
    checks++;
    if (!exp_rd.exists(int'(rd_data.tag)) || rd_data.data !== exp_rd[int'(rd_data.tag)]) begin
      failures++;
      if (failures < 10) $display("FAIL read tag %0d data %h", rd_data.tag, rd_data.data[31:0]);
    end
    exp_rd.delete(int'(rd_data.tag));
  end
  int tagc = 0;
  function automatic addr_t mk(int bsel, int row, int col);  // bank 1 or 5 of this SMC
    return addr_t'(row) << 14 | addr_t'(col) << 10 | addr_t'(bsel ? 5 : 1) << 7;
  endfunction
  task automatic send(bit w, addr_t a, line_t d = '0, mask_t m = '1);
    @(negedge clk);
    ra_valid = 1; ra_req.write = w; ra_req.addr = a; ra_req.wdata = d; ra_req.wmask = m;
    ra_req.tag = 12'(tagc);
    if (!w) exp_rd[tagc] = cur(a);
    else begin
      line_t l;
      l = cur(a);
      for (int b = 0; b < 128; b++) if (m[b]) l[8*b +: 8] = d[8*b +: 8];
      mem[a[31:7]] = l;
    end
    tagc = (tagc + 1) % 4096;
    #1 while (!ra_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1 ra_valid = 0;
  endtask
  initial begin
    ra_valid = 0; ra_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // other SMCs' banks are refused
    @(negedge clk); ra_valid = 1; ra_req = '0; ra_req.addr = 32'h0000_0100; #1;
    chk(!ra_ready, "accepted an access for bank 2");
    @(negedge clk); ra_valid = 0;
    // single read on an idle bank: ACT, tRCD, READ, tAA, data
    send(0, mk(0, 10, 2));
    repeat (20) @(posedge clk);
    chk(t_rd - t_act == 3, $sformatf("ACT to READ %0d cycles, expected tRCD=3", t_rd - t_act));
    chk(t_data - t_rd == 3, $sformatf("READ to data %0d cycles, expected tAA=3", t_data - t_rd));
    // row conflict: a read to another row of the same bank
    t_act = -1;
    send(0, mk(0, 11, 0));
    repeat (30) @(posedge clk);
    chk(pre_act == 3, $sformatf("PRE to ACT %0d cycles, expected tRP=3", pre_act));
    // masked write, then read back
    send(1, mk(1, 3, 4), {32{32'hCAFE_F00D}}, mask_t'(128'h0000_FFFF_0000_FFFF_0000_FFFF_0000_FFFF));
    send(0, mk(1, 3, 4));
    repeat (30) @(posedge clk);
    // random traffic over two banks and a few rows
    rand_stop = 1;
    for (int i = 0; i < 300; i++) begin
      logic [127:0] m;
      m = {$urandom, $urandom, $urandom, $urandom};
      send($urandom % 3 == 0, mk($urandom % 2, $urandom % 3, $urandom % 16), {32{$urandom}}, ($urandom % 2) ? '1 : m);
    end
    rand_stop = 0;
    repeat (200) @(posedge clk);
    chk(exp_rd.size() == 0, $sformatf("%0d reads never returned", exp_rd.size()));
    // idle long enough for refreshes
    repeat (3300) @(posedge clk);
    chk(refreshes >= 2, $sformatf("%0d refreshes in %0d cycles", refreshes, cyc));
    chk(hits > 0, "no row hits");
    chk(u_dram.errors == 0, "DRAM saw commands to closed rows");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
