// Coherency collector of the MMC. Every bus module snoops each coherent
// transaction and reports COH_OK, COH_SHR or COH_CPY on its own COH lines, at
// its own pace but in the order the transactions appeared on the bus. One
// FIFO per module absorbs the reports; when every FIFO holds a report, the
// oldest coherent transaction's result is available: COH_CPY if any module has
// a modified copy, else COH_SHR if any holds it shared, else COH_OK. `pop`
// consumes one report from every module. A report arriving when that module's
// FIFO is full is dropped and flagged by an assertion; the bus's predictive
// flow control keeps it from happening. The code values and FIFO depth are
// this design's choices.
module coh_collector
  import impulse_pkg::*;
#(
  parameter int NUM_MODULES = 4,
  parameter int DEPTH       = 8
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NUM_MODULES-1:0] coh_valid,
  input  coh_e                   coh_status [NUM_MODULES],
  output logic                   res_valid,
  output coh_e                   res,
  input  logic                   pop
);
  logic [NUM_MODULES-1:0] empty, full;
  logic [1:0] head [NUM_MODULES];

  for (genvar m = 0; m < NUM_MODULES; m++) begin : g_mod
    sync_fifo #(.WIDTH(2), .DEPTH(DEPTH)) u_q (
      .clk, .rst_n,
      .push(coh_valid[m] && !full[m]), .wdata(coh_status[m]),
      .pop(pop && res_valid), .rdata(head[m]),
      .full(full[m]), .empty(empty[m]), .count());
  end

  always_comb begin
    logic any_cpy, any_shr;
    any_cpy = 1'b0;
    any_shr = 1'b0;
    for (int m = 0; m < NUM_MODULES; m++) begin
      any_cpy |= (head[m] == COH_CPY);
      any_shr |= (head[m] == COH_SHR);
    end
    res_valid = (empty == '0);
    res = any_cpy ? COH_CPY : (any_shr ? COH_SHR : COH_OK);
  end

  for (genvar m = 0; m < NUM_MODULES; m++) begin : g_chk
    a_no_drop: assert property (@(posedge clk) disable iff (!rst_n) coh_valid[m] |-> !full[m]);
  end
endmodule
