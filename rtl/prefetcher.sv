// Memory-controller based prefetcher for non-shadow data. When a demand read
// returns from DRAM (`trig_*`), the next sequential line becomes a prefetch
// candidate. The candidate is held in a one-entry register and offered on
// pf_* according to `mode`, the issue-time option of the source design:
//   bit 0 set         prefetch non-shadow data at all,
//   bit 2 set         issue only when read and ready queues are empty,
//   bit 3 set         issue only when the MMC has nothing outstanding,
//   neither 2 nor 3   issue as soon as the address is generated.
// A newer candidate replaces one not yet issued. Shadow-data (stride)
// prefetching is not part of this block.
module prefetcher
  import impulse_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] mode,
  input  logic       queues_empty,
  input  logic       mmc_idle,
  input  logic       trig_valid,
  input  addr_t      trig_addr,
  output logic       pf_valid,
  input  logic       pf_ready,
  output addr_t      pf_addr
);
  logic  v_q;
  addr_t a_q;
  logic  allow;
  assign allow    = mode[3] ? mmc_idle : (mode[2] ? queues_empty : 1'b1);
  assign pf_valid = v_q && allow;
  assign pf_addr  = a_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0; a_q <= '0;
    end else if (trig_valid && mode[0]) begin
      v_q <= 1'b1;
      a_q <= {trig_addr[PA_W-1:OFF_W] + 1'b1, {OFF_W{1'b0}}};
    end else if (pf_valid && pf_ready) begin
      v_q <= 1'b0;
    end
  end
endmodule
