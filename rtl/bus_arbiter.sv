// Arbiter of the system memory bus. The bus arbitration is distributed: every
// module sees the request lines and computes the same winner. This module
// computes that common decision once. Priorities, highest first:
//   1. the current owner while it holds the long-transaction signal
//      (at most MAX_LONG extra cycles),
//   2. the MMC returning read data,
//   3. the I/O adapter,
//   4. the CPUs, in round-robin order.
// Timing: requests are sampled in the first cycle, the winner is decided in the
// second, and the winner drives the bus in the third, so `owner` follows a
// request by two clock edges. Owner codes: 0 = MMC, 1 = I/O adapter,
// 2.. = CPU 0.. . The cap on a long transaction is this design's choice.
module bus_arbiter #(
  parameter int NUM_CPU  = 2,
  parameter int MAX_LONG = 4,
  localparam int OW      = $clog2(NUM_CPU + 2)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               mmc_req,
  input  logic               ioa_req,
  input  logic [NUM_CPU-1:0] cpu_req,
  input  logic               long_req,     // driven by the current owner
  output logic               owner_valid,
  output logic [OW-1:0]      owner
);
  logic               mmc_q, ioa_q;
  logic [NUM_CPU-1:0] cpu_q;
  logic [$clog2(NUM_CPU)-1:0] rr_q;          // last CPU granted
  logic [$clog2(MAX_LONG+1)-1:0] long_cnt_q;
  logic               win_valid;
  logic [OW-1:0]      win;

  always_comb begin
    int c;
    c         = 0;
    win_valid = 1'b0;
    win       = '0;
    if (owner_valid && long_req && long_cnt_q < MAX_LONG[$bits(long_cnt_q)-1:0]) begin
      win_valid = 1'b1;
      win       = owner;
    end else if (mmc_q) begin
      win_valid = 1'b1;
      win       = OW'(0);
    end else if (ioa_q) begin
      win_valid = 1'b1;
      win       = OW'(1);
    end else begin
      for (int i = NUM_CPU; i >= 1; i--) begin
        c = (int'(rr_q) + i) % NUM_CPU;
        if (cpu_q[c]) begin
          win_valid = 1'b1;
          win       = OW'(c + 2);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mmc_q <= 1'b0; ioa_q <= 1'b0; cpu_q <= '0;
      owner_valid <= 1'b0; owner <= '0; rr_q <= '0; long_cnt_q <= '0;
    end else begin
      mmc_q <= mmc_req;
      ioa_q <= ioa_req;
      cpu_q <= cpu_req;
      owner_valid <= win_valid;
      owner <= win;
      if (win_valid && owner_valid && win == owner && long_req) long_cnt_q <= long_cnt_q + 1'b1;
      else long_cnt_q <= '0;
      if (win_valid && win >= OW'(2)) rr_q <= $bits(rr_q)'(win - OW'(2));
    end
  end
endmodule
