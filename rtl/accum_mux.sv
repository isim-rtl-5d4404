// Data Accumulate/Mux chip. It buffers read data arriving from the RD busses
// of its slave memory controllers and forwards it, oldest first, onto one MD
// bus towards the DRAM dispatcher, so that an RD bus is free again as soon as
// its burst ends. All RD busses may deliver in the same cycle; they are stored
// in bus order. `stop` tells the SMCs not to start more reads: it is raised
// when fewer than 2*NUM_RD slots are free (a read already started on each bus
// still fits). The queue depth and that margin are this design's choices.
module accum_mux
  import impulse_pkg::*;
#(
  parameter int NUM_RD = 2,
  parameter int DEPTH  = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [NUM_RD-1:0] rd_valid,
  input  mem_rsp_t    rd_data [NUM_RD],
  output logic        md_valid,
  input  logic        md_ready,
  output mem_rsp_t    md_data,
  output logic        stop
);
  localparam int AW = $clog2(DEPTH);
  mem_rsp_t mem [DEPTH];
  logic [AW-1:0] rp;
  logic [AW:0]   cnt;
  logic [AW:0]   npush;
  logic          pop;

  assign md_valid = (cnt != 0);
  assign md_data  = mem[rp];
  assign pop      = md_valid && md_ready;
  assign stop     = (DEPTH - int'(cnt)) < 2 * NUM_RD;

  always_comb begin
    npush = '0;
    for (int i = 0; i < NUM_RD; i++) npush += (AW+1)'(rd_valid[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp <= '0; cnt <= '0;
    end else begin
      if (pop) rp <= rp + 1'b1;
      cnt <= cnt + npush - (AW+1)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    logic [AW:0] k;
    k = '0;
    for (int i = 0; i < NUM_RD; i++) begin
      if (rd_valid[i]) begin
        mem[AW'(int'(rp) + int'(cnt) + int'(k))] <= rd_data[i];
        k = k + 1'b1;
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                   int'(cnt) + int'(npush) - int'(pop) <= DEPTH);
endmodule
