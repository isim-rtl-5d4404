// Issue arbiter of the master memory controller: decides, each cycle, whether
// the read queue (fast reads) or the ready queue (writes, copyouts and
// reissued logically ordered reads) sends its head to the DRAM backend.
// Order of precedence, as the controller's issue algorithm defines it:
//   1. after a fast-read conflict (`set_drain`) the ready queue is drained
//      until the reissued read leaves it;
//   2. the ready queue issues when it holds more than READYQ_OFLOW entries or
//      when the read queue is empty;
//   3. otherwise the read queue issues.
// `go` says the downstream path and the slave counter can take a transaction;
// `ready_read_ok` is low while a reissued read could not be given a data
// return slot. The selection is combinational; the drain flag is a register
// cleared in the cycle the read at the head of the ready queue issues.
// READYQ_OFLOW has no value in the source design; 2 is this design's choice
// (the ready queue holds at most NUM_WDR-1 accepted writes plus one read).
module issue_arbiter #(
  parameter int READYQ_OFLOW = 2,
  parameter int LEN_W        = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             go,
  input  logic             read_valid,
  input  logic             ready_valid,
  input  logic             ready_head_is_read,
  input  logic [LEN_W-1:0] ready_len,
  input  logic             ready_read_ok,
  input  logic             set_drain,
  output logic             sel_read,
  output logic             sel_ready,
  output logic             draining
);
  logic drain_q;
  logic ready_can;

  assign draining  = drain_q;
  assign ready_can = ready_valid && (!ready_head_is_read || ready_read_ok);

  always_comb begin
    sel_read  = 1'b0;
    sel_ready = 1'b0;
    if (go) begin
      if (drain_q) begin
        sel_ready = ready_can;
      end else if (ready_valid &&
                   (ready_len > LEN_W'(READYQ_OFLOW) || !read_valid)) begin
        sel_ready = ready_can;
      end else begin
        sel_read = read_valid;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drain_q <= 1'b0;
    else if (set_drain) drain_q <= 1'b1;
    else if (sel_ready && ready_head_is_read) drain_q <= 1'b0;
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) !(sel_read && sel_ready));
endmodule
