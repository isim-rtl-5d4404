// Round-robin arbiter: grants the first requester after the one granted last.
// `grant_valid`/`grant` are combinational from `req`; the pointer moves when
// `advance` is high (the grant was used).
module rr_arbiter #(
  parameter int N = 4,
  localparam int W = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic         grant_valid,
  output logic [W-1:0] grant
);
  logic [W-1:0] last_q;
  always_comb begin
    grant_valid = 1'b0;
    grant       = '0;
    for (int i = N; i >= 1; i--) begin
      int c;
      c = (int'(last_q) + i) % N;
      if (req[c]) begin
        grant_valid = 1'b1;
        grant       = W'(c);
      end
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_q <= W'(N - 1);
    else if (advance && grant_valid) last_q <= grant;
  end
endmodule
