// Memory controller cache (MCache) for non-shadow data. 4 KB, 4-way set
// associative, physically indexed and tagged, one 128-byte line per L2 line.
// Each line has a used bit, a state bit (Prefetching or Valid), a 22-bit tag
// (the top address bits) and its data. The MCache only ever holds clean data:
// any write that matches a line invalidates it, so victims are simply dropped.
// Replacement is first-in first-out, one pointer per set; a line reserved for a
// prefetch still in flight is never the victim, and when all ways of the set
// are in that state a new prefetch is refused.
// Three operations, all taking effect at the clock edge:
//   lookup  (lk_*)  combinational result: lk_hit (Valid line, data on lk_data)
//                   or lk_pend (line being prefetched); a write invalidates.
//   reserve (pf_*)  pf_accept says the prefetch may go to DRAM and pf_way
//                   which line it would take; with pf_commit the line is
//                   reserved. Refused if the line is present or the set has
//                   no line free of a prefetch.
//   fill    (fill_*) prefetched data: the reserved line becomes Valid, unless
//                   a write invalidated it meanwhile.
// Sizes follow the source design; the field layout of a line is its own.
module mcache
  import impulse_pkg::*;
#(
  parameter int SIZE_BYTES = 4096,
  parameter int WAYS       = 4,
  localparam int SETS      = SIZE_BYTES / (WAYS * LINE_BYTES),
  localparam int IW        = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int TAGW      = 22,
  localparam int WW        = $clog2(WAYS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          lk_valid,
  input  addr_t         lk_addr,
  input  logic          lk_write,
  output logic          lk_hit,
  output logic          lk_pend,
  output line_t         lk_data,
  input  logic          pf_valid,
  input  logic          pf_commit,
  input  addr_t         pf_addr,
  output logic          pf_accept,
  output logic [WW-1:0] pf_way,
  input  logic          fill_valid,
  input  addr_t         fill_addr,
  input  line_t         fill_data
);
  localparam logic ST_PREF = 1'b0, ST_VALID = 1'b1;
  logic            used  [SETS][WAYS];
  logic            state [SETS][WAYS];
  logic [TAGW-1:0] tag   [SETS][WAYS];
  line_t           data  [SETS][WAYS];
  logic [WW-1:0]   fifo_q [SETS];

  function automatic logic [IW-1:0] idx(addr_t a);
    return a[OFF_W +: IW];
  endfunction
  function automatic logic [TAGW-1:0] tg(addr_t a);
    return a[PA_W-1 -: TAGW];
  endfunction

  logic [WW-1:0] lk_way;
  always_comb begin
    lk_hit  = 1'b0;
    lk_pend = 1'b0;
    lk_way  = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (used[idx(lk_addr)][w] && tag[idx(lk_addr)][w] == tg(lk_addr)) begin
        lk_way = WW'(w);
        if (state[idx(lk_addr)][w] == ST_VALID) lk_hit = lk_valid;
        else lk_pend = lk_valid;
      end
    end
    lk_data = data[idx(lk_addr)][lk_way];
  end

  // Prefetch reservation: FIFO order, skipping lines still being prefetched
  always_comb begin
    logic present;
    present   = 1'b0;
    pf_accept = 1'b0;
    pf_way    = '0;
    for (int w = 0; w < WAYS; w++)
      if (used[idx(pf_addr)][w] && tag[idx(pf_addr)][w] == tg(pf_addr)) present = 1'b1;
    for (int i = WAYS - 1; i >= 0; i--) begin
      logic [WW-1:0] w;
      w = WW'(int'(fifo_q[idx(pf_addr)]) + i);
      if (!(used[idx(pf_addr)][w] && state[idx(pf_addr)][w] == ST_PREF)) begin
        pf_accept = pf_valid && !present;
        pf_way    = w;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        fifo_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) begin
          used[s][w] <= 1'b0; state[s][w] <= ST_VALID; tag[s][w] <= '0;
        end
      end
    end else begin
      if (fill_valid) begin
        for (int w = 0; w < WAYS; w++)
          if (used[idx(fill_addr)][w] && state[idx(fill_addr)][w] == ST_PREF &&
              tag[idx(fill_addr)][w] == tg(fill_addr)) begin
            state[idx(fill_addr)][w] <= ST_VALID;
            data[idx(fill_addr)][w]  <= fill_data;
          end
      end
      if (pf_accept && pf_commit) begin
        used[idx(pf_addr)][pf_way]  <= 1'b1;
        state[idx(pf_addr)][pf_way] <= ST_PREF;
        tag[idx(pf_addr)][pf_way]   <= tg(pf_addr);
        fifo_q[idx(pf_addr)]        <= WW'(pf_way + 1'b1);
      end
      if (lk_valid && lk_write && (lk_hit || lk_pend)) used[idx(lk_addr)][lk_way] <= 1'b0;
    end
  end
endmodule
