// Memory controller TLB (MTLB). Translates the pseudo-virtual offsets that the
// shadow descriptors produce into physical addresses, using the dense, flat
// page table the operating system builds for each remapping (base address
// `ptable` of the requesting descriptor, one 4-byte entry per 4 KB page).
// Organisation: ENTRIES entries, WAYS-way set associative; each entry holds
// valid, locked, a tag made of the descriptor number and the pseudo-virtual
// page number, a 16-bit reference count and the 4-byte page-table entry.
// Page-table entry: valid[31] ref[30] modify[29] fault[28] frame[27:8]
// unused[7:0] (field order as defined for the design, bit positions chosen
// here). Replacement is not-recently-used: the unlocked entry of the set with
// the lowest reference count is replaced, and all counts are cleared every
// RESETCOUNT translations.
// Flow of one lookup (held in a one-entry stage):
//   hit                 -> physical address = frame : page offset, sent on
//                          `out` in the same cycle (one lookup per cycle);
//   hit, first reference or first write to the page
//                       -> the entry's ref/modify bit is set and the entry
//                          written back to the page table first;
//   miss, in the buffer -> one extra cycle loads the entry from the PTE buffer;
//   miss, not buffered  -> a read of the 128-byte line holding 32 entries is
//                          sent, the victim entry is locked until it returns.
// Lookups with `phys` set bypass translation. An entry whose valid bit is
// clear raises `exception` and the access still goes to frame 0 of its page
// table entry (page faults are not handled by the design). Fill and
// write-back requests take the `out` port ahead of translated accesses.
// Sizes (ENTRIES, WAYS, RESETCOUNT, a one-line buffer) are this design's
// choices.
module mtlb
  import impulse_pkg::*;
#(
  parameter int ENTRIES    = 32,
  parameter int WAYS       = 2,
  parameter int RESETCOUNT = 1024
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in_valid,
  output logic     in_ready,
  input  tl_req_t  in_req,
  output logic     out_valid,
  input  logic     out_ready,
  output mem_req_t out_req,
  input  logic     fill_valid,
  input  line_t    fill_data,
  output logic     exception,
  output logic     ev_hit,
  output logic     ev_miss,
  output logic     ev_buf_hit,
  output logic     ev_writeback
);
  localparam int SETS = ENTRIES / WAYS;
  localparam int SW   = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int KW   = 3 + 20;

  logic              ent_v   [ENTRIES];
  logic              ent_lk  [ENTRIES];
  logic [KW-1:0]     ent_key [ENTRIES];
  logic [15:0]       ent_ref [ENTRIES];
  logic [31:0]       ent_pte [ENTRIES];

  logic    cur_v_q, wait_q;
  tl_req_t cur_q;
  line_t   buf_q;
  logic    buf_v_q;
  logic [PA_W-OFF_W-1:0] buf_line_q;
  logic [$clog2(RESETCOUNT+1)-1:0] ntrans_q;

  logic [19:0]   vpn;
  logic [KW-1:0] key;
  logic [SW-1:0] set;
  addr_t         pte_addr;
  logic          hit, buf_hit, need_wb;
  int            hit_idx, vic_idx;
  logic [31:0]   hpte, bpte, new_pte;

  always_comb begin
    int best;
    vpn      = cur_q.addr[31:12];
    key      = {cur_q.desc, vpn};
    set      = SW'(vpn);
    pte_addr = cur_q.ptable + {10'd0, vpn, 2'b00};
    buf_hit  = buf_v_q && buf_line_q == pte_addr[PA_W-1:OFF_W];
    bpte     = 32'(buf_q >> (8 * int'(pte_addr[OFF_W-1:0])));
    hit      = 1'b0;
    hit_idx  = 0;
    vic_idx  = int'(set) * WAYS;
    best     = 1 << 17;
    for (int w = WAYS - 1; w >= 0; w--) begin
      int i;
      i = int'(set) * WAYS + w;
      if (ent_v[i] && !ent_lk[i] && ent_key[i] == key) begin
        hit = 1'b1;
        hit_idx = i;
      end
    end
    // victim: the entry locked for the fill that just returned, else an
    // invalid entry, else the lowest reference count
    for (int w = WAYS - 1; w >= 0; w--) begin
      int i, score;
      i = int'(set) * WAYS + w;
      score = ent_lk[i] ? -2 : (ent_v[i] ? int'(ent_ref[i]) : -1);
      if (score <= best) begin
        best = score;
        vic_idx = i;
      end
    end
    hpte    = ent_pte[hit_idx];
    new_pte = hpte | 32'h4000_0000 | (cur_q.write ? 32'h2000_0000 : 32'h0);
    need_wb = hit && (!hpte[30] || (cur_q.write && !hpte[29]));
  end

  // Output port
  typedef enum logic [2:0] {A_NONE, A_PHYS, A_XLATE, A_WB, A_FILL, A_LOAD} act_e;
  act_e act;
  always_comb begin
    act     = A_NONE;
    out_req = '0;
    out_valid = 1'b0;
    if (cur_v_q && !wait_q) begin
      if (cur_q.phys) act = A_PHYS;
      else if (hit && need_wb) act = A_WB;
      else if (hit) act = A_XLATE;
      else if (buf_hit) act = A_LOAD;
      else act = A_FILL;
    end
    unique case (act)
      A_PHYS, A_XLATE: begin
        out_valid     = 1'b1;
        out_req.write = cur_q.write;
        out_req.addr  = (act == A_PHYS) ? cur_q.addr : {hpte[27:8], cur_q.addr[11:0]};
        out_req.addr[OFF_W-1:0] = '0;
        out_req.tag   = cur_q.tag;
        out_req.wmask = cur_q.wmask;
        out_req.wdata = cur_q.wdata;
      end
      A_WB: begin
        out_valid     = 1'b1;
        out_req.write = 1'b1;
        out_req.addr  = {pte_addr[PA_W-1:OFF_W], {OFF_W{1'b0}}};
        out_req.tag   = {1'b1, 1'b1, DESC_MTLB, 7'd1};
        out_req.wmask = mask_t'(4'hF) << pte_addr[OFF_W-1:0];
        out_req.wdata = line_t'(new_pte) << (8 * int'(pte_addr[OFF_W-1:0]));
      end
      A_FILL: begin
        out_valid     = 1'b1;
        out_req.addr  = {pte_addr[PA_W-1:OFF_W], {OFF_W{1'b0}}};
        out_req.tag   = {1'b1, 1'b1, DESC_MTLB, 7'd0};
      end
      default: ;
    endcase
  end

  logic done;
  assign done      = (act == A_PHYS || act == A_XLATE) && out_ready;
  assign in_ready  = !cur_v_q || done;
  assign exception = act == A_XLATE && out_ready && !hpte[31];
  assign ev_hit       = act == A_XLATE && out_ready;
  assign ev_miss      = (act == A_LOAD) || (act == A_FILL && out_ready);
  assign ev_buf_hit   = act == A_LOAD;
  assign ev_writeback = act == A_WB && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_v_q <= 1'b0; cur_q <= '0; wait_q <= 1'b0; buf_q <= '0; buf_v_q <= 1'b0;
      buf_line_q <= '0; ntrans_q <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        ent_v[i] <= 1'b0; ent_lk[i] <= 1'b0; ent_key[i] <= '0; ent_ref[i] <= '0; ent_pte[i] <= '0;
      end
    end else begin
      if (in_valid && in_ready) begin
        cur_v_q <= 1'b1;
        cur_q   <= in_req;
      end else if (done) begin
        cur_v_q <= 1'b0;
      end
      unique case (act)
        A_XLATE: if (out_ready) begin
          if (ntrans_q == $bits(ntrans_q)'(RESETCOUNT - 1)) begin
            ntrans_q <= '0;
            for (int i = 0; i < ENTRIES; i++) ent_ref[i] <= '0;
          end else begin
            ntrans_q <= ntrans_q + 1'b1;
            if (ent_ref[hit_idx] != '1) ent_ref[hit_idx] <= ent_ref[hit_idx] + 1'b1;
          end
        end
        A_WB: if (out_ready) begin
          ent_pte[hit_idx] <= new_pte;
          if (buf_hit) buf_q[8 * int'(pte_addr[OFF_W-1:0]) +: 32] <= new_pte;
        end
        A_LOAD: begin
          ent_v[vic_idx]   <= 1'b1;
          ent_lk[vic_idx]  <= 1'b0;
          ent_key[vic_idx] <= key;
          ent_ref[vic_idx] <= '0;
          ent_pte[vic_idx] <= bpte;
        end
        A_FILL: if (out_ready) begin
          wait_q          <= 1'b1;
          ent_lk[vic_idx] <= 1'b1;
          ent_v[vic_idx]  <= 1'b0;
        end
        default: ;
      endcase
      if (wait_q && fill_valid) begin
        wait_q     <= 1'b0;
        buf_q      <= fill_data;
        buf_v_q    <= 1'b1;
        buf_line_q <= pte_addr[PA_W-1:OFF_W];
      end
    end
  end
endmodule
