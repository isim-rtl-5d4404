// One shadow descriptor of the Impulse remapping controller. It holds the
// control registers of one remapping (written by the operating system through
// cfg_we/cfg_reg/cfg_data), and serves one shadow transaction at a time:
//  - a shadow read of one line is split into `count` item accesses; for each
//    item the descriptor computes its pseudo-virtual offset (shadow_alu) and
//    sends it to the MTLB, one item per cycle while the MTLB accepts;
//  - for indirection-vector remapping it first needs the vector element: the
//    line holding it is fetched into a one-line iv buffer by a physical read,
//    then the element (zero-extended) is the index into the original array;
//  - returning DRAM lines are handled by the assembly logic: the object bytes
//    at the item's offset in the returned line are placed at position
//    k*object_size of the dense line; when all items are back the dense line
//    is handed out on done_*;
//  - a shadow write is scattered the same way: each item carries the object's
//    bytes moved to its line offset and a byte mask; done_* reports the write
//    once every item has been sent.
// Registers (cfg_reg): 0 {mode[2:1], enable[0]}, 1 saddr_start, 2 saddr_end,
// 3 stride_size, 4 log2 object_size, 5 object_offset, 6 log2 iv_elem_size,
// 7 iv_paddr_start, 8 ptable_ptr, 9 log2 cache way size, 10 color_size,
// 11 color_offset. The register numbering, the log2 encoding and the one-line
// iv buffer are this design's choices; objects must not cross a line
// boundary in DRAM. The descriptor's own buffer of prefetched shadow lines is
// not built.
module shadow_descriptor
  import impulse_pkg::*;
#(
  parameter int DESC_ID = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        cfg_we,
  input  logic [3:0]  cfg_reg,
  input  logic [31:0] cfg_data,
  output desc_cfg_t   cfg,
  // shadow transaction
  input  logic        req_valid,
  output logic        req_ready,
  input  mmc_txn_t    req,
  // to the MTLB
  output logic        tl_valid,
  input  logic        tl_ready,
  output tl_req_t     tl,
  // DRAM data for this descriptor
  input  logic        ret_valid,
  input  logic        ret_iv,        // the line is an iv fetch
  input  logic [6:0]  ret_k,
  input  line_t       ret_data,
  // completion
  output logic        done_valid,
  input  logic        done_ready,
  output cpl_t        done
);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_DONE} st_e;
  st_e st_q;
  mmc_txn_t cur_q;
  logic [7:0] k_q, nret_q, count;
  line_t dense_q;
  logic [OFF_W-1:0] off_q [128];
  line_t  ivbuf_q;
  logic   ivbuf_v_q, ivf_pend_q;
  logic [PA_W-OFF_W-1:0] ivbuf_line_q;
  logic [31:0] voffset, rindex;
  addr_t iv_paddr;
  logic [OFF_W-1:0] dense_off, ret_dense_off;
  logic [31:0] obj_bytes;
  logic iv_hit;

  // Control registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cfg <= '0;
    else if (cfg_we) begin
      unique case (cfg_reg)
        4'd0:  begin cfg.enable <= cfg_data[0]; cfg.mode <= remap_e'(cfg_data[2:1]); end
        4'd1:  cfg.saddr_start    <= cfg_data;
        4'd2:  cfg.saddr_end      <= cfg_data;
        4'd3:  cfg.stride_size    <= cfg_data;
        4'd4:  cfg.obj_lg         <= cfg_data[3:0];
        4'd5:  cfg.object_offset  <= cfg_data;
        4'd6:  cfg.iv_elem_lg     <= cfg_data[1:0];
        4'd7:  cfg.iv_paddr_start <= cfg_data;
        4'd8:  cfg.ptable_ptr     <= cfg_data;
        4'd9:  cfg.cache_lg       <= cfg_data[4:0];
        4'd10: cfg.color_size     <= cfg_data;
        4'd11: cfg.color_offset   <= cfg_data;
        default: ;
      endcase
    end
  end

  // Indirection vector element for item k
  always_comb begin
    line_t sh;
    sh     = ivbuf_q >> (8 * int'(iv_paddr[OFF_W-1:0]));
    unique case (cfg.iv_elem_lg)
      2'd0:    rindex = 32'(sh[7:0]);
      2'd1:    rindex = 32'(sh[15:0]);
      default: rindex = sh[31:0];
    endcase
  end
  assign iv_hit = ivbuf_v_q && ivbuf_line_q == iv_paddr[PA_W-1:OFF_W];

  shadow_alu u_alu (
    .cfg, .saddr(cur_q.addr), .k(k_q), .rindex,
    .count, .voffset, .iv_paddr, .dense_off);

  // Byte position of a returning item in the dense line
  assign obj_bytes     = 32'd1 << cfg.obj_lg;
  assign ret_dense_off = (cfg.obj_lg > 4'(OFF_W) || cfg.mode == RM_COLOR || cfg.mode == RM_SUPERPAGE)
                         ? '0 : OFF_W'(32'(ret_k) << cfg.obj_lg);

  // Request towards the MTLB
  always_comb begin
    logic need_iv;
    logic sm_obj;
    mask_t m;
    line_t d;
    need_iv  = cfg.mode == RM_INDIRECT && !iv_hit;
    sm_obj    = cfg.obj_lg < 4'(OFF_W) && (cfg.mode == RM_STRIDE || cfg.mode == RM_INDIRECT);
    m        = sm_obj ? mask_t'((LINE_BYTES'(1) << obj_bytes) - 1'b1) : '1;
    d        = cur_q.wdata >> (8 * int'(dense_off));
    tl       = '0;
    tl.desc  = 3'(DESC_ID);
    tl.ptable = cfg.ptable_ptr;
    tl_valid = 1'b0;
    if (st_q == S_ISSUE) begin
      if (need_iv) begin
        tl_valid = !ivf_pend_q;
        tl.phys  = 1'b1;
        tl.addr  = {iv_paddr[PA_W-1:OFF_W], {OFF_W{1'b0}}};
        tl.tag   = {1'b1, 1'b1, 3'(DESC_ID), 7'd0};
      end else begin
        tl_valid = 1'b1;
        tl.write = cur_q.write;
        tl.addr  = voffset;
        tl.tag   = {1'b1, 1'b0, 3'(DESC_ID), k_q[6:0]};
        tl.wmask = m << voffset[OFF_W-1:0];
        tl.wdata = d << (8 * int'(voffset[OFF_W-1:0]));
      end
    end
  end

  assign req_ready  = st_q == S_IDLE;
  assign done_valid = st_q == S_DONE;
  assign done.write = cur_q.write;
  assign done.tag   = cur_q.tag;
  assign done.data  = dense_q;

  // Placement of one returned object in the dense line
  line_t obj, bm;
  mask_t m;
  always_comb begin
    obj = ret_data >> (8 * int'(off_q[ret_k]));
    m   = (cfg.obj_lg < 4'(OFF_W) && (cfg.mode == RM_STRIDE || cfg.mode == RM_INDIRECT))
          ? mask_t'((LINE_BYTES'(1) << obj_bytes) - 1'b1) : '1;
    for (int b = 0; b < LINE_BYTES; b++) bm[8*b +: 8] = {8{m[b]}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q <= S_IDLE; cur_q <= '0; k_q <= '0; nret_q <= '0; dense_q <= '0;
      ivbuf_q <= '0; ivbuf_v_q <= 1'b0; ivf_pend_q <= 1'b0; ivbuf_line_q <= '0;
    end else begin
      unique case (st_q)
        S_IDLE: if (req_valid) begin
          cur_q   <= req;
          k_q     <= '0;
          nret_q  <= '0;
          dense_q <= '0;
          st_q    <= S_ISSUE;
        end
        S_ISSUE: if (tl_valid && tl_ready) begin
          if (tl.phys) ivf_pend_q <= 1'b1;
          else begin
            off_q[k_q[6:0]] <= voffset[OFF_W-1:0];
            k_q <= k_q + 1'b1;
            if (k_q + 1'b1 == count) st_q <= cur_q.write ? S_DONE : S_WAIT;
          end
        end
        S_WAIT: if (nret_q == count) st_q <= S_DONE;
        S_DONE: if (done_ready) st_q <= S_IDLE;
        default: st_q <= S_IDLE;
      endcase
      if (ret_valid && ret_iv) begin
        ivbuf_q      <= ret_data;
        ivbuf_v_q    <= 1'b1;
        ivf_pend_q   <= 1'b0;
        ivbuf_line_q <= iv_paddr[PA_W-1:OFF_W];
      end else if (ret_valid) begin
        dense_q <= (dense_q & ~(bm << (8 * int'(ret_dense_off))))
                 | ((obj & bm) << (8 * int'(ret_dense_off)));
        nret_q  <= nret_q + 1'b1;
      end
      // a new mapping invalidates the iv buffer
      if (cfg_we) ivbuf_v_q <= 1'b0;
    end
  end
  // an object may not cross a DRAM line
  a_no_cross: assert property (@(posedge clk) disable iff (!rst_n)
    tl_valid && !tl.phys && (cfg.mode == RM_STRIDE || cfg.mode == RM_INDIRECT)
    |-> 32'(voffset[OFF_W-1:0]) + (cfg.obj_lg < 4'(OFF_W) ? obj_bytes : 32'(LINE_BYTES)) <= 32'(LINE_BYTES));
endmodule
