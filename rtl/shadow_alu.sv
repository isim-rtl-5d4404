// Address arithmetic of a shadow descriptor. Given the descriptor's control
// registers, a line-aligned shadow address and the number k of the item being
// gathered, it produces the offset of that item in pseudo-virtual space
// (which the MTLB then translates), and for indirection-vector remapping the
// physical address of the vector element that names the item.
//   strided scatter/gather: index = soffset / object_size,
//                           voffset = (index+k)*stride + object_offset (+ coffset)
//   indirection vector:     iv_paddr = iv_paddr_start + (index+k)*iv_elem_size,
//                           voffset = rindex*stride + object_offset (+ coffset)
//   page coloring:          voffset = (soffset / way_size) * color_size
//                                     + soffset % way_size - color_offset
//   superpage:              voffset = soffset
// coffset (offset of the line inside an object larger than a line) is added
// only when object_size exceeds the line. count is the number of DRAM accesses
// that fill one line: line/object_size for small objects, else 1.
// object_size, iv_elem_size and the cache way size are powers of two and held
// as log2 values, so the divisions are shifts; stride and color size are
// multiplied. All of this is combinational (one memory cycle, as the design
// assumes for its ALU).
module shadow_alu
  import impulse_pkg::*;
(
  input  desc_cfg_t   cfg,
  input  addr_t       saddr,
  input  logic [7:0]  k,
  input  logic [31:0] rindex,
  output logic [7:0]  count,
  output logic [31:0] voffset,
  output addr_t       iv_paddr,
  output logic [OFF_W-1:0] dense_off   // byte position of item k in the dense line
);
  logic [31:0] soffset, index, coffset, cmask, idx_k;
  logic        big;

  always_comb begin
    soffset  = saddr - cfg.saddr_start;
    big      = cfg.obj_lg > 4'(OFF_W);
    index    = soffset >> cfg.obj_lg;
    cmask    = (32'd1 << cfg.obj_lg) - 32'd1;
    coffset  = big ? (soffset & cmask) : 32'd0;
    idx_k    = index + 32'(k);
    count    = big ? 8'd1 : 8'(32'd1 << (4'(OFF_W) - cfg.obj_lg));
    iv_paddr = cfg.iv_paddr_start + (idx_k << cfg.iv_elem_lg);
    dense_off = big ? '0 : OFF_W'(32'(k) << cfg.obj_lg);
    unique case (cfg.mode)
      RM_STRIDE:   voffset = idx_k * cfg.stride_size + cfg.object_offset + coffset;
      RM_INDIRECT: voffset = rindex * cfg.stride_size + cfg.object_offset + coffset;
      RM_COLOR: begin
        count     = 8'd1;
        dense_off = '0;
        voffset   = (soffset >> cfg.cache_lg) * cfg.color_size
                  + (soffset & ((32'd1 << cfg.cache_lg) - 32'd1)) - cfg.color_offset;
      end
      default: begin
        count     = 8'd1;
        dense_off = '0;
        voffset   = soffset;
      end
    endcase
  end
endmodule
