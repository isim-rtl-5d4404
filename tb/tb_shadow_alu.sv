// Self-checking test of shadow_alu: hand-worked examples for each remapping
// mode, then random descriptors compared with a reference that walks the
// dense shadow line item by item (strided and indirection-vector gathers),
// maps a cache-way offset to its color (page coloring) or passes the offset
// through (superpage).
module tb_shadow_alu;
  import impulse_pkg::*;
  desc_cfg_t cfg;
  addr_t saddr, iv_paddr;
  logic [7:0] k, count;
  logic [31:0] rindex, voffset;
  logic [OFF_W-1:0] dense_off;
  shadow_alu dut (.*);
  int checks = 0, failures = 0;
  initial begin
    #100000;
    $display("FAIL watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d (mode %0d obj_lg %0d k %0d)", what, got, exp, cfg.mode, cfg.obj_lg, k);
    end
  endtask
  initial begin
    cfg = '0; saddr = '0; k = '0; rindex = '0;
    // worked example: 8-byte elements of a matrix column, 1024-byte rows
    cfg.mode = RM_STRIDE; cfg.saddr_start = 32'h8000_0000; cfg.stride_size = 1024;
    cfg.obj_lg = 3; cfg.object_offset = 16;
    saddr = 32'h8000_0080; k = 5; #1;            // line 1 of the shadow region = items 16..31
    chk(count, 16, "count"); chk(voffset, (16 + 5) * 1024 + 16, "stride voffset"); chk(dense_off, 40, "dense_off");
    // indirection vector: element 3 holds index 77
    cfg.mode = RM_INDIRECT; cfg.iv_paddr_start = 32'h0030_0000; cfg.iv_elem_lg = 2;
    cfg.stride_size = 24; cfg.object_offset = 4;
    saddr = 32'h8000_0000; k = 3; rindex = 77; #1;
    chk(iv_paddr, 32'h0030_000C, "iv address"); chk(voffset, 77 * 24 + 4, "iv voffset");
    // page coloring: 128 KB ways, 32 KB color starting at 64 KB
    cfg.mode = RM_COLOR; cfg.cache_lg = 17; cfg.color_size = 32768; cfg.color_offset = 65536;
    saddr = 32'h8000_0000 + 32'h0002_0000 + 32'h0001_0040; k = 0; #1;
    chk(voffset, 32768 + 32'h40, "color voffset"); chk(count, 1, "color count");
    // superpage
    cfg.mode = RM_SUPERPAGE; saddr = 32'h8012_3456; #1;
    chk(voffset, 32'h0012_3456, "superpage voffset");
    // random
    for (int t = 0; t < 3000; t++) begin
      logic [31:0] so, e;
      cfg = '0;
      cfg.mode = remap_e'($urandom % 4);
      cfg.saddr_start = $urandom & 32'hFFFF_F000;
      cfg.stride_size = $urandom % 5000;
      cfg.obj_lg = 4'($urandom % 10);
      cfg.object_offset = $urandom % 256;
      cfg.iv_elem_lg = 2'($urandom);
      cfg.iv_paddr_start = $urandom;
      cfg.cache_lg = 5'(12 + $urandom % 8);
      cfg.color_size = 32'd1 << ($urandom % 12);
      cfg.color_offset = $urandom % 65536;
      saddr = cfg.saddr_start + ($urandom % (1 << 20));
      k = 8'($urandom % 128);
      rindex = $urandom % 100000;
      #1;
      so = saddr - cfg.saddr_start;
      case (cfg.mode)
        RM_STRIDE, RM_INDIRECT: begin
          int osz, n;
          osz = 1 << cfg.obj_lg;
          if (osz <= 128) begin
            chk(count, 128 / osz, "count");
            chk(dense_off, (k * osz) % 128, "dense_off");
            n = so / osz + k;
            e = (cfg.mode == RM_STRIDE ? n : rindex) * cfg.stride_size + cfg.object_offset;
          end else begin
            chk(count, 1, "count");
            n = so / osz + k;
            e = (cfg.mode == RM_STRIDE ? n : rindex) * cfg.stride_size + cfg.object_offset + so % osz;
          end
          chk(voffset, e, "voffset");
          if (cfg.mode == RM_INDIRECT) chk(iv_paddr, cfg.iv_paddr_start + n * (1 << cfg.iv_elem_lg), "iv_paddr");
        end
        RM_COLOR: begin
          int way, off;
          way = so / (1 << cfg.cache_lg);
          off = so % (1 << cfg.cache_lg);
          chk(voffset, way * cfg.color_size + off - cfg.color_offset, "color voffset");
        end
        default: chk(voffset, so, "superpage voffset");
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
