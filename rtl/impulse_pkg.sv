// Shared types and constants of the Impulse memory controller.
// The physical address is 32 bits, pages are 4 KB and a cache line is 128 bytes
// (32 page-table entries of 4 bytes fill one line, which is what an MTLB fill
// loads). Transactions move through the controller as whole lines: a line of
// write data travels with its header, and DRAM is read and written a line at a
// time, with a byte mask for partial writes.
package impulse_pkg;
  localparam int PA_W       = 32;
  localparam int LINE_BYTES = 128;
  localparam int LINE_W     = LINE_BYTES * 8;
  localparam int OFF_W      = 7;     // log2(LINE_BYTES)
  localparam int PAGE_W     = 12;    // 4 KB pages
  localparam int MID_W      = 2;     // master id: four bus modules
  localparam int TID_W      = 6;     // six transaction id signals, 64 per module
  localparam int RTAG_W     = 12;    // tag carried by a backend request
  localparam int NUM_BANKS  = 8;

  typedef logic [PA_W-1:0]   addr_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [LINE_BYTES-1:0] mask_t;

  // Bus transaction kinds seen by the MMC.
  typedef enum logic [1:0] {TR_READ = 2'd0, TR_WRITE = 2'd1, TR_COPYOUT = 2'd2} tr_kind_e;

  // Coherency report of one bus module.
  typedef enum logic [1:0] {COH_OK = 2'd0, COH_SHR = 2'd1, COH_CPY = 2'd2} coh_e;

  // CLIENT_OP flow-control code driven by the MMC.
  typedef enum logic [1:0] {CO_ALL = 2'd0, CO_COPYOUT_ONLY = 2'd1, CO_NONE = 2'd2} client_op_e;

  // Header of a system memory bus transaction.
  typedef struct packed {
    tr_kind_e           kind;
    logic               coherent;
    addr_t              addr;
    logic [MID_W-1:0]   mid;
    logic [TID_W-1:0]   tid;
  } bus_hdr_t;

  // Data returned to the system bus.
  typedef struct packed {
    logic [MID_W-1:0] mid;
    logic [TID_W-1:0] tid;
    logic             shared;
    line_t            data;
  } data_ret_t;

  // A transaction issued by the MMC (read/ready queue) towards MCache,
  // remapping controller and DRAM backend.
  typedef struct packed {
    logic              write;
    addr_t             addr;
    logic [RTAG_W-1:0] tag;
    line_t             wdata;
  } mmc_txn_t;

  // A request on a slave address bus / RAM address bus.
  typedef struct packed {
    logic              write;
    addr_t             addr;    // line aligned
    logic [RTAG_W-1:0] tag;
    mask_t             wmask;
    line_t             wdata;
  } mem_req_t;

  // Read data on a RAM data / mux data / slave data bus.
  typedef struct packed {
    logic [RTAG_W-1:0] tag;
    line_t             data;
  } mem_rsp_t;

  // Completion of an MMC transaction (read data or write done).
  typedef struct packed {
    logic              write;
    logic [RTAG_W-1:0] tag;
    line_t             data;
  } cpl_t;

  // Remapping algorithms of a shadow descriptor.
  typedef enum logic [1:0] {
    RM_STRIDE = 2'd0, RM_INDIRECT = 2'd1, RM_COLOR = 2'd2, RM_SUPERPAGE = 2'd3
  } remap_e;

  // Control registers of a shadow descriptor.
  typedef struct packed {
    logic         enable;
    remap_e       mode;
    addr_t        saddr_start;
    addr_t        saddr_end;       // first address after the shadow region
    logic [31:0]  stride_size;     // bytes (scatter/gather)
    logic [3:0]   obj_lg;          // log2(object_size)
    logic [31:0]  object_offset;
    logic [1:0]   iv_elem_lg;      // log2(iv_elem_size): 1,2,4,8 bytes
    addr_t        iv_paddr_start;
    addr_t        ptable_ptr;      // physical base of the dense page table
    logic [4:0]   cache_lg;        // log2(effective cache way size), page coloring
    logic [31:0]  color_size;
    logic [31:0]  color_offset;
  } desc_cfg_t;

  // Request from a shadow descriptor to the MTLB: translate addr (a
  // pseudo-virtual offset) and access DRAM, or, with phys set, access the
  // physical address unchanged (indirection vector fetch).
  typedef struct packed {
    logic              phys;
    logic              write;
    logic [2:0]        desc;
    addr_t             addr;
    addr_t             ptable;
    logic [RTAG_W-1:0] tag;
    mask_t             wmask;
    line_t             wdata;
  } tl_req_t;

  // Tag layout of backend requests. Top bit: 1 = issued by the remapping
  // controller (returns on the shadow SD bus). For the remapping controller:
  // bit 10 = special, bits 9:7 = descriptor, bits 6:0 = item number; special
  // with descriptor 7 is an MTLB fill, with descriptor 0-6 an indirection
  // vector fetch.
  localparam int TAG_SHADOW  = RTAG_W - 1;
  localparam int TAG_SPECIAL = 10;
  localparam logic [2:0] DESC_MTLB = 3'd7;

  // Bank of a physical address: line-interleaved over eight banks.
  function automatic logic [2:0] bank_of(addr_t a);
    return a[OFF_W +: 3];
  endfunction
endpackage
