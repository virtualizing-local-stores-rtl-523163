// vls_pkg: sizes, types and helper functions shared by the virtual local
// store (VLS) data-buffer blocks.
//
// A VLS is a software-managed local store that lives inside a partition of an
// ordinary physically tagged L1 data cache. Accesses are recognised as VLS
// accesses by the high-order bits of their virtual address; their physical
// address is formed from the pbase register instead of the TLB, and they are
// placed direct-mapped in the way selected by the address bits just above the
// set index.
//
// From the design description: 32 KB, 4-way, 32-byte-line L1 data buffer; a
// VLS of 0 to 24 KB in 8 KB (one way) steps; a 64-bit virtual address.
// This design's own choices: 40-bit physical address, 4 KB pages, 32-bit
// data words, a 4 GiB VLS segment at the virtual address whose upper 32 bits
// are VLS_SEG_TAG, and the request/response structs below.
package vls_pkg;

  localparam int VA_W        = 64;
  localparam int PA_W        = 40;
  localparam int PAGE_BITS   = 12;
  localparam int VPN_W       = VA_W - PAGE_BITS;
  localparam int PPN_W       = PA_W - PAGE_BITS;

  localparam int LINE_BYTES  = 32;
  localparam int OFF_BITS    = 5;
  localparam int LINE_W      = LINE_BYTES * 8;
  localparam int WORD_W      = 32;
  localparam int WORDS_PER_LINE = LINE_BYTES / 4;
  localparam int LINE_ADDR_W = PA_W - OFF_BITS;

  localparam int WAYS        = 4;
  localparam int WAY_W       = 2;
  localparam int MAX_VLS_WAYS = 3;   // 24 KB of a 32 KB buffer

  // VLS segment of the virtual address space
  localparam int VLS_SEG_BITS = 32;
  localparam logic [VA_W-VLS_SEG_BITS-1:0] VLS_SEG_TAG = 32'hFFFF_FFFE;
  localparam int VLS_PG_W    = VLS_SEG_BITS - PAGE_BITS;   // page index inside the segment
  // Remote-VLS ranges: VA[63:40] = RVLS_SEG_TAG, VA[39:32] = VLS number,
  // VA[31:0] = offset into that thread's VLS.
  localparam int RVLS_ID_W  = 8;
  localparam int RVLS_TAG_W = VA_W - VLS_SEG_BITS - RVLS_ID_W;
  localparam logic [RVLS_TAG_W-1:0] RVLS_SEG_TAG = 24'hFFFF_FD;

  // Control registers of the VLS
  typedef enum logic [1:0] {
    REG_ENABLE = 2'd0,   // enabled?
    REG_PBASE  = 2'd1,   // physical page number of the VLS base
    REG_PBOUND = 2'd2,   // number of physical pages allocated to the VLS
    REG_WAYS   = 2'd3    // partition size in ways (8 KB each)
  } vls_reg_e;

  // Processor-side request
  typedef enum logic [1:0] {OP_LOAD = 2'd0, OP_STORE = 2'd1, OP_FENCE = 2'd2} cpu_op_e;

  typedef struct packed {
    cpu_op_e           op;
    logic [VA_W-1:0]   va;
    logic [WORD_W-1:0] wdata;
    logic [3:0]        be;
  } cpu_req_t;

  typedef struct packed {
    logic [WORD_W-1:0] rdata;
    logic              fault;
  } cpu_resp_t;

  // Virtual-address access as it leaves the arbiter (processor or DMA)
  typedef struct packed {
    logic              we;
    logic [VA_W-1:0]   va;
    logic [WORD_W-1:0] wdata;
    logic [3:0]        be;
    logic              no_alloc;   // DMA: do not allocate on a miss
    logic              no_refill;  // DMA: line will be wholly overwritten
  } acc_req_t;

  // Translated access into the cache controller
  typedef struct packed {
    logic              we;
    logic [PA_W-1:0]   pa;
    logic [WORD_W-1:0] wdata;
    logic [3:0]        be;
    logic              is_vls;
    logic [WAY_W-1:0]  vls_way;
    logic              no_alloc;
    logic              no_refill;
  } dbuf_req_t;

  // Line request to the next memory level
  typedef struct packed {
    logic                   we;
    logic [LINE_ADDR_W-1:0] line;
    logic [LINE_W-1:0]      wdata;
    logic [LINE_BYTES-1:0]  be;
  } mem_req_t;

  // DMA command
  typedef enum logic [1:0] {
    DMA_UNIT    = 2'd0,  // unit stride (memcpy)
    DMA_STRIDE  = 2'd1,  // constant strides on both sides
    DMA_GATHER  = 2'd2,  // src + 4*index[i] -> dst + 4*i
    DMA_SCATTER = 2'd3   // src + 4*i -> dst + 4*index[i]
  } dma_mode_e;

  typedef struct packed {
    dma_mode_e         mode;
    logic [VA_W-1:0]   src;
    logic [VA_W-1:0]   dst;
    logic [VA_W-1:0]   idx;         // index list (gather/scatter)
    logic [15:0]       count;       // number of 32-bit words
    logic [31:0]       src_stride;  // bytes, two's complement (DMA_STRIDE)
    logic [31:0]       dst_stride;
  } dma_cmd_t;

  // Event pulses for performance counting
  typedef struct packed {
    logic hit;
    logic miss;
    logic writeback;
    logic refill;
    logic refill_skipped;
    logic bypass;
    logic vls_access;
    logic tlb_lookup;
    logic fault;
    logic remote_out;      // access sent to another core's data buffer
    logic remote_in;       // access served for another core
  } vls_events_t;

  function automatic logic is_vls_va(input logic [VA_W-1:0] va);
    return va[VA_W-1:VLS_SEG_BITS] == VLS_SEG_TAG;
  endfunction

endpackage
