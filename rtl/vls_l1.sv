// vls_l1: one core's L1 data buffer with a virtual local store (VLS).
//
// The data buffer is an ordinary 32 KB, 4-way, physically tagged cache. A
// VLS is a range of the virtual address space, backed by its own physical
// pages, whose lines are kept direct-mapped in a partition of 0-3 ways
// (0-24 KB) that regular cache misses may not evict. Software moves data
// into and out of the VLS with the user-level DMA engine, and the partition
// can be resized or released at any time without flushing anything: released
// VLS lines simply become evictable again, and VLS lines evicted by other
// programs are refilled on demand from their backing pages.
//
// Request path: processor or DMA access -> vls_req_arb -> vls_addr_map (VLS
// check, pbase or vls_tlb translation, pbound check) -> vls_cache_ctrl
// (tag/data arrays, way enables, partition-aware replacement) -> memory.
// A faulting access (outside pbound, VLS disabled, TLB miss) does not reach
// the data buffer and is answered with fault set one cycle later.
//
// Remote VLS: vls_remote_map decodes accesses to the per-thread VLS ranges.
// One resident in another core's data buffer leaves on the rvls_out port
// (to vls_xnet) as an access to that core's local VLS segment; one resident
// here is turned into a local VLS access; a non-resident one goes through
// the TLB like any other access. Accesses arriving on rvls_in from other
// cores are served by this data buffer as VLS accesses of the thread running
// here. The data-buffer stage is separate from the arbiter, so it keeps
// serving incoming accesses while this core waits on an outgoing one (two
// cores accessing each other's VLS at once do not deadlock). The stage takes
// one access at a time; an incoming remote access wins over a local one.
//
// Ports: processor request/response (valid/ready, one access at a time; an
// access that hits is answered in the cycle after it was accepted, the array
// read taking the first cycle and the tag compare the second); control
// register write/read port; TLB refill port; DMA command port with busy and
// error; a line-wide next-level memory port; remote-map register write
// port; outgoing and incoming remote-VLS ports; and event pulses.
// The organisation follows the design description; interface details are
// this design's choices and are described in each block.
module vls_l1
  import vls_pkg::*;
#(
  parameter int SETS        = 256,   // 32 KB / (4 ways * 32 B)
  parameter int TLB_ENTRIES = 16,
  parameter int NCORES      = 16,    // data buffers a VLS can be resident in
  parameter int CORE_ID     = 0
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // processor
  input  logic                          cpu_req_valid,
  output logic                          cpu_req_ready,
  input  cpu_req_t                      cpu_req,
  output logic                          cpu_resp_valid,
  output cpu_resp_t                     cpu_resp,
  // VLS control registers
  input  logic                          cfg_we,
  input  vls_reg_e                      cfg_sel,
  input  logic [63:0]                   cfg_wdata,
  input  vls_reg_e                      cfg_rsel,
  output logic [63:0]                   cfg_rdata,
  // TLB refill
  input  logic                          tlb_fill_valid,
  input  logic [$clog2(TLB_ENTRIES)-1:0] tlb_fill_idx,
  input  logic [VPN_W-1:0]              tlb_fill_vpn,
  input  logic [PPN_W-1:0]              tlb_fill_ppn,
  input  logic                          tlb_flush,
  // DMA commands
  input  logic                          dma_cmd_valid,
  output logic                          dma_cmd_ready,
  input  dma_cmd_t                      dma_cmd,
  output logic                          dma_busy,
  output logic                          dma_error,
  output logic                          dma_done,
  // next memory level
  output logic                          mem_req_valid,
  input  logic                          mem_req_ready,
  output mem_req_t                      mem_req,
  input  logic                          mem_resp_valid,
  input  logic [LINE_W-1:0]             mem_resp_data,
  // remote-VLS map registers
  input  logic                          rmap_we,
  input  logic [$clog2(NCORES)-1:0]     rmap_idx,
  input  logic                          rmap_valid,
  input  logic [RVLS_ID_W-1:0]          rmap_vls,
  // outgoing remote-VLS accesses
  output logic                          rvls_out_valid,
  input  logic                          rvls_out_ready,
  output logic [$clog2(NCORES)-1:0]     rvls_out_dst,
  output acc_req_t                      rvls_out_req,
  input  logic                          rvls_out_resp_valid,
  input  cpu_resp_t                     rvls_out_resp,
  // incoming remote-VLS accesses
  input  logic                          rvls_in_valid,
  output logic                          rvls_in_ready,
  input  acc_req_t                      rvls_in_req,
  output logic                          rvls_in_resp_valid,
  output cpu_resp_t                     rvls_in_resp,
  // event pulses
  output vls_events_t                   events
);

  // ------------------------------------------------------------ registers
  logic              enabled;
  logic [PPN_W-1:0]  pbase_ppn;
  logic [VLS_PG_W:0] pbound;
  logic [WAY_W-1:0]  part_ways;

  vls_regs u_regs (
    .clk, .rst_n, .cfg_we, .cfg_sel, .cfg_wdata, .cfg_rsel, .cfg_rdata,
    .enabled, .pbase_ppn, .pbound, .vls_ways(), .part_ways
  );

  // ------------------------------------------------------------ DMA
  logic              dma_acc_valid, dma_acc_ready;
  acc_req_t          dma_acc;
  logic              dma_resp_valid, dma_resp_fault;
  logic [WORD_W-1:0] dma_resp_rdata;

  vls_dma u_dma (
    .clk, .rst_n,
    .cmd_valid (dma_cmd_valid),
    .cmd_ready (dma_cmd_ready),
    .cmd       (dma_cmd),
    .busy      (dma_busy),
    .error     (dma_error),
    .done      (dma_done),
    .acc_valid (dma_acc_valid),
    .acc_ready (dma_acc_ready),
    .acc       (dma_acc),
    .resp_valid(dma_resp_valid),
    .resp_rdata(dma_resp_rdata),
    .resp_fault(dma_resp_fault)
  );

  // ------------------------------------------------------------ arbiter
  logic              acc_valid, acc_ready;
  acc_req_t          acc;
  logic              path_resp_valid, path_resp_fault;
  logic [WORD_W-1:0] path_resp_rdata;

  vls_req_arb u_arb (
    .clk, .rst_n,
    .cpu_req_valid, .cpu_req_ready, .cpu_req, .cpu_resp_valid, .cpu_resp,
    .dma_req_valid (dma_acc_valid),
    .dma_req_ready (dma_acc_ready),
    .dma_req       (dma_acc),
    .dma_resp_valid(dma_resp_valid),
    .dma_resp_rdata(dma_resp_rdata),
    .dma_resp_fault(dma_resp_fault),
    .dma_idle      (!dma_busy),
    .out_valid     (acc_valid),
    .out_ready     (acc_ready),
    .out_req       (acc),
    .in_resp_valid (path_resp_valid),
    .in_resp_rdata (path_resp_rdata),
    .in_resp_fault (path_resp_fault)
  );

  // ------------------------------------------------------------ remote VLS
  logic                      rm_in_range, rm_resident, rm_self;
  logic [$clog2(NCORES)-1:0] rm_buf;
  logic [VA_W-1:0]           rm_local_va;
  logic                      to_net;
  logic                      loc_valid, loc_ready;
  acc_req_t                  loc_acc;

  vls_remote_map #(.NBUF(NCORES), .CORE_ID(CORE_ID)) u_rmap (
    .clk, .rst_n,
    .map_we   (rmap_we),
    .map_idx  (rmap_idx),
    .map_valid(rmap_valid),
    .map_vls  (rmap_vls),
    .va       (acc.va),
    .in_range (rm_in_range),
    .resident (rm_resident),
    .is_self  (rm_self),
    .buf_idx  (rm_buf),
    .local_va (rm_local_va)
  );

  assign to_net = rm_resident && !rm_self;

  always_comb begin
    rvls_out_req    = acc;
    rvls_out_req.va = rm_local_va;
    loc_acc         = acc;
    if (rm_self) loc_acc.va = rm_local_va;
  end

  assign rvls_out_valid = acc_valid && to_net;
  assign rvls_out_dst   = rm_buf;
  assign loc_valid      = acc_valid && !to_net;
  assign acc_ready      = to_net ? rvls_out_ready : loc_ready;

  // ------------------------------------------------------------ data-buffer stage
  logic     st_busy_q, st_owner_q, sel_in, st_accept;
  acc_req_t st_acc;

  assign sel_in = rvls_in_valid;
  assign st_acc = sel_in ? rvls_in_req : loc_acc;

  // ------------------------------------------------------------ translation
  logic             tlb_lookup_en, tlb_hit, is_vls, fault;
  logic [PPN_W-1:0] tlb_ppn;
  logic [PA_W-1:0]  pa;
  logic [WAY_W-1:0] vls_way;
  logic             st_valid;

  assign st_valid = !st_busy_q && (rvls_in_valid || loc_valid);

  vls_tlb #(.ENTRIES(TLB_ENTRIES)) u_tlb (
    .clk, .rst_n,
    .fill_valid(tlb_fill_valid),
    .fill_idx  (tlb_fill_idx),
    .fill_vpn  (tlb_fill_vpn),
    .fill_ppn  (tlb_fill_ppn),
    .flush     (tlb_flush),
    .lookup_en (tlb_lookup_en && st_valid),
    .lookup_vpn(st_acc.va[VA_W-1:PAGE_BITS]),
    .hit       (tlb_hit),
    .ppn       (tlb_ppn)
  );

  vls_addr_map #(.SETS(SETS)) u_map (
    .va           (st_acc.va),
    .enabled      (enabled),
    .pbase_ppn    (pbase_ppn),
    .pbound       (pbound),
    .tlb_lookup_en(tlb_lookup_en),
    .tlb_hit      (tlb_hit),
    .tlb_ppn      (tlb_ppn),
    .is_vls       (is_vls),
    .pa           (pa),
    .vls_way      (vls_way),
    .fault        (fault)
  );

  // ------------------------------------------------------------ data buffer
  logic              db_req_valid, db_req_ready, db_resp_valid;
  dbuf_req_t         db_req;
  logic [WORD_W-1:0] db_resp_rdata;
  logic              fault_pend_q;
  logic              st_resp_valid;

  always_comb begin
    db_req           = '0;
    db_req.we        = st_acc.we;
    db_req.pa        = pa;
    db_req.wdata     = st_acc.wdata;
    db_req.be        = st_acc.be;
    db_req.is_vls    = is_vls;
    db_req.vls_way   = vls_way;
    db_req.no_alloc  = st_acc.no_alloc;
    db_req.no_refill = st_acc.no_refill;
  end

  assign db_req_valid  = st_valid && !fault;
  assign st_accept     = st_valid && (fault || db_req_ready);
  assign loc_ready     = st_accept && !sel_in;
  assign rvls_in_ready = st_accept && sel_in;
  assign st_resp_valid = db_resp_valid || fault_pend_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_busy_q    <= 1'b0;
      st_owner_q   <= 1'b0;
      fault_pend_q <= 1'b0;
    end else begin
      fault_pend_q <= st_accept && fault;
      if (st_accept) begin
        st_busy_q  <= 1'b1;
        st_owner_q <= sel_in;
      end else if (st_resp_valid) begin
        st_busy_q  <= 1'b0;
      end
    end
  end

  // responses: the data-buffer stage answers its owner; an outgoing remote
  // access is answered by the network
  assign rvls_in_resp_valid = st_resp_valid && st_owner_q;
  assign rvls_in_resp.rdata = db_resp_rdata;
  assign rvls_in_resp.fault = fault_pend_q;

  assign path_resp_valid = (st_resp_valid && !st_owner_q) || rvls_out_resp_valid;
  assign path_resp_rdata = rvls_out_resp_valid ? rvls_out_resp.rdata : db_resp_rdata;
  assign path_resp_fault = rvls_out_resp_valid ? rvls_out_resp.fault : fault_pend_q;

  logic ev_hit, ev_miss, ev_wb, ev_refill, ev_skip, ev_byp;

  vls_cache_ctrl #(.SETS(SETS)) u_ctrl (
    .clk, .rst_n,
    .part_ways        (part_ways),
    .req_valid        (db_req_valid),
    .req_ready        (db_req_ready),
    .req              (db_req),
    .resp_valid       (db_resp_valid),
    .resp_rdata       (db_resp_rdata),
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_resp_valid, .mem_resp_data,
    .ev_hit           (ev_hit),
    .ev_miss          (ev_miss),
    .ev_writeback     (ev_wb),
    .ev_refill        (ev_refill),
    .ev_refill_skipped(ev_skip),
    .ev_bypass        (ev_byp)
  );

  always_comb begin
    events                = '0;
    events.hit            = ev_hit;
    events.miss           = ev_miss;
    events.writeback      = ev_wb;
    events.refill         = ev_refill;
    events.refill_skipped = ev_skip;
    events.bypass         = ev_byp;
    events.vls_access     = db_req_valid && db_req_ready && is_vls;
    events.tlb_lookup     = st_accept && tlb_lookup_en;
    events.fault          = st_accept && fault;
    events.remote_out     = rvls_out_valid && rvls_out_ready;
    events.remote_in      = rvls_in_valid && rvls_in_ready;
  end

endmodule
