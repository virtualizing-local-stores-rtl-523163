// vls_cmp: the multi-core top: NCORES L1 data buffers with virtual local
// stores (vls_l1) joined by the cross-VLS network (vls_xnet).
//
// Every core has its own processor, control-register, TLB-refill, DMA and
// next-level memory ports, brought out unchanged from vls_l1 as packed
// arrays indexed by core number. The shared L2, its coherence directory and
// the memory network are outside this block; each core's memory port goes
// to them. Remote-VLS map writes are broadcast: one write updates the same
// register in every core, which is how this design keeps the per-core maps
// consistent (the design description leaves that to the operating system).
// A thread's access to another thread's VLS that is resident in core j's
// data buffer travels over vls_xnet to core j and is served there; the
// response comes back the same way.
// Table 3's 16 cores is the default core count.
module vls_cmp
  import vls_pkg::*;
#(
  parameter int NCORES      = 16,
  parameter int SETS        = 256,
  parameter int TLB_ENTRIES = 16
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // processors
  input  logic      [NCORES-1:0]                cpu_req_valid,
  output logic      [NCORES-1:0]                cpu_req_ready,
  input  cpu_req_t  [NCORES-1:0]                cpu_req,
  output logic      [NCORES-1:0]                cpu_resp_valid,
  output cpu_resp_t [NCORES-1:0]                cpu_resp,
  // VLS control registers
  input  logic      [NCORES-1:0]                cfg_we,
  input  vls_reg_e  [NCORES-1:0]                cfg_sel,
  input  logic      [NCORES-1:0][63:0]          cfg_wdata,
  input  vls_reg_e  [NCORES-1:0]                cfg_rsel,
  output logic      [NCORES-1:0][63:0]          cfg_rdata,
  // TLB refill
  input  logic      [NCORES-1:0]                tlb_fill_valid,
  input  logic      [NCORES-1:0][$clog2(TLB_ENTRIES)-1:0] tlb_fill_idx,
  input  logic      [NCORES-1:0][VPN_W-1:0]     tlb_fill_vpn,
  input  logic      [NCORES-1:0][PPN_W-1:0]     tlb_fill_ppn,
  input  logic      [NCORES-1:0]                tlb_flush,
  // DMA
  input  logic      [NCORES-1:0]                dma_cmd_valid,
  output logic      [NCORES-1:0]                dma_cmd_ready,
  input  dma_cmd_t  [NCORES-1:0]                dma_cmd,
  output logic      [NCORES-1:0]                dma_busy,
  output logic      [NCORES-1:0]                dma_error,
  output logic      [NCORES-1:0]                dma_done,
  // next memory level, one port per core
  output logic      [NCORES-1:0]                mem_req_valid,
  input  logic      [NCORES-1:0]                mem_req_ready,
  output mem_req_t  [NCORES-1:0]                mem_req,
  input  logic      [NCORES-1:0]                mem_resp_valid,
  input  logic      [NCORES-1:0][LINE_W-1:0]    mem_resp_data,
  // remote-VLS map, broadcast to every core
  input  logic                                  rmap_we,
  input  logic      [$clog2(NCORES)-1:0]        rmap_idx,
  input  logic                                  rmap_valid,
  input  logic      [RVLS_ID_W-1:0]             rmap_vls,
  // event pulses
  output vls_events_t [NCORES-1:0]              events
);

  logic      [NCORES-1:0]                     out_valid, out_ready, out_resp_valid;
  logic      [NCORES-1:0][$clog2(NCORES)-1:0] out_dst;
  acc_req_t  [NCORES-1:0]                     out_req;
  cpu_resp_t [NCORES-1:0]                     out_resp;
  logic      [NCORES-1:0]                     in_valid, in_ready, in_resp_valid;
  acc_req_t  [NCORES-1:0]                     in_req;
  cpu_resp_t [NCORES-1:0]                     in_resp;

  for (genvar c = 0; c < NCORES; c++) begin : g_core
    vls_l1 #(
      .SETS(SETS), .TLB_ENTRIES(TLB_ENTRIES), .NCORES(NCORES), .CORE_ID(c)
    ) u_l1 (
      .clk, .rst_n,
      .cpu_req_valid      (cpu_req_valid[c]),
      .cpu_req_ready      (cpu_req_ready[c]),
      .cpu_req            (cpu_req[c]),
      .cpu_resp_valid     (cpu_resp_valid[c]),
      .cpu_resp           (cpu_resp[c]),
      .cfg_we             (cfg_we[c]),
      .cfg_sel            (cfg_sel[c]),
      .cfg_wdata          (cfg_wdata[c]),
      .cfg_rsel           (cfg_rsel[c]),
      .cfg_rdata          (cfg_rdata[c]),
      .tlb_fill_valid     (tlb_fill_valid[c]),
      .tlb_fill_idx       (tlb_fill_idx[c]),
      .tlb_fill_vpn       (tlb_fill_vpn[c]),
      .tlb_fill_ppn       (tlb_fill_ppn[c]),
      .tlb_flush          (tlb_flush[c]),
      .dma_cmd_valid      (dma_cmd_valid[c]),
      .dma_cmd_ready      (dma_cmd_ready[c]),
      .dma_cmd            (dma_cmd[c]),
      .dma_busy           (dma_busy[c]),
      .dma_error          (dma_error[c]),
      .dma_done           (dma_done[c]),
      .mem_req_valid      (mem_req_valid[c]),
      .mem_req_ready      (mem_req_ready[c]),
      .mem_req            (mem_req[c]),
      .mem_resp_valid     (mem_resp_valid[c]),
      .mem_resp_data      (mem_resp_data[c]),
      .rmap_we            (rmap_we),
      .rmap_idx           (rmap_idx),
      .rmap_valid         (rmap_valid),
      .rmap_vls           (rmap_vls),
      .rvls_out_valid     (out_valid[c]),
      .rvls_out_ready     (out_ready[c]),
      .rvls_out_dst       (out_dst[c]),
      .rvls_out_req       (out_req[c]),
      .rvls_out_resp_valid(out_resp_valid[c]),
      .rvls_out_resp      (out_resp[c]),
      .rvls_in_valid      (in_valid[c]),
      .rvls_in_ready      (in_ready[c]),
      .rvls_in_req        (in_req[c]),
      .rvls_in_resp_valid (in_resp_valid[c]),
      .rvls_in_resp       (in_resp[c]),
      .events             (events[c])
    );
  end

  vls_xnet #(.N(NCORES)) u_xnet (
    .clk, .rst_n,
    .src_valid     (out_valid),
    .src_ready     (out_ready),
    .src_dst       (out_dst),
    .src_req       (out_req),
    .src_resp_valid(out_resp_valid),
    .src_resp      (out_resp),
    .dst_valid     (in_valid),
    .dst_ready     (in_ready),
    .dst_req       (in_req),
    .dst_resp_valid(in_resp_valid),
    .dst_resp      (in_resp)
  );

endmodule
