// vls_addr_map: recognises VLS accesses and forms their physical address.
//
// (1) An access is a VLS access when the upper virtual address bits equal the
//     VLS segment tag; this check is a simple compare, early in the pipeline.
// (2) For a VLS access the physical page is pbase plus the page index inside
//     the segment, so the TLB is not looked up (tlb_lookup_en low); for any
//     other access the TLB's PPN is used.
// (5) The page index is compared with pbound (">=") and an access past the
//     allocated VLS pages faults, as does a VLS access while the VLS is
//     disabled or a regular access that misses in the TLB.
// vls_way is the direct-mapped way of a VLS access: the address bits just
// above the set index. Purely combinational. The compare with pbound and the
// pbase/TLB multiplexer are as drawn in the design description; adding the
// page index to pbase and the fault conditions are this design's choices.
module vls_addr_map
  import vls_pkg::*;
#(
  parameter int SETS = 256
) (
  input  logic [VA_W-1:0]   va,
  input  logic              enabled,
  input  logic [PPN_W-1:0]  pbase_ppn,
  input  logic [VLS_PG_W:0] pbound,
  output logic              tlb_lookup_en,
  input  logic              tlb_hit,
  input  logic [PPN_W-1:0]  tlb_ppn,
  output logic              is_vls,
  output logic [PA_W-1:0]   pa,
  output logic [WAY_W-1:0]  vls_way,
  output logic              fault
);

  localparam int IDX_BITS = $clog2(SETS);

  logic [VLS_PG_W-1:0] vls_page;
  logic [PPN_W-1:0]    ppn;
  logic                bound_fault;

  assign is_vls        = is_vls_va(va);
  assign tlb_lookup_en = !is_vls;
  assign vls_page      = va[VLS_SEG_BITS-1:PAGE_BITS];
  assign bound_fault   = {1'b0, vls_page} >= pbound;
  assign ppn           = is_vls ? pbase_ppn + PPN_W'(vls_page) : tlb_ppn;
  assign pa            = {ppn, va[PAGE_BITS-1:0]};
  assign vls_way       = va[OFF_BITS+IDX_BITS +: WAY_W];
  assign fault         = is_vls ? (bound_fault || !enabled) : !tlb_hit;

endmodule
