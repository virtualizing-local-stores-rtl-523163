// vls_remote_map: per-core registers that say which thread's VLS is resident
// in which L1 data buffer, and the decode of remote-VLS addresses.
//
// Besides its own local VLS segment, a thread sees one virtual range per
// participating thread (VLS 0 .. VLS N-1): upper address bits RVLS_SEG_TAG,
// then an 8-bit VLS number, then a 32-bit offset. There is one register per
// data buffer; register j holds the number of the VLS resident in data
// buffer j (and a valid bit). The operating system writes them and keeps
// them consistent across cores as it migrates, suspends and resumes threads.
// For an address in VLS k's range the registers are searched for k:
//   resident in this core's buffer  -> a local VLS access (the range is a
//                                      shadow of the local VLS),
//   resident in buffer j            -> routed to core j's cache controller,
//   not resident                    -> an ordinary access through the TLB
//                                      to the backing pages.
// The register set and the three outcomes follow the design description;
// the address layout and register format are this design's choices.
// Registers written on the clock edge, decode combinational.
module vls_remote_map
  import vls_pkg::*;
#(
  parameter int NBUF    = 16,
  parameter int CORE_ID = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    map_we,
  input  logic [$clog2(NBUF)-1:0] map_idx,
  input  logic                    map_valid,
  input  logic [RVLS_ID_W-1:0]    map_vls,
  input  logic [VA_W-1:0]         va,
  output logic                    in_range,   // address is in some VLS k range
  output logic                    resident,   // VLS k is resident in some data buffer
  output logic                    is_self,    // ... in this core's data buffer
  output logic [$clog2(NBUF)-1:0] buf_idx,    // ... in this data buffer
  output logic [VA_W-1:0]         local_va    // the same offset in the local VLS segment
);

  logic [NBUF-1:0]                 vld_q;
  logic [NBUF-1:0][RVLS_ID_W-1:0]  vls_q;
  logic [RVLS_ID_W-1:0]            k;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld_q <= '0;
      vls_q <= '0;
    end else if (map_we) begin
      vld_q[map_idx] <= map_valid;
      vls_q[map_idx] <= map_vls;
    end
  end

  assign in_range = va[VA_W-1 -: RVLS_TAG_W] == RVLS_SEG_TAG;
  assign k        = va[VLS_SEG_BITS +: RVLS_ID_W];
  assign local_va = {VLS_SEG_TAG, va[VLS_SEG_BITS-1:0]};

  always_comb begin
    resident = 1'b0;
    buf_idx  = '0;
    for (int j = 0; j < NBUF; j++) begin
      if (in_range && vld_q[j] && vls_q[j] == k && !resident) begin
        resident = 1'b1;
        buf_idx  = ($clog2(NBUF))'(j);
      end
    end
    is_self = resident && (int'(buf_idx) == CORE_ID);
  end

endmodule
