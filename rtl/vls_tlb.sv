// vls_tlb: small fully associative data TLB for regular (non-VLS) accesses.
//
// Each entry holds a valid bit, a virtual page number tag and a physical page
// number. A lookup compares the VPN against every valid entry in the same
// cycle (combinational hit and PPN). Entries are written by a software refill
// port (fill_valid with an entry index) and all are invalidated by flush.
// lookup_en gates the comparison: VLS accesses take their physical address
// from pbase and do not look the TLB up, which is the point of the pbase
// register. The design description only shows the TLB (tag, PPN, hit); the
// entry count, the fully associative organisation and the refill port are
// this design's choices.
module vls_tlb
  import vls_pkg::*;
#(
  parameter int ENTRIES = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       fill_valid,
  input  logic [$clog2(ENTRIES)-1:0] fill_idx,
  input  logic [VPN_W-1:0]           fill_vpn,
  input  logic [PPN_W-1:0]           fill_ppn,
  input  logic                       flush,
  input  logic                       lookup_en,
  input  logic [VPN_W-1:0]           lookup_vpn,
  output logic                       hit,
  output logic [PPN_W-1:0]           ppn
);

  logic [ENTRIES-1:0]            valid_q;
  logic [ENTRIES-1:0][VPN_W-1:0] vpn_q;
  logic [ENTRIES-1:0][PPN_W-1:0] ppn_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
      vpn_q   <= '0;
      ppn_q   <= '0;
    end else if (flush) begin
      valid_q <= '0;
    end else if (fill_valid) begin
      valid_q[fill_idx] <= 1'b1;
      vpn_q[fill_idx]   <= fill_vpn;
      ppn_q[fill_idx]   <= fill_ppn;
    end
  end

  always_comb begin
    hit = 1'b0;
    ppn = '0;
    if (lookup_en) begin
      for (int i = 0; i < ENTRIES; i++) begin
        if (valid_q[i] && vpn_q[i] == lookup_vpn) begin
          hit = 1'b1;
          ppn = ppn_q[i];
        end
      end
    end
  end

endmodule
