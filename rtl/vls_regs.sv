// vls_regs: the per-core VLS control registers.
//
// enabled?  - the VLS mapping and partition are active
// pbase     - physical page number of the current VLS in physical memory
// pbound    - number of physical pages allocated to the VLS (protection)
// ways      - partition size in 8 KB ways, saturated at MAX_VLS_WAYS
//
// The operating system sets pbase/pbound and saves and restores all four on a
// thread context switch; a user-level instruction sets the partition size and
// enables or disables the VLS. Changing them never touches the data buffer
// contents: part_ways only changes what the replacement logic may evict.
// Interface: one write port (cfg_we/cfg_sel/cfg_wdata, takes effect on the
// next clock edge) and a combinational read port for context save. Reset
// clears every register (VLS disabled, zero-sized). Register names follow the
// design description; the separate partition-size register, the widths and
// the reset values are this design's choices.
module vls_regs
  import vls_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  vls_reg_e             cfg_sel,
  input  logic [63:0]          cfg_wdata,
  input  vls_reg_e             cfg_rsel,
  output logic [63:0]          cfg_rdata,
  output logic                 enabled,
  output logic [PPN_W-1:0]     pbase_ppn,
  output logic [VLS_PG_W:0]    pbound,
  output logic [WAY_W-1:0]     vls_ways,
  output logic [WAY_W-1:0]     part_ways   // ways reserved now (0 when disabled)
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      enabled   <= 1'b0;
      pbase_ppn <= '0;
      pbound    <= '0;
      vls_ways  <= '0;
    end else if (cfg_we) begin
      unique case (cfg_sel)
        REG_ENABLE: enabled   <= cfg_wdata[0];
        REG_PBASE:  pbase_ppn <= cfg_wdata[PPN_W-1:0];
        REG_PBOUND: pbound    <= cfg_wdata[VLS_PG_W:0];
        REG_WAYS:   vls_ways  <= (cfg_wdata > 64'(MAX_VLS_WAYS)) ? WAY_W'(MAX_VLS_WAYS)
                                                                 : cfg_wdata[WAY_W-1:0];
        default: ;
      endcase
    end
  end

  assign part_ways = enabled ? vls_ways : '0;

  always_comb begin
    unique case (cfg_rsel)
      REG_ENABLE: cfg_rdata = 64'(enabled);
      REG_PBASE:  cfg_rdata = 64'(pbase_ppn);
      REG_PBOUND: cfg_rdata = 64'(pbound);
      REG_WAYS:   cfg_rdata = 64'(vls_ways);
      default:    cfg_rdata = '0;
    endcase
  end

endmodule
