// tb_vls_addr_map: random virtual addresses in_seg and outside the VLS
// segment; checks the VLS decision, pbase-based physical address, TLB use,
// pbound and disabled faults and the direct-mapped way against a reference
// computed here.
module tb_vls_addr_map;
  import vls_pkg::*;
  logic [VA_W-1:0] va; logic enabled; logic [PPN_W-1:0] pbase_ppn, tlb_ppn;
  logic [VLS_PG_W:0] pbound; logic tlb_lookup_en, tlb_hit, is_vls, fault;
  logic [PA_W-1:0] pa; logic [WAY_W-1:0] vls_way;
  vls_addr_map #(.SETS(256)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int k = 0; k < 2000; k++) begin
      logic in_seg; logic [31:0] off; logic [PA_W-1:0] exp_pa; logic exp_fault;
      in_seg    = k[0];
      off       = (k % 4 < 2) ? 32'($urandom_range(0, 32'h9000)) : $urandom;
      va        = in_seg ? {VLS_SEG_TAG, off} : {$urandom, off};
      if (!in_seg && va[63:32] == VLS_SEG_TAG) va[63] = ~va[63];
      enabled   = ($urandom % 4) != 0;
      pbase_ppn = PPN_W'($urandom);
      pbound    = (VLS_PG_W+1)'($urandom_range(0, 8));
      tlb_hit   = $urandom % 2;
      tlb_ppn   = PPN_W'($urandom);
      #1;
      if (in_seg) begin
        exp_pa    = {pbase_ppn + PPN_W'(off[31:12]), off[11:0]};
        exp_fault = !enabled || (off[31:12] >= 32'(pbound));
      end else begin
        exp_pa    = {tlb_ppn, va[11:0]};
        exp_fault = !tlb_hit;
      end
      check(is_vls == in_seg, "VLS decision");
      check(tlb_lookup_en == !in_seg, "TLB only for regular accesses");
      check(pa == exp_pa, $sformatf("pa %h want %h", pa, exp_pa));
      check(fault == exp_fault, $sformatf("fault for va %h pbound %0d", va, pbound));
      check(vls_way == off[14:13], "direct-mapped way");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
