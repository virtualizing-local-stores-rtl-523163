// tb_vls_regs: writes every VLS control register, reads it back, checks the
// partition-size saturation at 3 ways and that part_ways is zero while the
// VLS is disabled.
module tb_vls_regs;
  import vls_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cfg_we; vls_reg_e cfg_sel, cfg_rsel; logic [63:0] cfg_wdata, cfg_rdata;
  logic enabled; logic [PPN_W-1:0] pbase_ppn; logic [VLS_PG_W:0] pbound;
  logic [WAY_W-1:0] vls_ways, part_ways;
  vls_regs dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  task automatic wr(input vls_reg_e r, input logic [63:0] v);
    @(negedge clk); cfg_we = 1; cfg_sel = r; cfg_wdata = v; @(negedge clk); cfg_we = 0;
  endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    cfg_we = 0; cfg_sel = REG_ENABLE; cfg_rsel = REG_ENABLE; cfg_wdata = 0;
    #12 rst_n = 1;
    check(!enabled && pbase_ppn == 0 && pbound == 0 && part_ways == 0, "reset values");
    for (int k = 0; k < 20; k++) begin
      logic [PPN_W-1:0] pb; logic [VLS_PG_W:0] bd; logic [63:0] wy;
      pb = PPN_W'($urandom); bd = (VLS_PG_W+1)'($urandom); wy = 64'($urandom_range(0, 9));
      wr(REG_PBASE, 64'(pb)); wr(REG_PBOUND, 64'(bd)); wr(REG_WAYS, wy);
      wr(REG_ENABLE, 64'(k % 2));
      cfg_rsel = REG_PBASE;  #1 check(cfg_rdata == 64'(pb) && pbase_ppn == pb, "pbase");
      cfg_rsel = REG_PBOUND; #1 check(cfg_rdata == 64'(bd) && pbound == bd, "pbound");
      cfg_rsel = REG_WAYS;   #1 check(cfg_rdata == ((wy > 3) ? 64'd3 : wy), $sformatf("ways %0d", wy));
      cfg_rsel = REG_ENABLE; #1 check(cfg_rdata == 64'(k % 2), "enable");
      check(part_ways == ((k % 2) ? WAY_W'((wy > 3) ? 3 : wy) : 2'd0), "part_ways follows enable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
