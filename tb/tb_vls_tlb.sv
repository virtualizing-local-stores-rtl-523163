// tb_vls_tlb: fills random entries, checks hits, misses, replacement of an
// entry, the lookup enable and flush against a reference table.
module tb_vls_tlb;
  import vls_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic fill_valid, flush, lookup_en, hit;
  logic [3:0] fill_idx;
  logic [VPN_W-1:0] fill_vpn, lookup_vpn;
  logic [PPN_W-1:0] fill_ppn, ppn;
  vls_tlb #(.ENTRIES(16)) dut (.*);
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  logic [VPN_W-1:0] rv [16]; logic [PPN_W-1:0] rp [16];
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    fill_valid = 0; flush = 0; lookup_en = 1; fill_idx = 0; fill_vpn = 0; fill_ppn = 0; lookup_vpn = 0;
    #12 rst_n = 1;
    @(negedge clk); lookup_vpn = 0; #1 check(!hit, "empty TLB misses");
    for (int i = 0; i < 16; i++) begin
      rv[i] = VPN_W'(64'h1000 + 64'(i) * 64'd77); rp[i] = PPN_W'($urandom);
      @(negedge clk); fill_valid = 1; fill_idx = 4'(i); fill_vpn = rv[i]; fill_ppn = rp[i];
    end
    @(negedge clk); fill_valid = 0;
    for (int i = 0; i < 16; i++) begin
      lookup_vpn = rv[i]; #1 check(hit && ppn == rp[i], $sformatf("entry %0d", i));
      lookup_vpn = rv[i] + 1; #1 check(!hit, "neighbour page misses");
    end
    lookup_en = 0; lookup_vpn = rv[3]; #1 check(!hit, "no lookup when disabled");
    lookup_en = 1;
    @(negedge clk); fill_valid = 1; fill_idx = 4'd3; fill_vpn = 52'hABCDE; fill_ppn = 28'h1234;
    @(negedge clk); fill_valid = 0;
    lookup_vpn = rv[3]; #1 check(!hit, "replaced entry gone");
    lookup_vpn = 52'hABCDE; #1 check(hit && ppn == 28'h1234, "new entry");
    @(negedge clk); flush = 1; @(negedge clk); flush = 0;
    for (int i = 0; i < 16; i++) begin lookup_vpn = rv[i]; #1 check(!hit, "flushed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
