// tb_vls_sram: random masked writes and reads against a reference array;
// checks one-cycle read latency, old data on a write, and that the output
// holds while the array is not enabled.
module tb_vls_sram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we; logic [3:0] addr; logic [63:0] wdata, rdata; logic [7:0] be;
  vls_sram #(.DEPTH(16), .WIDTH(64), .GRAN(8)) dut (.*);
  logic [63:0] ref_mem [16];
  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [63:0] exp;
    en = 0; we = 0; addr = 0; wdata = 0; be = 0;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk); en = 1; we = 1; addr = 4'(a); be = '1; wdata = {$urandom, $urandom};
      ref_mem[a] = wdata;
    end
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      en = 1; we = $urandom % 2; addr = 4'($urandom); be = 8'($urandom); wdata = {$urandom, $urandom};
      exp = ref_mem[addr];
      if (we) for (int b = 0; b < 8; b++) if (be[b]) ref_mem[addr][b*8 +: 8] = wdata[b*8 +: 8];
      @(negedge clk);
      check(rdata == exp, $sformatf("read %0d got %h want %h", addr, rdata, exp));
      en = 0; we = 0; addr = addr + 1;
      @(negedge clk);
      check(rdata == exp, "output holds while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
