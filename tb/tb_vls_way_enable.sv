// tb_vls_way_enable: all four ways for a regular access, exactly the
// direct-mapped way for a VLS access.
module tb_vls_way_enable;
  import vls_pkg::*;
  logic is_vls; logic [WAY_W-1:0] vls_way; logic [WAYS-1:0] way_en;
  vls_way_enable dut (.*);
  int checks = 0, failures = 0;
  initial begin #1000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int v = 0; v < 2; v++)
      for (int w = 0; w < WAYS; w++) begin
        is_vls = v[0]; vls_way = WAY_W'(w); #1;
        checks++;
        if (way_en != (v ? 4'(1 << w) : 4'hF)) begin
          failures++; $display("FAIL: is_vls=%0d way=%0d en=%b", v, w, way_en);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
