// tb_vls_remote_map: random test of the remote-VLS map registers and
// decode against a reference model kept in the testbench.
//
// Writes random (valid, VLS number) pairs into random data-buffer registers,
// with VLS numbers drawn from a small set so several registers often match
// or none does, then decodes random addresses inside and outside the
// remote-VLS ranges and checks in_range, resident, the chosen buffer (the
// lowest-numbered matching register), is_self and the local-segment
// address. Runs at NBUF=16 with CORE_ID=5.
module tb_vls_remote_map;
  import vls_pkg::*;
  localparam int NBUF = 16, CID = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic map_we, map_valid; logic [3:0] map_idx; logic [RVLS_ID_W-1:0] map_vls;
  logic [VA_W-1:0] va, local_va;
  logic in_range, resident, is_self; logic [3:0] buf_idx;
  vls_remote_map #(.NBUF(NBUF), .CORE_ID(CID)) dut (.*);
  int checks = 0, failures = 0;
  logic              m_vld [NBUF];
  logic [RVLS_ID_W-1:0] m_vls [NBUF];
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int hits = 0, selfs = 0;
    map_we = 0; map_valid = 0; map_idx = 0; map_vls = 0; va = 0;
    for (int j = 0; j < NBUF; j++) begin m_vld[j] = 0; m_vls[j] = 0; end
    #12 rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      if ($urandom_range(0, 2) == 0) begin
        map_we = 1; map_idx = 4'($urandom); map_valid = 1'($urandom_range(0, 3) != 0);
        map_vls = RVLS_ID_W'($urandom_range(0, 19));
        @(negedge clk); map_we = 0;
        m_vld[map_idx] = map_valid; m_vls[map_idx] = map_vls;
      end
      begin
        logic [RVLS_ID_W-1:0] k; logic [31:0] off; logic in_r; logic e_res; int e_buf;
        k = RVLS_ID_W'($urandom_range(0, 19)); off = $urandom;
        in_r = $urandom_range(0, 4) != 0;
        va = in_r ? {RVLS_SEG_TAG, k, off} : {$urandom, off};
        if (va[63:40] == RVLS_SEG_TAG) in_r = 1;
        e_res = 0; e_buf = 0;
        if (in_r)
          for (int j = 0; j < NBUF; j++)
            if (!e_res && m_vld[j] && m_vls[j] == k) begin e_res = 1; e_buf = j; end
        #1;
        check(in_range == in_r, "in_range");
        check(resident == e_res, $sformatf("resident k=%0d", k));
        check(!e_res || int'(buf_idx) == e_buf, $sformatf("buffer %0d expected %0d", buf_idx, e_buf));
        check(is_self == (e_res && e_buf == CID), "is_self");
        check(local_va == {VLS_SEG_TAG, off}, "local address");
        if (e_res) hits++;
        if (e_res && e_buf == CID) selfs++;
      end
    end
    check(hits > 300 && selfs > 10, $sformatf("coverage: %0d resident, %0d self", hits, selfs));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
