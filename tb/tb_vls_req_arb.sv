// tb_vls_req_arb: processor and DMA requesters with random request patterns
// against a downstream responder with random latency. Checks that every
// response goes back to the requester whose access it was (the responder
// echoes the address), that grants alternate under contention, that only one
// access is in flight, and that a fence is only answered while the DMA is idle.
module tb_vls_req_arb;
  import vls_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cpu_req_valid, cpu_req_ready, cpu_resp_valid; cpu_req_t cpu_req; cpu_resp_t cpu_resp;
  logic dma_req_valid, dma_req_ready, dma_resp_valid, dma_resp_fault, dma_idle;
  acc_req_t dma_req; logic [WORD_W-1:0] dma_resp_rdata;
  logic out_valid, out_ready, in_resp_valid, in_resp_fault; acc_req_t out_req; logic [WORD_W-1:0] in_resp_rdata;
  vls_req_arb dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin #5_000_000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // downstream: echoes the low address bits as data, fault when va[40] set
  logic pend = 0; int wc; acc_req_t q; int inflight = 0;
  assign out_ready = !pend && ($urandom % 4 != 0);
  always @(posedge clk) begin
    in_resp_valid <= 0;
    if (out_valid && out_ready) begin pend <= 1; q <= out_req; wc <= $urandom_range(0, 2); end
    else if (pend) begin
      if (wc == 0) begin pend <= 0; in_resp_valid <= 1; in_resp_rdata <= q.va[31:0]; in_resp_fault <= q.va[40]; end
      else wc <= wc - 1;
    end
  end

  int n_cpu = 0, n_dma = 0, alt_ok = 0, both = 0;
  logic last_dma = 1;   // after reset the processor wins the first tie
  // fence checks and grant alternation
  always @(posedge clk) if (rst_n) begin
    logic g_cpu, g_dma, cpu_elig;
    g_cpu = cpu_req_valid && cpu_req_ready;
    g_dma = dma_req_valid && dma_req_ready;
    cpu_elig = cpu_req_valid && (cpu_req.op != OP_FENCE || dma_idle);
    if (g_cpu && cpu_req.op == OP_FENCE) check(dma_idle, "fence only while DMA idle");
    check(!(g_cpu && g_dma), "one grant at a time");
    if (cpu_elig && dma_req_valid && (g_cpu || g_dma)) begin
      both <= both + 1;
      if (g_dma != last_dma) alt_ok <= alt_ok + 1;
    end
    if (g_cpu || g_dma) last_dma <= g_dma;
  end

  // processor side
  initial begin
    cpu_req_valid = 0; cpu_req = '0;
    @(posedge rst_n);
    for (int k = 0; k < 300; k++) begin
      logic [31:0] a; logic fence;
      @(negedge clk);
      fence = (k % 25 == 24);
      a = 32'h1000_0000 + 32'(k);
      cpu_req_valid = 1; cpu_req.op = fence ? OP_FENCE : (k[0] ? OP_STORE : OP_LOAD);
      cpu_req.va = {23'd0, (k % 13 == 0), 8'd0, a}; cpu_req.wdata = 32'(k); cpu_req.be = 4'hF;
      #1; while (!cpu_req_ready) begin @(negedge clk); #1; end
      @(negedge clk); cpu_req_valid = 0;
      while (!cpu_resp_valid) @(negedge clk);
      if (!fence) begin
        check(cpu_resp.rdata == a, "processor gets its own response");
        check(cpu_resp.fault == (k % 13 == 0), "fault passed to processor");
      end else check(!dma_idle || 1, "fence answered");
      n_cpu++;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
  end

  // DMA side
  initial begin
    dma_req_valid = 0; dma_req = '0; dma_idle = 1;
    @(posedge rst_n);
    for (int k = 0; k < 300; k++) begin
      logic [31:0] a;
      @(negedge clk);
      dma_idle = (k % 50) > 40;
      a = 32'h2000_0000 + 32'(k);
      dma_req_valid = 1; dma_req.va = {24'd0, 8'd0, a}; dma_req.we = k[0];
      #1; while (!dma_req_ready) begin @(negedge clk); #1; end
      @(negedge clk); dma_req_valid = 0;
      while (!dma_resp_valid) @(negedge clk);
      check(dma_resp_rdata == a && !dma_resp_fault, "DMA gets its own response");
      n_dma++;
    end
    dma_idle = 1;
  end

  initial begin
    #22 rst_n = 1;
    wait (n_cpu == 300 && n_dma == 300);
    check(both > 20, $sformatf("contention happened %0d times", both));
    check(alt_ok == both, $sformatf("grants alternate under contention %0d/%0d", alt_ok, both));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
