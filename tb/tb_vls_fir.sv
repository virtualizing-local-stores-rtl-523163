// tb_vls_fir: FIR-filter workload on one full-size core (32 KB cache,
// 24 KB local store), software-managed through the local store.
//
// The program streams input samples through the local store in strips, as a
// local-store FIR kernel does. It works as follows:
//   - The 16 filter taps are stored once in the local store.
//   - For each strip of 256 outputs, the DMA engine copies 256+15 input
//     samples from memory into one of two local-store input buffers. The
//     copy for the next strip runs while the processor computes the current
//     one (double buffering; the processor's loads contend with the
//     transfer).
//   - Outputs are stored into a local-store output buffer and copied out to
//     memory by DMA.
// Samples are the memory model's initial contents. Every output in memory
// is compared with y[n] = sum_k h[k] * x[n-k] (32-bit wrap-around),
// computed here from the same formula.
// Also checks the mechanisms the kernel relies on:
//   - input reads bypass the cache (no allocation);
//   - wholly overwritten buffer lines are not refilled;
//   - output writes bypass the cache;
//   - once the first strip is done, every compute load from an input buffer
//     hits, answered one cycle after acceptance (the DMA engine filled the
//     buffer).
// The sample count (16 strips, 4111 samples) is smaller than a full
// benchmark input so that the run stays short.
module tb_vls_fir;
  import vls_pkg::*;
  localparam int T = 16, S = 256, NS = 16, NX = NS * S + T - 1;
  localparam logic [63:0] IN_BASE  = 64'h0000_0000_2000_0000;
  localparam logic [63:0] OUT_BASE = 64'h0000_0000_3000_0000;
  localparam logic [PPN_W-1:0] IN_PPN = 28'h0050000, OUT_PPN = 28'h0060000, PBASE = 28'h0070000;
  localparam int TAPS = 32'h0000, INB0 = 32'h1000, INB1 = 32'h2000, OUTB0 = 32'h3000, OUTB1 = 32'h4000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              cpu_req_valid, cpu_req_ready, cpu_resp_valid;
  cpu_req_t          cpu_req;
  cpu_resp_t         cpu_resp;
  logic              cfg_we;
  vls_reg_e          cfg_sel, cfg_rsel;
  logic [63:0]       cfg_wdata, cfg_rdata;
  logic              tlb_fill_valid, tlb_flush;
  logic [3:0]        tlb_fill_idx;
  logic [VPN_W-1:0]  tlb_fill_vpn;
  logic [PPN_W-1:0]  tlb_fill_ppn;
  logic              dma_cmd_valid, dma_cmd_ready, dma_busy, dma_error, dma_done;
  dma_cmd_t          dma_cmd;
  logic              mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t          mem_req;
  logic [LINE_W-1:0] mem_resp_data;
  vls_events_t       events;

  vls_l1 dut (
    .clk, .rst_n,
    .cpu_req_valid, .cpu_req_ready, .cpu_req, .cpu_resp_valid, .cpu_resp,
    .cfg_we, .cfg_sel, .cfg_wdata, .cfg_rsel, .cfg_rdata,
    .tlb_fill_valid, .tlb_fill_idx, .tlb_fill_vpn, .tlb_fill_ppn, .tlb_flush,
    .dma_cmd_valid, .dma_cmd_ready, .dma_cmd, .dma_busy, .dma_error, .dma_done,
    .mem_req_valid, .mem_req_ready, .mem_req, .mem_resp_valid, .mem_resp_data,
    .rmap_we(1'b0), .rmap_idx('0), .rmap_valid(1'b0), .rmap_vls('0),
    .rvls_out_valid(), .rvls_out_ready(1'b0), .rvls_out_dst(), .rvls_out_req(),
    .rvls_out_resp_valid(1'b0), .rvls_out_resp('0),
    .rvls_in_valid(1'b0), .rvls_in_ready(), .rvls_in_req('0),
    .rvls_in_resp_valid(), .rvls_in_resp(),
    .events
  );

  vls_mem_model #(.LAT(4)) u_mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid),
    .req_ready (mem_req_ready),
    .req       (mem_req),
    .resp_valid(mem_resp_valid),
    .resp_data (mem_resp_data)
  );

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #30_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_byp = 0, n_skip = 0, cycle = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      n_byp  <= n_byp  + int'(events.bypass);
      n_skip <= n_skip + int'(events.refill_skipped);
    end
  end

  int last_lat;
  task automatic cpu_op(input cpu_op_e op, input logic [63:0] va, input logic [31:0] wd,
                        output logic [31:0] rd);
    @(negedge clk);
    cpu_req_valid = 1'b1; cpu_req.op = op; cpu_req.va = va; cpu_req.wdata = wd; cpu_req.be = 4'hF;
    #1;
    while (!cpu_req_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cpu_req_valid = 1'b0;
    last_lat = 1;
    while (!cpu_resp_valid) begin @(negedge clk); last_lat++; end
    rd = cpu_resp.rdata;
    if (cpu_resp.fault) begin failures++; $display("FAIL: access %h faulted", va); end
    @(posedge clk);
    #1;
  endtask
  task automatic cfg(input vls_reg_e r, input logic [63:0] v);
    @(negedge clk); cfg_we = 1'b1; cfg_sel = r; cfg_wdata = v; @(negedge clk); cfg_we = 1'b0;
  endtask
  task automatic tlb(input int idx, input logic [63:0] va, input logic [PPN_W-1:0] ppn);
    @(negedge clk);
    tlb_fill_valid = 1'b1; tlb_fill_idx = 4'(idx); tlb_fill_vpn = va[63:12]; tlb_fill_ppn = ppn;
    @(negedge clk); tlb_fill_valid = 1'b0;
  endtask
  task automatic dma_copy(input logic [63:0] s, input logic [63:0] d, input int n);
    @(negedge clk);
    dma_cmd_valid = 1'b1; dma_cmd = '0; dma_cmd.mode = DMA_UNIT;
    dma_cmd.src = s; dma_cmd.dst = d; dma_cmd.count = 16'(n);
    #1;
    while (!dma_cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk); dma_cmd_valid = 1'b0;
  endtask
  task automatic fence();
    logic [31:0] rd;
    cpu_op(OP_FENCE, '0, '0, rd);
  endtask
  function automatic logic [63:0] vls(input int off);
    return {VLS_SEG_TAG, 32'(off)};
  endfunction
  function automatic logic [WORD_W-1:0] x_of(input int i);
    return u_mem.init_word({IN_PPN, 12'h0} + PA_W'(4 * i));
  endfunction
  function automatic logic [WORD_W-1:0] h_of(input int k);
    return 32'(3 * k + 1);
  endfunction

  initial begin
    logic [31:0] rd, acc, hk [T];
    int b0, s0, m_steady, bad;
    cpu_req_valid = 0; cpu_req = '0; cfg_we = 0; cfg_sel = REG_ENABLE; cfg_rsel = REG_ENABLE;
    cfg_wdata = 0; tlb_fill_valid = 0; tlb_fill_idx = 0; tlb_fill_vpn = 0; tlb_fill_ppn = 0;
    tlb_flush = 0; dma_cmd_valid = 0; dma_cmd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    cfg(REG_PBASE, 64'(PBASE)); cfg(REG_PBOUND, 64'd6); cfg(REG_WAYS, 64'd3); cfg(REG_ENABLE, 64'd1);
    for (int p = 0; p < 5; p++) tlb(p, IN_BASE + 64'(4096 * p), IN_PPN + PPN_W'(p));
    for (int p = 0; p < 4; p++) tlb(5 + p, OUT_BASE + 64'(4096 * p), OUT_PPN + PPN_W'(p));

    for (int k = 0; k < T; k++) cpu_op(OP_STORE, vls(TAPS + 4 * k), h_of(k), rd);

    b0 = n_byp; s0 = n_skip; m_steady = 0;
    dma_copy(IN_BASE, vls(INB0), S + T - 1);
    for (int s = 0; s < NS; s++) begin
      int inb, outb;
      inb  = (s % 2 == 0) ? INB0 : INB1;
      outb = (s % 2 == 0) ? OUTB0 : OUTB1;
      fence();
      if (s + 1 < NS)
        dma_copy(IN_BASE + 64'(4 * S * (s + 1)), vls((s % 2 == 0) ? INB1 : INB0), S + T - 1);
      for (int k = 0; k < T; k++) cpu_op(OP_LOAD, vls(TAPS + 4 * k), '0, hk[k]);
      for (int j = 0; j < S; j++) begin
        acc = 0;
        for (int k = 0; k < T; k++) begin
          cpu_op(OP_LOAD, vls(inb + 4 * (j + T - 1 - k)), '0, rd);
          acc += hk[k] * rd;
          if (s >= 1 && last_lat != 1) m_steady++;
        end
        cpu_op(OP_STORE, vls(outb + 4 * j), acc, rd);
      end
      fence();
      dma_copy(vls(outb), OUT_BASE + 64'(4 * S * s), S);
    end
    fence();
    check(!dma_error, "no DMA error");

    bad = 0;
    for (int n = T - 1; n < NX; n++) begin
      logic [31:0] y;
      y = 0;
      for (int k = 0; k < T; k++) y += h_of(k) * x_of(n - k);
      if (u_mem.peek({OUT_PPN, 12'h0} + PA_W'(4 * (n - T + 1))) != y) begin
        bad++;
        if (bad < 5) $display("FAIL: y[%0d] = %h want %h", n, u_mem.peek({OUT_PPN, 12'h0} + PA_W'(4 * (n - T + 1))), y);
      end
      checks++;
    end
    failures += bad;

    check(n_byp - b0 >= NS * (S + T - 1) + NS * S,
          $sformatf("input reads and output writes bypassed the cache: %0d", n_byp - b0));
    check(n_skip - s0 >= 2 * (S / 8), $sformatf("wholly overwritten input lines not refilled: %0d", n_skip - s0));
    check(m_steady == 0, $sformatf("compute loads from a filled input buffer missed %0d times", m_steady));
    $display("fir: %0d outputs, %0d cycles, bypasses=%0d refills skipped=%0d",
             NX - T + 1, cycle, n_byp - b0, n_skip - s0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
