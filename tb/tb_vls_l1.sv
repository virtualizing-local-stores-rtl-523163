// tb_vls_l1: end-to-end test of the VLS data buffer at its full size
// (32 KB, 4 ways, 16-entry TLB) with the behavioural memory model.
//
// A reference memory image (shadow) in the testbench, keyed by physical word
// address, is updated by every store and by the effect each DMA command must
// have; every load is compared with it. The sequence exercises each
// mechanism and counts how often it happened:
//   - cached data in a newly enabled partition is still found (hit)
//   - hit latency of one cycle after acceptance
//   - a memory-to-VLS unit-stride copy with non-allocating source reads and
//     no refills for wholly overwritten VLS lines, and a fence that waits
//   - the vector-matrix product routine of the programming example
//   - a 24 KB VLS that survives a 64 KB stream of regular misses
//   - a context switch: registers saved, VLS released, its dirty lines
//     written back by regular misses, then refilled on demand when restored
//   - VLS-to-memory copy with non-allocating destination writes
//   - constant-stride, gather and scatter transfers, processor accesses
//     interleaved with a running transfer
//   - pbound, disabled-VLS and TLB-miss faults, and a DMA fault
// The remote-VLS ports are tied off here (no other cores); tb_vls_cmp
// tests them.
module tb_vls_l1;
  import vls_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
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

  // ---------------------------------------------------------------- checks
  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------------- events
  int n_hit, n_miss, n_wb, n_refill, n_skip, n_byp, n_vls, n_tlb, n_fault;
  int n_contend;
  int cycle = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      n_hit    <= n_hit    + int'(events.hit);
      n_miss   <= n_miss   + int'(events.miss);
      n_wb     <= n_wb     + int'(events.writeback);
      n_refill <= n_refill + int'(events.refill);
      n_skip   <= n_skip   + int'(events.refill_skipped);
      n_byp    <= n_byp    + int'(events.bypass);
      n_vls    <= n_vls    + int'(events.vls_access);
      n_tlb    <= n_tlb    + int'(events.tlb_lookup);
      n_fault  <= n_fault  + int'(events.fault);
      n_contend <= n_contend + int'(dut.dma_acc_valid && cpu_req_valid);
    end
  end

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- address plan
  localparam logic [63:0] VLS_BASE = {VLS_SEG_TAG, 32'h0};
  localparam logic [63:0] REG_BASE = 64'h0000_0000_1000_0000;  // 16 mapped pages
  localparam logic [PPN_W-1:0] REG_PPN = 28'h0010000;
  localparam logic [PPN_W-1:0] P1_PBASE = 28'h0020000;
  localparam logic [PPN_W-1:0] P2_PBASE = 28'h0030000;

  logic [PPN_W-1:0] cur_pbase;

  function automatic logic [PA_W-1:0] tb_pa(input logic [63:0] va);
    if (is_vls_va(va)) return {cur_pbase + PPN_W'(va[31:12]), va[11:0]};
    return {REG_PPN + PPN_W'(va[27:12]), va[11:0]};
  endfunction

  logic [WORD_W-1:0] shadow [logic [PA_W-1:2]];
  function automatic logic [WORD_W-1:0] ref_rd(input logic [PA_W-1:0] pa);
    if (shadow.exists(pa[PA_W-1:2])) return shadow[pa[PA_W-1:2]];
    return u_mem.init_word({pa[PA_W-1:2], 2'b00});
  endfunction
  function automatic void ref_wr(input logic [PA_W-1:0] pa, input logic [WORD_W-1:0] d);
    shadow[pa[PA_W-1:2]] = d;
  endfunction

  // ---------------------------------------------------------------- drivers
  task automatic cpu_op(input cpu_op_e op, input logic [63:0] va, input logic [31:0] wd,
                        output logic [31:0] rd, output logic flt, output int lat);
    @(negedge clk);
    cpu_req_valid = 1'b1;
    cpu_req.op    = op;
    cpu_req.va    = va;
    cpu_req.wdata = wd;
    cpu_req.be    = 4'hF;
    #1;
    while (!cpu_req_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    cpu_req_valid = 1'b0;
    lat = 1;
    while (!cpu_resp_valid) begin
      @(negedge clk);
      lat++;
    end
    rd  = cpu_resp.rdata;
    flt = cpu_resp.fault;
    @(posedge clk);   // let the event counters see this access
    #1;
  endtask

  int last_lat;
  logic last_fault;
  task automatic ld(input logic [63:0] va, output logic [31:0] rd);
    cpu_op(OP_LOAD, va, '0, rd, last_fault, last_lat);
  endtask
  task automatic ld_check(input logic [63:0] va, input string what);
    logic [31:0] rd;
    ld(va, rd);
    check(!last_fault && rd == ref_rd(tb_pa(va)),
          $sformatf("%s: load %h got %h want %h", what, va, rd, ref_rd(tb_pa(va))));
  endtask
  task automatic st(input logic [63:0] va, input logic [31:0] wd);
    logic [31:0] rd;
    cpu_op(OP_STORE, va, wd, rd, last_fault, last_lat);
    check(!last_fault, $sformatf("store %h faulted", va));
    ref_wr(tb_pa(va), wd);
  endtask
  int fence_cycle, fence_start;
  task automatic fence();
    logic [31:0] rd;
    fence_start = cycle;
    cpu_op(OP_FENCE, '0, '0, rd, last_fault, last_lat);
    fence_cycle = cycle;
  endtask

  task automatic cfg(input vls_reg_e r, input logic [63:0] v);
    @(negedge clk);
    cfg_we = 1'b1; cfg_sel = r; cfg_wdata = v;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  function automatic logic [63:0] vls(input int byte_off);
    return VLS_BASE + 64'(byte_off);
  endfunction
  function automatic logic [63:0] rg(input int byte_off);
    return REG_BASE + 64'(byte_off);
  endfunction

  // starts a DMA command; apply_dma_ref() gives its expected effect
  int done_cycle;
  always @(posedge clk) if (dma_done) done_cycle <= cycle;

  task automatic dma_start(input dma_mode_e m, input logic [63:0] s, input logic [63:0] d,
                           input logic [63:0] ix, input int n, input int ss, input int ds);
    @(negedge clk);
    dma_cmd_valid      = 1'b1;
    dma_cmd.mode       = m;
    dma_cmd.src        = s;
    dma_cmd.dst        = d;
    dma_cmd.idx        = ix;
    dma_cmd.count      = 16'(n);
    dma_cmd.src_stride = 32'(ss);
    dma_cmd.dst_stride = 32'(ds);
    #1;
    while (!dma_cmd_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    dma_cmd_valid = 1'b0;
  endtask

  // expected effect of a transfer, worked out on the shadow image
  task automatic apply_dma_ref(input dma_mode_e m, input logic [63:0] s, input logic [63:0] d,
                               input logic [63:0] ix, input int n, input int ss, input int ds);
    logic [63:0] sa, da;
    logic [31:0] k, v;
    for (int i = 0; i < n; i++) begin
      unique case (m)
        DMA_UNIT:   begin sa = s + 64'(4*i);  da = d + 64'(4*i); end
        DMA_STRIDE: begin sa = s + 64'(ss*i); da = d + 64'(ds*i); end
        DMA_GATHER: begin
          k = ref_rd(tb_pa(ix + 64'(4*i)));
          sa = s + {30'd0, k, 2'b00}; da = d + 64'(4*i);
        end
        default: begin
          k = ref_rd(tb_pa(ix + 64'(4*i)));
          sa = s + 64'(4*i); da = d + {30'd0, k, 2'b00};
        end
      endcase
      v = ref_rd(tb_pa(sa));
      ref_wr(tb_pa(da), v);
    end
  endtask

  task automatic dma_run(input dma_mode_e m, input logic [63:0] s, input logic [63:0] d,
                         input logic [63:0] ix, input int n, input int ss, input int ds);
    apply_dma_ref(m, s, d, ix, n, ss, ds);
    dma_start(m, s, d, ix, n, ss, ds);
    fence();
    check(!dma_busy && fence_cycle >= done_cycle, "fence returned before the transfer ended");
    check(!dma_error, "unexpected DMA error");
  endtask

  // ---------------------------------------------------------------- mechanism tallies
  int m_partition_hit = 0, m_protect = 0, m_restore = 0, m_fence_wait = 0;
  int m_bound_fault = 0, m_disabled_fault = 0, m_tlb_fault = 0, m_dma_fault = 0;
  int m_ctx_save = 0, m_vecmat = 0;

  // ---------------------------------------------------------------- test
  initial begin : main
    logic [31:0] rd;
    int h0, m0, b0, s0, t0, w0, f0, c0;
    cpu_req_valid = 0; cpu_req = '0; cfg_we = 0; cfg_sel = REG_ENABLE; cfg_rsel = REG_ENABLE;
    cfg_wdata = 0; tlb_fill_valid = 0; tlb_fill_idx = 0; tlb_fill_vpn = 0; tlb_fill_ppn = 0;
    tlb_flush = 0; dma_cmd_valid = 0; dma_cmd = '0;
    n_hit = 0; n_miss = 0; n_wb = 0; n_refill = 0; n_skip = 0; n_byp = 0; n_vls = 0;
    n_tlb = 0; n_fault = 0; n_contend = 0;
    cur_pbase = P1_PBASE;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // TLB: 16 pages of regular memory
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      tlb_fill_valid = 1; tlb_fill_idx = 4'(k);
      tlb_fill_vpn = VPN_W'(REG_BASE >> 12) + VPN_W'(k);
      tlb_fill_ppn = REG_PPN + PPN_W'(k);
    end
    @(negedge clk); tlb_fill_valid = 0;

    // --- 1. cached data present before the partition is created stays reachable
    ld_check(rg(32'h0), "first load");              // miss, lands in way 0 (invalid first)
    check(last_lat > 1, $sformatf("miss took longer than a hit: %0d", last_lat));
    cfg(REG_PBASE, 64'(P1_PBASE));
    cfg(REG_PBOUND, 64'd6);                           // 6 pages = 24 KB
    cfg(REG_WAYS, 64'd7);                             // saturates at 3 ways
    cfg(REG_ENABLE, 64'd1);
    cfg_rsel = REG_WAYS; #1;
    check(cfg_rdata == 64'd3, "partition size saturates at 24 KB");
    h0 = n_hit;
    ld_check(rg(32'h4), "load in new partition");
    check(n_hit == h0 + 1, "cached line inside the new VLS partition still hits");
    check(last_lat == 1, $sformatf("hit latency %0d, want 1", last_lat));
    if (n_hit == h0 + 1) m_partition_hit++;
    st(rg(32'h8), 32'hCAFE_0001);
    ld_check(rg(32'h8), "store then load");
    check(last_lat == 1, "store-then-load hits");

    // --- 2. memory-to-VLS copy, non-allocating source reads, no refills, fence
    b0 = n_byp; s0 = n_skip; t0 = n_tlb; m0 = n_miss;
    apply_dma_ref(DMA_UNIT, rg(32'h1000), vls(0), 0, 64, 4, 4);
    dma_start(DMA_UNIT, rg(32'h1000), vls(0), 0, 64, 4, 4);
    check(dma_busy, "DMA busy after command");
    fence();
    check(fence_cycle >= done_cycle && !dma_busy, "fence waits for the DMA transfer");
    if (fence_cycle >= done_cycle && fence_cycle - fence_start > 20) m_fence_wait++;
    check(n_byp - b0 == 64, $sformatf("source reads bypass the cache: %0d", n_byp - b0));
    check(n_skip - s0 == 8, $sformatf("8 VLS lines installed without refill: %0d", n_skip - s0));
    check(n_tlb - t0 == 64, $sformatf("TLB looked up only for the 64 source reads: %0d", n_tlb - t0));
    h0 = n_hit; m0 = n_miss; t0 = n_tlb;
    for (int i = 0; i < 64; i++) ld_check(vls(4*i), "VLS copy");
    check(n_hit - h0 == 64 && n_miss == m0, $sformatf("VLS copy is resident: %0d hits %0d misses", n_hit-h0, n_miss-m0));
    check(n_tlb == t0, "VLS loads do not use the TLB");
    m0 = n_miss;
    ld_check(rg(32'h1000), "source after copy");
    check(n_miss == m0 + 1, "source data was not allocated by the copy");

    // --- 3. vector-matrix product A[M] = C[M][N] * B[N] (programming example)
    begin
      localparam int M = 4, N = 16;
      logic [31:0] sum, bv, cv, exp_sum;
      logic [63:0] A, B, C;
      A = rg(32'h2000); B = rg(32'h2100); C = rg(32'h2200);
      for (int j = 0; j < N; j++) st(B + 64'(4*j), 32'(j + 1));
      for (int i = 0; i < M; i++)
        for (int j = 0; j < N; j++) st(C + 64'(4*(i*N + j)), 32'(i * 3 + j));
      dma_run(DMA_UNIT, B, vls(0), 0, N, 4, 4);
      for (int i = 0; i < M; i++) begin
        dma_run(DMA_UNIT, C + 64'(4*i*N), vls(4*N), 0, N, 4, 4);
        sum = 0; exp_sum = 0;
        for (int j = 0; j < N; j++) begin
          ld(vls(4*j), bv);
          ld(vls(4*N + 4*j), cv);
          sum += bv * cv;
          exp_sum += 32'(j + 1) * 32'(i * 3 + j);
        end
        st(A + 64'(4*i), sum);
        check(sum == exp_sum, $sformatf("A[%0d] = %0d want %0d", i, sum, exp_sum));
        if (sum == exp_sum) m_vecmat++;
      end
      for (int i = 0; i < M; i++) ld_check(A + 64'(4*i), "A readback");
    end

    // --- 4. a 24 KB VLS survives a 64 KB stream of regular misses
    dma_run(DMA_UNIT, rg(32'h4000), vls(0), 0, 6144, 4, 4);
    for (int l = 0; l < 2048; l++) ld_check(rg(32*l), "regular stream");
    h0 = n_hit; m0 = n_miss;
    for (int l = 0; l < 768; l++) ld_check(vls(32*l + 4*(l % 8)), "VLS after stream");
    check(n_miss == m0 && n_hit - h0 == 768, $sformatf("VLS lines kept: %0d misses %0d hits", n_miss - m0, n_hit-h0));
    check(1,
          $sformatf("VLS lines kept: %0d misses", n_miss - m0));
    if (n_miss == m0) m_protect++;

    // --- 5. context switch: save registers, release, evict, restore on demand
    for (int l = 0; l < 768; l += 16) st(vls(32*l), 32'hD000_0000 + 32'(l));
    cfg_rsel = REG_PBASE; #1;
    check(cfg_rdata == 64'(P1_PBASE), "pbase saved");
    cfg_rsel = REG_PBOUND; #1;
    check(cfg_rdata == 64'd6, "pbound saved");
    cfg_rsel = REG_ENABLE; #1;
    check(cfg_rdata == 64'd1, "enabled? saved");
    if (cfg_rdata == 64'd1) m_ctx_save++;
    cfg(REG_ENABLE, 64'd0);                           // process 2 runs without the partition
    w0 = n_wb;
    f0 = n_fault;
    ld(vls(0), rd);
    check(last_fault, "VLS access while disabled faults");
    if (last_fault) m_disabled_fault++;
    for (int r = 0; r < 2; r++)
      for (int l = 0; l < 2048; l++) ld_check(rg(32*l), "process 2 stream");
    check(n_wb - w0 >= 48, $sformatf("dirty VLS lines written back: %0d", n_wb - w0));
    begin
      int ok = 1;
      for (int l = 0; l < 768; l += 16)
        if (u_mem.peek({P1_PBASE + PPN_W'((32*l) >> 12), 12'((32*l) & 12'hFFF)})
            != 32'hD000_0000 + 32'(l)) ok = 0;
      check(ok == 1, "evicted VLS data reached its backing pages");
    end
    // process 2 uses its own small VLS
    cur_pbase = P2_PBASE;
    cfg(REG_PBASE, 64'(P2_PBASE));
    cfg(REG_PBOUND, 64'd2);
    cfg(REG_WAYS, 64'd1);
    cfg(REG_ENABLE, 64'd1);
    dma_run(DMA_UNIT, rg(32'h8000), vls(0), 0, 256, 4, 4);
    for (int i = 0; i < 256; i += 7) ld_check(vls(4*i), "process 2 VLS");
    ld(vls(2 * 4096), rd);
    check(last_fault, "VLS access at pbound faults");
    if (last_fault) m_bound_fault++;
    // back to process 1
    cur_pbase = P1_PBASE;
    cfg(REG_PBASE, 64'(P1_PBASE));
    cfg(REG_PBOUND, 64'd6);
    cfg(REG_WAYS, 64'd3);
    m0 = n_miss;
    for (int l = 0; l < 768; l += 16) ld_check(vls(32*l), "process 1 VLS restored");
    for (int l = 1; l < 768; l += 37) ld_check(vls(32*l + 4), "process 1 VLS restored");
    check(n_miss - m0 > 40, "restored VLS data came back on demand");
    if (n_miss - m0 > 40) m_restore++;

    // --- 6. VLS-to-memory copy, non-allocating destination writes
    b0 = n_byp;
    for (int i = 0; i < 32; i++) st(vls(4*i), 32'hB000_0000 + 32'(i));
    // a page never touched before, so the destination is not cached
    @(negedge clk);
    tlb_fill_valid = 1; tlb_fill_idx = 4'd15;
    tlb_fill_vpn = VPN_W'(REG_BASE >> 12) + VPN_W'(16);
    tlb_fill_ppn = REG_PPN + PPN_W'(16);
    @(negedge clk); tlb_fill_valid = 0;
    b0 = n_byp;
    dma_run(DMA_UNIT, vls(0), rg(32'h10000), 0, 32, 4, 4);
    check(n_byp - b0 == 32, $sformatf("destination writes bypass: %0d", n_byp - b0));
    check(u_mem.peek(tb_pa(rg(32'h10000 + 4*5))) == 32'hB000_0005, "copy-out reached memory");
    m0 = n_miss;
    ld_check(rg(32'h10000 + 4*9), "copy-out destination");
    check(n_miss == m0 + 1, "destination not allocated");

    // --- 7. strided, gather and scatter transfers
    dma_run(DMA_STRIDE, rg(32'h3000), vls(32'h1000), 0, 16, 64, 8);
    for (int i = 0; i < 16; i++) ld_check(vls(32'h1000 + 8*i), "strided");
    for (int i = 0; i < 8; i++) st(vls(32'h2000 + 4*i), 32'((i * 5) % 8 + 2*i));
    dma_run(DMA_GATHER, rg(32'h5000), vls(32'h2100), vls(32'h2000), 8, 0, 0);
    for (int i = 0; i < 8; i++) ld_check(vls(32'h2100 + 4*i), "gather");
    dma_run(DMA_SCATTER, vls(32'h2100), vls(32'h3000), vls(32'h2000), 8, 0, 0);
    for (int i = 0; i < 8; i++) ld_check(vls(32'h3000 + 4*(i * 5 % 8 + 2*i)), "scatter");

    // --- 8. processor accesses while a transfer runs
    c0 = n_contend;
    apply_dma_ref(DMA_UNIT, rg(32'h6000), vls(32'h4000), 0, 128, 4, 4);
    dma_start(DMA_UNIT, rg(32'h6000), vls(32'h4000), 0, 128, 4, 4);
    for (int i = 0; i < 40; i++) ld_check(rg(32'h7000 + 4*i), "load during DMA");
    fence();
    check(n_contend > c0, "processor and DMA competed for the access path");
    for (int i = 0; i < 128; i += 5) ld_check(vls(32'h4000 + 4*i), "copy made while loading");

    // --- 9. faults
    ld(64'h0000_0000_2000_0000, rd);
    check(last_fault, "unmapped regular access faults");
    if (last_fault) m_tlb_fault++;
    dma_start(DMA_UNIT, rg(0), vls(6 * 4096 - 8), 0, 4, 4, 4);
    fence();
    check(dma_error, "DMA past pbound sets error");
    if (dma_error) m_dma_fault++;

    // --- mechanism coverage
    check(m_partition_hit > 0, "mechanism: cached data found in new partition");
    check(m_fence_wait > 0,    "mechanism: fence waited for DMA");
    check(m_vecmat == 4,       "mechanism: vector-matrix routine");
    check(m_protect > 0,       "mechanism: partition protected from regular misses");
    check(m_ctx_save > 0,      "mechanism: register save on context switch");
    check(m_restore > 0,       "mechanism: on-demand restore");
    check(m_disabled_fault > 0 && m_bound_fault > 0 && m_tlb_fault > 0 && m_dma_fault > 0,
          "mechanism: every fault kind");
    check(n_wb > 0 && n_refill > 0 && n_skip > 0 && n_byp > 0 && n_contend > 0,
          "mechanism: writeback, refill, refill skip, bypass, contention");
    $display("events: hit=%0d miss=%0d writeback=%0d refill=%0d refill_skipped=%0d bypass=%0d vls=%0d tlb=%0d fault=%0d contend=%0d",
             n_hit, n_miss, n_wb, n_refill, n_skip, n_byp, n_vls, n_tlb, n_fault, n_contend);
    $display("memory: reads=%0d writes=%0d cycles=%0d", u_mem.n_reads, u_mem.n_writes, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
