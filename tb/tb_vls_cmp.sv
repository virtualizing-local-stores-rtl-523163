// tb_vls_cmp: end-to-end test of the multi-core top at its full size
// (16 cores, each a 32 KB 4-way data buffer with a 24 KB VLS and a 16-entry
// TLB) on a shared behavioural memory.
//
// Thread k runs on core k and owns VLS k, backed by its own physical pages;
// the remote-VLS map says VLS k is resident in data buffer k. A reference
// image of every VLS (indexed by VLS number and offset) is updated by every
// store and DMA transfer, and every load is compared with it. The sequence
// exercises and counts:
//   - each core filling its own VLS through its local segment
//   - loads from another thread's VLS, carried by the cross-VLS network and
//     served by the owner's data buffer
//   - an access to the thread's own VLS through its per-thread range
//     (served locally, no network traffic)
//   - remote stores, then the owner reading them locally
//   - pairs of cores reading each other's VLS at the same time
//   - a DMA transfer from a local VLS to a remote one
//   - a remote access past the owner's pbound, faulting back to the sender
//   - a suspended thread: its map entry cleared, its VLS released and
//     evicted to its backing pages by other traffic, then read by another
//     core as ordinary memory through its TLB; then resumed and read
//     remotely again, the owner refilling its VLS on demand
module tb_vls_cmp;
  import vls_pkg::*;
  localparam int N = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic      [N-1:0]        cpu_req_valid, cpu_req_ready, cpu_resp_valid;
  cpu_req_t  [N-1:0]        cpu_req;
  cpu_resp_t [N-1:0]        cpu_resp;
  logic      [N-1:0]        cfg_we;
  vls_reg_e  [N-1:0]        cfg_sel, cfg_rsel;
  logic      [N-1:0][63:0]  cfg_wdata, cfg_rdata;
  logic      [N-1:0]        tlb_fill_valid, tlb_flush;
  logic      [N-1:0][3:0]   tlb_fill_idx;
  logic      [N-1:0][VPN_W-1:0] tlb_fill_vpn;
  logic      [N-1:0][PPN_W-1:0] tlb_fill_ppn;
  logic      [N-1:0]        dma_cmd_valid, dma_cmd_ready, dma_busy, dma_error, dma_done;
  dma_cmd_t  [N-1:0]        dma_cmd;
  logic      [N-1:0]        mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t  [N-1:0]        mem_req;
  logic      [N-1:0][LINE_W-1:0] mem_resp_data;
  logic                     rmap_we, rmap_valid;
  logic      [3:0]          rmap_idx;
  logic      [RVLS_ID_W-1:0] rmap_vls;
  vls_events_t [N-1:0]      events;

  vls_cmp dut (.*);

  vls_shared_mem #(.N(N), .LAT(4)) u_mem (
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

  initial begin
    #40_000_000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- events
  int n_rout [N];
  int n_rin  [N];
  int n_vls  [N];
  int n_tlb  [N];
  int n_flt  [N];
  int n_wb   [N];
  int n_ref  [N];
  always @(posedge clk)
    if (rst_n)
      for (int c = 0; c < N; c++) begin
        n_rout[c] <= n_rout[c] + int'(events[c].remote_out);
        n_rin[c]  <= n_rin[c]  + int'(events[c].remote_in);
        n_vls[c]  <= n_vls[c]  + int'(events[c].vls_access);
        n_tlb[c]  <= n_tlb[c]  + int'(events[c].tlb_lookup);
        n_flt[c]  <= n_flt[c]  + int'(events[c].fault);
        n_wb[c]   <= n_wb[c]   + int'(events[c].writeback);
        n_ref[c]  <= n_ref[c]  + int'(events[c].refill);
      end

  // ---------------------------------------------------------------- address plan
  localparam int VLS_BYTES = 24 * 1024;
  localparam logic [63:0] REG_BASE = 64'h0000_0000_1000_0000;

  function automatic logic [PPN_W-1:0] pbase(input int k);
    return 28'h0040000 + PPN_W'(16 * k);
  endfunction
  function automatic logic [63:0] lva(input int off);           // own VLS
    return {VLS_SEG_TAG, 32'(off)};
  endfunction
  function automatic logic [63:0] rva(input int k, input int off);  // VLS k
    return {RVLS_SEG_TAG, RVLS_ID_W'(k), 32'(off)};
  endfunction
  function automatic logic [PA_W-1:0] vls_pa(input int k, input int off);
    return {pbase(k) + PPN_W'(off >> 12), 12'(off)};
  endfunction

  logic [WORD_W-1:0] shadow [int];
  function automatic int key(input int k, input int off);
    return k * 65536 + off;
  endfunction
  function automatic logic [WORD_W-1:0] ref_v(input int k, input int off);
    if (shadow.exists(key(k, off))) return shadow[key(k, off)];
    return u_mem.init_word(vls_pa(k, off));
  endfunction

  // ---------------------------------------------------------------- drivers
  int last_fault [N];
  task automatic cpu_op(input int c, input cpu_op_e op, input logic [63:0] va,
                        input logic [31:0] wd, output logic [31:0] rd);
    @(negedge clk);
    cpu_req_valid[c]  = 1'b1;
    cpu_req[c].op     = op;
    cpu_req[c].va     = va;
    cpu_req[c].wdata  = wd;
    cpu_req[c].be     = 4'hF;
    #1;
    while (!cpu_req_ready[c]) begin @(negedge clk); #1; end
    @(negedge clk);
    cpu_req_valid[c] = 1'b0;
    while (!cpu_resp_valid[c]) @(negedge clk);
    rd = cpu_resp[c].rdata;
    last_fault[c] = int'(cpu_resp[c].fault);
    @(posedge clk);
    #1;
  endtask

  task automatic st(input int c, input logic [63:0] va, input logic [31:0] wd);
    logic [31:0] rd;
    cpu_op(c, OP_STORE, va, wd, rd);
    check(last_fault[c] == 0, $sformatf("core %0d store %h faulted", c, va));
  endtask
  // load from VLS k at offset off through address va, compare with the image
  task automatic ld_chk(input int c, input logic [63:0] va, input int k, input int off,
                        input string what);
    logic [31:0] rd;
    cpu_op(c, OP_LOAD, va, '0, rd);
    check(last_fault[c] == 0 && rd == ref_v(k, off),
          $sformatf("%s: core %0d load %h got %h want %h", what, c, va, rd, ref_v(k, off)));
  endtask

  task automatic cfg(input int c, input vls_reg_e r, input logic [63:0] v);
    @(negedge clk);
    cfg_we[c] = 1'b1; cfg_sel[c] = r; cfg_wdata[c] = v;
    @(negedge clk);
    cfg_we[c] = 1'b0;
  endtask
  task automatic map(input int j, input logic v, input int k);
    @(negedge clk);
    rmap_we = 1'b1; rmap_idx = 4'(j); rmap_valid = v; rmap_vls = RVLS_ID_W'(k);
    @(negedge clk);
    rmap_we = 1'b0;
  endtask
  task automatic tlb(input int c, input int idx, input logic [63:0] va, input logic [PPN_W-1:0] ppn);
    @(negedge clk);
    tlb_fill_valid[c] = 1'b1; tlb_fill_idx[c] = 4'(idx);
    tlb_fill_vpn[c] = va[63:12]; tlb_fill_ppn[c] = ppn;
    @(negedge clk);
    tlb_fill_valid[c] = 1'b0;
  endtask

  int pair_ok [4];

  initial begin
    int r0, i0, t0, f0, v0;
    logic [31:0] rd;
    cpu_req_valid = '0; cpu_req = '0; cfg_we = '0; cfg_sel = '{default: REG_ENABLE};
    cfg_rsel = '{default: REG_ENABLE}; cfg_wdata = '0; tlb_fill_valid = '0; tlb_flush = '0;
    tlb_fill_idx = '0; tlb_fill_vpn = '0; tlb_fill_ppn = '0; dma_cmd_valid = '0; dma_cmd = '0;
    rmap_we = 0; rmap_valid = 0; rmap_idx = 0; rmap_vls = 0;
    for (int c = 0; c < N; c++) begin
      n_rout[c] = 0; n_rin[c] = 0; n_vls[c] = 0; n_tlb[c] = 0; n_flt[c] = 0;
      n_wb[c] = 0; n_ref[c] = 0; last_fault[c] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- set-up: each thread gets a 24 KB VLS and its map entry
    for (int c = 0; c < N; c++) begin
      cfg(c, REG_PBASE, 64'(pbase(c)));
      cfg(c, REG_PBOUND, 64'(VLS_BYTES / 4096));
      cfg(c, REG_WAYS, 64'd3);
      cfg(c, REG_ENABLE, 64'd1);
      map(c, 1'b1, c);
    end

    // ---- each core fills the first 768 bytes of its own VLS
    for (int c = 0; c < N; c++)
      for (int w = 0; w < 192; w++) begin
        st(c, lva(4 * w), 32'hC000_0000 | (32'(c) << 16) | 32'(w));
        shadow[key(c, 4 * w)] = 32'hC000_0000 | (32'(c) << 16) | 32'(w);
      end

    // ---- remote loads: core c reads VLS (c+5) mod 16
    r0 = n_rout[0]; i0 = n_rin[5];
    for (int c = 0; c < N; c++)
      for (int w = 0; w < 8; w++)
        ld_chk(c, rva((c + 5) % N, 4 * (w * 23)), (c + 5) % N, 4 * (w * 23), "remote load");
    check(n_rout[0] - r0 == 8, $sformatf("core 0 sent %0d remote accesses", n_rout[0] - r0));
    check(n_rin[5] - i0 == 8, $sformatf("core 5 served %0d remote accesses", n_rin[5] - i0));

    // ---- own VLS through its per-thread range stays local
    r0 = n_rout[3]; v0 = n_vls[3];
    for (int w = 0; w < 16; w++) ld_chk(3, rva(3, 4 * w), 3, 4 * w, "own range");
    check(n_rout[3] == r0 && n_vls[3] - v0 == 16, "own range served as local VLS accesses");

    // ---- remote stores, read back by the owner
    for (int w = 0; w < 16; w++) begin
      st(2, rva(7, 32'h1000 + 4 * w), 32'hAB00_0000 | 32'(w));
      shadow[key(7, 32'h1000 + 4 * w)] = 32'hAB00_0000 | 32'(w);
    end
    for (int w = 0; w < 16; w++) ld_chk(7, lva(32'h1000 + 4 * w), 7, 32'h1000 + 4 * w, "owner reads remote store");

    // ---- cores reading each other's VLS at the same time
    for (int p = 0; p < 4; p++) pair_ok[p] = 0;
    fork
      begin for (int w = 0; w < 100; w++) begin cpu_op(1, OP_LOAD, rva(4, 4 * (w % 192)), '0, rd);
        if (rd == ref_v(4, 4 * (w % 192))) pair_ok[0]++; end end
      begin for (int w = 0; w < 100; w++) begin cpu_op(4, OP_LOAD, rva(1, 4 * (w % 192)), '0, rd);
        if (rd == ref_v(1, 4 * (w % 192))) pair_ok[1]++; end end
      begin for (int w = 0; w < 100; w++) begin cpu_op(8, OP_LOAD, rva(11, 4 * ((3 * w) % 192)), '0, rd);
        if (rd == ref_v(11, 4 * ((3 * w) % 192))) pair_ok[2]++; end end
      begin for (int w = 0; w < 100; w++) begin cpu_op(11, OP_LOAD, rva(8, 4 * ((3 * w) % 192)), '0, rd);
        if (rd == ref_v(8, 4 * ((3 * w) % 192))) pair_ok[3]++; end end
    join
    for (int p = 0; p < 4; p++) check(pair_ok[p] == 100, $sformatf("mutual remote loads %0d: %0d correct", p, pair_ok[p]));

    // ---- DMA from core 6's VLS into VLS 9
    r0 = n_rout[6]; i0 = n_rin[9];
    @(negedge clk);
    dma_cmd_valid[6] = 1'b1;
    dma_cmd[6] = '0;
    dma_cmd[6].mode = DMA_UNIT; dma_cmd[6].src = lva(0); dma_cmd[6].dst = rva(9, 32'h2000);
    dma_cmd[6].count = 16'd64;
    #1;
    while (!dma_cmd_ready[6]) begin @(negedge clk); #1; end
    @(negedge clk);
    dma_cmd_valid[6] = 1'b0;
    for (int w = 0; w < 64; w++) shadow[key(9, 32'h2000 + 4 * w)] = ref_v(6, 4 * w);
    cpu_op(6, OP_FENCE, '0, '0, rd);
    check(!dma_busy[6] && !dma_error[6], "DMA to remote VLS finished without error");
    check(n_rout[6] - r0 == 64 && n_rin[9] - i0 == 64, "DMA writes went over the network");
    for (int w = 0; w < 64; w++) ld_chk(9, lva(32'h2000 + 4 * w), 9, 32'h2000 + 4 * w, "DMA into remote VLS");

    // ---- remote access past the owner's pbound
    f0 = n_flt[5];
    cpu_op(0, OP_LOAD, rva(5, VLS_BYTES), '0, rd);
    check(last_fault[0] == 1, "remote access past pbound faults at the sender");
    check(n_flt[5] - f0 == 1, "the fault was raised by the owner's data buffer");

    // ---- thread 10 suspended: map cleared, VLS released and evicted
    map(10, 1'b0, 10);
    cfg(10, REG_ENABLE, 64'd0);
    for (int p = 0; p < 16; p++)
      tlb(10, p, REG_BASE + 64'(4096 * p), 28'h0010000 + PPN_W'(p));
    t0 = n_wb[10];
    for (int l = 0; l < 2048; l++) cpu_op(10, OP_LOAD, REG_BASE + 64'(32 * l), '0, rd);
    check(n_wb[10] - t0 >= 24, $sformatf("thread 10's dirty VLS lines written back: %0d", n_wb[10] - t0));
    // another core reads VLS 10 as ordinary memory through its TLB
    for (int p = 0; p < 6; p++) tlb(0, p, rva(10, 4096 * p), pbase(10) + PPN_W'(p));
    r0 = n_rout[0]; t0 = n_tlb[0];
    for (int w = 0; w < 192; w += 7) ld_chk(0, rva(10, 4 * w), 10, 4 * w, "non-resident VLS via TLB");
    check(n_rout[0] == r0 && n_tlb[0] - t0 == 28, "non-resident accesses used the TLB, not the network");

    // ---- thread 10 resumed: VLS enabled again and mapped; refilled on demand
    cfg(10, REG_ENABLE, 64'd1);
    map(10, 1'b1, 10);
    r0 = n_rout[0]; t0 = n_ref[10];
    for (int w = 0; w < 192; w += 8) ld_chk(0, rva(10, 4 * w), 10, 4 * w, "resumed VLS read remotely");
    check(n_rout[0] - r0 == 24, "resumed VLS reached over the network");
    check(n_ref[10] - t0 == 24, $sformatf("owner refilled %0d VLS lines on demand", n_ref[10] - t0));

    // ---- mechanism tally
    begin
      int tot_out = 0, tot_in = 0;
      for (int c = 0; c < N; c++) begin tot_out += n_rout[c]; tot_in += n_rin[c]; end
      check(tot_out == tot_in, "every remote access sent was served");
      $display("remote accesses: sent=%0d served=%0d", tot_out, tot_in);
      $display("core 10: writebacks=%0d refills=%0d; memory reads=%0d writes=%0d",
               n_wb[10], n_ref[10], u_mem.n_reads, u_mem.n_writes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
