// tb_vls_dma: the DMA engine against a word-addressed responder with random
// latency. Runs unit-stride, strided, gather and scatter transfers in both
// directions between regular memory and the VLS segment and checks: the
// destination contents, the number of accesses, the no_alloc and no_refill
// hints of every access (worked out here from the transfer), busy/done, and
// that a faulting access ends the transfer with error set.
module tb_vls_dma;
  import vls_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic cmd_valid, cmd_ready, busy, error, done, acc_valid, acc_ready, resp_valid, resp_fault;
  dma_cmd_t cmd; acc_req_t acc; logic [WORD_W-1:0] resp_rdata;
  vls_dma dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin #5_000_000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // responder
  logic [31:0] mem [logic [63:2]];
  function automatic logic [31:0] rdw(input logic [63:0] a);
    if (mem.exists(a[63:2])) return mem[a[63:2]];
    return a[31:0] ^ a[63:32] ^ 32'h1357_9BDF;
  endfunction
  logic [63:0] fault_va = '1;
  int n_acc = 0, bad_hint = 0, n_skip_hint = 0, n_na_hint = 0;
  logic [63:0] cur_src_lo, cur_dst_lo, cur_dst_hi; logic cur_contig;
  logic pend = 0; int wait_cnt = 0; acc_req_t a_q;
  assign acc_ready = !pend;
  always @(posedge clk) begin
    resp_valid <= 1'b0;
    if (acc_valid && acc_ready) begin
      logic vls_a, exp_na, exp_nr;
      logic [63:0] lb;
      pend <= 1; a_q <= acc; wait_cnt <= $urandom_range(0, 3);
      n_acc <= n_acc + 1;
      vls_a = is_vls_va(acc.va);
      lb = {acc.va[63:5], 5'b0};
      if (acc.we) begin
        exp_nr = vls_a && cur_contig && lb >= cur_dst_lo && lb + 32 <= cur_dst_hi;
        exp_na = !vls_a && is_vls_va(cur_src_lo);
      end else begin
        exp_nr = 0;
        exp_na = !vls_a && is_vls_va(cur_dst_lo) && !(acc.va >= 64'h0000_0000_9000_0000 && acc.va < 64'h0000_0000_9001_0000);
      end
      if (acc.no_refill !== exp_nr || acc.no_alloc !== exp_na) bad_hint <= bad_hint + 1;
      n_skip_hint <= n_skip_hint + int'(acc.no_refill);
      n_na_hint <= n_na_hint + int'(acc.no_alloc);
    end else if (pend) begin
      if (wait_cnt == 0) begin
        pend <= 0; resp_valid <= 1'b1;
        resp_fault <= a_q.va == fault_va;
        resp_rdata <= rdw(a_q.va);
        if (a_q.we) mem[a_q.va[63:2]] = a_q.wdata;
      end else wait_cnt <= wait_cnt - 1;
    end
  end

  localparam logic [63:0] VB = {VLS_SEG_TAG, 32'h0};
  localparam logic [63:0] RB = 64'h0000_0000_8000_0000;
  localparam logic [63:0] IB = 64'h0000_0000_9000_0000;   // index lists (regular memory)

  task automatic run(input dma_mode_e m, input logic [63:0] s, input logic [63:0] d, input logic [63:0] ix,
                     input int n, input int ss, input int ds, input string name);
    logic [31:0] expv [int]; logic [63:0] da [int]; int a0, bh0;
    // reference
    for (int i = 0; i < n; i++) begin
      logic [63:0] sa; logic [31:0] k;
      unique case (m)
        DMA_UNIT:   begin sa = s + 64'(4*i); da[i] = d + 64'(4*i); end
        DMA_STRIDE: begin sa = s + 64'(ss*i); da[i] = d + 64'(ds*i); end
        DMA_GATHER: begin k = rdw(ix + 64'(4*i)); sa = s + {30'd0, k, 2'b0}; da[i] = d + 64'(4*i); end
        default:    begin k = rdw(ix + 64'(4*i)); sa = s + 64'(4*i); da[i] = d + {30'd0, k, 2'b0}; end
      endcase
      expv[i] = rdw(sa);
    end
    cur_src_lo = s; cur_dst_lo = d; cur_dst_hi = d + 64'(4*n);
    cur_contig = (m == DMA_UNIT) || (m == DMA_GATHER) || (m == DMA_STRIDE && ds == 4);
    a0 = n_acc; bh0 = bad_hint;
    @(negedge clk);
    cmd_valid = 1; cmd.mode = m; cmd.src = s; cmd.dst = d; cmd.idx = ix; cmd.count = 16'(n);
    cmd.src_stride = 32'(ss); cmd.dst_stride = 32'(ds);
    #1; check(cmd_ready, "idle engine takes a command");
    @(negedge clk); cmd_valid = 0;
    if (n > 0) check(busy, "busy during transfer");
    while (busy) @(negedge clk);
    for (int i = 0; i < n; i++)
      check(rdw(da[i]) == expv[i], $sformatf("%s element %0d", name, i));
    check(n_acc - a0 == n * ((m == DMA_GATHER || m == DMA_SCATTER) ? 3 : 2),
          $sformatf("%s access count %0d", name, n_acc - a0));
    check(bad_hint == bh0, $sformatf("%s allocation hints", name));
    check(!error, "no error");
  endtask

  initial begin
    int s0;
    cmd_valid = 0; cmd = '0; resp_fault = 0; resp_rdata = 0;
    #22 rst_n = 1;
    s0 = n_skip_hint;
    run(DMA_UNIT,   RB + 64'h100, VB + 64'h44, 0, 64, 4, 4, "mem-to-VLS");
    check(n_skip_hint - s0 == 56, $sformatf("no_refill on the 7 whole lines: %0d", n_skip_hint - s0));
    run(DMA_UNIT,   VB + 64'h44, RB + 64'h4000, 0, 40, 4, 4, "VLS-to-mem");
    run(DMA_UNIT,   RB + 64'h200, RB + 64'h6000, 0, 16, 4, 4, "mem-to-mem");
    run(DMA_STRIDE, RB + 64'h1000, VB + 64'h800, 0, 20, 128, 4, "stride src");
    run(DMA_STRIDE, VB + 64'h800, VB + 64'h1000, 0, 20, 4, 12, "stride dst");
    run(DMA_STRIDE, RB + 64'h2000, VB + 64'h1800, 0, 8, -8, 4, "negative stride");
    for (int i = 0; i < 24; i++) mem[(IB + 64'(4*i)) >> 2] = 32'((i * 7) % 24);
    run(DMA_GATHER,  RB + 64'h3000, VB + 64'h2000, IB, 24, 0, 0, "gather");
    run(DMA_SCATTER, VB + 64'h2000, VB + 64'h3000, IB, 24, 0, 0, "scatter");
    run(DMA_UNIT,   RB, VB, 0, 0, 4, 4, "empty");
    // a faulting access ends the transfer
    fault_va = VB + 64'h5000 + 64'd12;
    cur_src_lo = RB; cur_dst_lo = VB + 64'h5000; cur_dst_hi = VB + 64'h5000 + 64'd64; cur_contig = 1;
    @(negedge clk);
    cmd_valid = 1; cmd.mode = DMA_UNIT; cmd.src = RB; cmd.dst = VB + 64'h5000; cmd.count = 16;
    @(negedge clk); cmd_valid = 0;
    while (busy) @(negedge clk);
    check(error, "fault sets error");
    check(rdw(VB + 64'h5000 + 64'd16) != rdw(RB + 64'd16), "transfer stopped at the fault");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
