// tb_vls_cache_ctrl: the data buffer with 4 sets (so that conflicts are
// frequent) against the behavioural memory model.
// Phase 1: random loads and stores, cached and VLS, with random partition
// sizes; every load is compared with a reference memory image.
// Phase 2: a full 3-way VLS is written, then regular lines stream through
// every set; the VLS lines must all still hit.
// Phase 3: a no-refill line install and non-allocating reads and writes.
// Also checks the one-cycle hit latency.
module tb_vls_cache_ctrl;
  import vls_pkg::*;
  localparam int SETS = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [WAY_W-1:0] part_ways;
  logic req_valid, req_ready, resp_valid;
  dbuf_req_t req;
  logic [WORD_W-1:0] resp_rdata;
  logic mem_req_valid, mem_req_ready, mem_resp_valid;
  mem_req_t mem_req;
  logic [LINE_W-1:0] mem_resp_data;
  logic ev_hit, ev_miss, ev_writeback, ev_refill, ev_refill_skipped, ev_bypass;

  vls_cache_ctrl #(.SETS(SETS)) dut (.*);
  vls_mem_model #(.LAT(3)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req(mem_req),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data));

  int checks = 0, failures = 0;
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  int n_hit = 0, n_miss = 0, n_wb = 0, n_skip = 0, n_byp = 0;
  always @(posedge clk) begin
    n_hit <= n_hit + int'(ev_hit); n_miss <= n_miss + int'(ev_miss);
    n_wb <= n_wb + int'(ev_writeback); n_skip <= n_skip + int'(ev_refill_skipped);
    n_byp <= n_byp + int'(ev_bypass);
  end
  initial begin #10_000_000; failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  logic [WORD_W-1:0] shadow [logic [PA_W-1:2]];
  function automatic logic [WORD_W-1:0] ref_rd(input logic [PA_W-1:0] pa);
    if (shadow.exists(pa[PA_W-1:2])) return shadow[pa[PA_W-1:2]];
    return u_mem.init_word({pa[PA_W-1:2], 2'b00});
  endfunction

  int lat;
  task automatic access(input logic we, input logic [PA_W-1:0] pa, input logic [31:0] wd,
                        input logic vls, input logic na, input logic nr, output logic [31:0] rd);
    @(negedge clk);
    req_valid = 1; req = '0; req.we = we; req.pa = pa; req.wdata = wd; req.be = 4'hF;
    req.is_vls = vls; req.vls_way = pa[OFF_BITS + 2 +: WAY_W]; req.no_alloc = na; req.no_refill = nr;
    #1; while (!req_ready) begin @(negedge clk); #1; end
    @(negedge clk); req_valid = 0; lat = 1;
    while (!resp_valid) begin @(negedge clk); lat++; end
    rd = resp_rdata;
    @(posedge clk); #1;
    if (we) shadow[pa[PA_W-1:2]] = wd;
  endtask

  localparam logic [PA_W-1:0] REG_PA = 40'h00_1000_0000;
  localparam logic [PA_W-1:0] VLS_PA = 40'h00_2000_0000;   // aligned: offset way bits = PA way bits

  initial begin
    logic [31:0] rd; logic [PA_W-1:0] pa; int h0, m0;
    req_valid = 0; req = '0; part_ways = 0;
    #22 rst_n = 1;

    // phase 1
    for (int k = 0; k < 4000; k++) begin
      logic vls, we;
      if (k % 500 == 0) part_ways = WAY_W'($urandom_range(0, 3));
      vls = $urandom % 3 == 0;
      we  = $urandom % 2;
      if (vls) pa = VLS_PA + 40'($urandom_range(0, 3 * SETS * 8 - 1) * 4);
      else     pa = REG_PA + 40'($urandom_range(0, 64 * 8 - 1) * 4);
      access(we, pa, $urandom, vls, 0, 0, rd);
      if (!we) check(rd == ref_rd(pa), $sformatf("load %h got %h want %h", pa, rd, ref_rd(pa)));
    end
    check(n_wb > 0, "write-backs happened");

    // hit latency
    access(0, REG_PA, 0, 0, 0, 0, rd);
    access(0, REG_PA, 0, 0, 0, 0, rd);
    check(lat == 1, $sformatf("hit latency %0d", lat));

    // phase 2: partition protection
    part_ways = 3;
    for (int l = 0; l < 3 * SETS; l++) access(1, VLS_PA + 40'(32 * l), 32'h7700_0000 + 32'(l), 1, 0, 0, rd);
    for (int l = 0; l < 64; l++) access(0, REG_PA + 40'(32 * l), 0, 0, 0, 0, rd);
    h0 = n_hit; m0 = n_miss;
    for (int l = 0; l < 3 * SETS; l++) begin
      access(0, VLS_PA + 40'(32 * l), 0, 1, 0, 0, rd);
      check(rd == 32'h7700_0000 + 32'(l), "VLS data");
    end
    check(n_hit - h0 == 3 * SETS && n_miss == m0, $sformatf("VLS kept: %0d misses", n_miss - m0));
    // released partition: regular misses may now evict VLS lines
    part_ways = 0;
    for (int l = 0; l < 64; l++) access(0, REG_PA + 40'(32 * l), 0, 0, 0, 0, rd);
    m0 = n_miss;
    for (int l = 0; l < 3 * SETS; l++) begin
      access(0, VLS_PA + 40'(32 * l), 0, 1, 0, 0, rd);
      check(rd == 32'h7700_0000 + 32'(l), "VLS data restored on demand");
    end
    check(n_miss > m0, "released VLS lines were evicted and refilled");

    // phase 3: no-refill install and non-allocating accesses
    m0 = n_skip;
    for (int w = 0; w < 8; w++) access(1, VLS_PA + 40'h4000 + 40'(4 * w), 32'h5500 + 32'(w), 1, 0, 1, rd);
    check(n_skip == m0 + 1, "one line installed without refill");
    for (int w = 0; w < 8; w++) begin
      access(0, VLS_PA + 40'h4000 + 40'(4 * w), 0, 1, 0, 0, rd);
      check(rd == 32'h5500 + 32'(w), "no-refill line data");
    end
    m0 = n_byp;
    access(0, REG_PA + 40'h8000, 0, 0, 1, 0, rd);
    check(rd == ref_rd(REG_PA + 40'h8000), "bypass read data");
    access(1, REG_PA + 40'h8004, 32'h1234_5678, 0, 1, 0, rd);
    check(n_byp == m0 + 2, "two bypassed accesses");
    check(u_mem.peek(REG_PA + 40'h8004) == 32'h1234_5678, "bypass write reached memory");
    m0 = n_miss;
    access(0, REG_PA + 40'h8004, 0, 0, 0, 0, rd);
    check(n_miss == m0 + 1 && rd == 32'h1234_5678, "bypassed line was not allocated");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
