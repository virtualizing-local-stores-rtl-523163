// tb_vls_xnet: random traffic through the cross-VLS crossbar with four
// cores.
//
// Each source issues a stream of remote accesses to random target cores,
// one outstanding at a time, holding valid until ready. Each target is a
// behavioural data buffer that takes one access at a time, is sometimes not
// ready, and answers after a random delay with the request's tag and its
// own number. Checks that every access reaches the target it named, that
// every response returns to the source that sent it with the right data,
// that no target ever has two accesses open, and that all accesses finish.
module tb_vls_xnet;
  import vls_pkg::*;
  localparam int N = 4, PER_SRC = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic      [N-1:0]        src_valid, src_ready, src_resp_valid;
  logic      [N-1:0][1:0]   src_dst;
  acc_req_t  [N-1:0]        src_req;
  cpu_resp_t [N-1:0]        src_resp;
  logic      [N-1:0]        dst_valid, dst_ready, dst_resp_valid;
  acc_req_t  [N-1:0]        dst_req;
  cpu_resp_t [N-1:0]        dst_resp;
  vls_xnet #(.N(N)) dut (.*);
  int checks = 0, failures = 0;
  int done_cnt [N];
  task automatic check(input logic c, input string w);
    checks++; if (!c) begin failures++; $display("FAIL: %s", w); end
  endtask
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // targets: one access at a time, random delay
  int        t_wait [N];
  logic      t_open [N];
  logic [31:0] t_tag [N];
  always @(posedge clk) begin
    for (int t = 0; t < N; t++) begin
      dst_resp_valid[t] <= 1'b0;
      if (t_open[t]) begin
        if (t_wait[t] == 0) begin
          dst_resp_valid[t]  <= 1'b1;
          dst_resp[t].rdata  <= t_tag[t] ^ (32'(t) << 28);
          dst_resp[t].fault  <= 1'b0;
          t_open[t]          <= 1'b0;
        end else t_wait[t] <= t_wait[t] - 1;
      end else if (dst_valid[t] && dst_ready[t]) begin
        t_open[t] <= 1'b1;
        t_tag[t]  <= dst_req[t].wdata;
        t_wait[t] <= $urandom_range(0, 4);
        checks++;
        if (dst_req[t].wdata[25:24] != 2'(t)) begin
          failures++; $display("FAIL: target %0d got access for %0d", t, dst_req[t].wdata[25:24]);
        end
      end
      dst_ready[t] <= !t_open[t] && $urandom_range(0, 3) != 0;
    end
  end

  // sources
  for (genvar s = 0; s < N; s++) begin : g_src
    initial begin
      src_valid[s] = 0; src_dst[s] = 0; src_req[s] = '0; done_cnt[s] = 0;
      wait (rst_n);
      for (int i = 0; i < PER_SRC; i++) begin
        logic [1:0] d; logic [31:0] tag;
        @(negedge clk);
        d = 2'($urandom);
        tag = {4'(s), 2'b0, d, 24'(i)};
        src_valid[s] = 1; src_dst[s] = d; src_req[s].wdata = tag;
        src_req[s].va = {RVLS_SEG_TAG, 8'(d), 32'(i)};
        #1;
        while (!src_ready[s]) begin @(negedge clk); #1; end
        @(negedge clk); src_valid[s] = 0;
        #1;
        while (!src_resp_valid[s]) begin @(negedge clk); #1; end
        check(src_resp[s].rdata == (tag ^ (32'(d) << 28)),
              $sformatf("source %0d access %0d response %h", s, i, src_resp[s].rdata));
        done_cnt[s]++;
      end
    end
  end

  always @(posedge clk)
    for (int t = 0; t < N; t++)
      if (t_open[t] && dst_valid[t] && dst_ready[t]) begin
        failures++; $display("FAIL: target %0d offered a second access", t);
      end

  initial begin
    for (int t = 0; t < N; t++) begin t_open[t] = 0; t_wait[t] = 0; dst_ready[t] = 0; end
    dst_resp_valid = '0; dst_resp = '0;
    #12 rst_n = 1;
    wait (done_cnt[0] == PER_SRC && done_cnt[1] == PER_SRC &&
          done_cnt[2] == PER_SRC && done_cnt[3] == PER_SRC);
    repeat (5) @(posedge clk);
    check(1'b1, "all accesses finished");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
