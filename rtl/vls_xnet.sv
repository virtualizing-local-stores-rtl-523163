// vls_xnet: the cross-VLS network, a crossbar carrying remote-VLS accesses
// from any core's cache controller to any other core's and the responses
// back, separate from the memory-system network.
//
// Each source core has at most one remote access outstanding and names its
// target core. Each target port serves one access at a time: when it is
// free, a round-robin choice among the sources that request it is forwarded
// (combinationally, zero cycles), the source is remembered, and the target's
// response is returned to that source. A source sees ready only when its
// access is passed to the target. A separate request network with direct
// core-to-core transfers follows the design description; the crossbar, the
// round robin and the zero-cycle forwarding are this design's choices.
module vls_xnet
  import vls_pkg::*;
#(
  parameter int N = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // from each core (its outgoing remote accesses)
  input  logic      [N-1:0]            src_valid,
  output logic      [N-1:0]            src_ready,
  input  logic      [N-1:0][$clog2(N)-1:0] src_dst,
  input  acc_req_t  [N-1:0]            src_req,
  output logic      [N-1:0]            src_resp_valid,
  output cpu_resp_t [N-1:0]            src_resp,
  // to each core (incoming remote accesses)
  output logic      [N-1:0]            dst_valid,
  input  logic      [N-1:0]            dst_ready,
  output acc_req_t  [N-1:0]            dst_req,
  input  logic      [N-1:0]            dst_resp_valid,
  input  cpu_resp_t [N-1:0]            dst_resp
);

  localparam int IW = $clog2(N);

  logic [N-1:0]         busy_q;
  logic [N-1:0][IW-1:0] owner_q;
  logic [N-1:0][IW-1:0] rr_q;
  logic [N-1:0][IW-1:0] pick;
  logic [N-1:0]         pick_ok;

  // round-robin choice of a source for every target
  always_comb begin
    logic [31:0] s;
    s = '0;
    for (int t = 0; t < N; t++) begin
      pick[t]    = '0;
      pick_ok[t] = 1'b0;
      for (int o = 0; o < N; o++) begin
        s = 32'((int'(rr_q[t]) + o) % N);
        if (!pick_ok[t] && src_valid[s[IW-1:0]] && int'(src_dst[s[IW-1:0]]) == t) begin
          pick_ok[t] = 1'b1;
          pick[t]    = s[IW-1:0];
        end
      end
    end
  end

  // valid and request towards the targets do not depend on their ready
  always_comb begin
    for (int t = 0; t < N; t++) begin
      dst_valid[t] = !busy_q[t] && pick_ok[t];
      dst_req[t]   = src_req[pick[t]];
    end
  end

  always_comb begin
    src_ready = '0;
    for (int t = 0; t < N; t++)
      if (dst_valid[t] && dst_ready[t]) src_ready[pick[t]] = 1'b1;
  end

  always_comb begin
    src_resp_valid = '0;
    src_resp       = '0;
    for (int t = 0; t < N; t++) begin
      if (busy_q[t] && dst_resp_valid[t]) begin
        src_resp_valid[owner_q[t]] = 1'b1;
        src_resp[owner_q[t]]       = dst_resp[t];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= '0;
      owner_q <= '0;
      rr_q    <= '0;
    end else begin
      for (int t = 0; t < N; t++) begin
        if (dst_valid[t] && dst_ready[t]) begin
          busy_q[t]  <= 1'b1;
          owner_q[t] <= pick[t];
          rr_q[t]    <= IW'((int'(pick[t]) + 1) % N);
        end else if (busy_q[t] && dst_resp_valid[t]) begin
          busy_q[t] <= 1'b0;
        end
      end
    end
  end

endmodule
