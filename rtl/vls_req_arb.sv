// vls_req_arb: shares the single data-buffer access path between the
// processor and the DMA engine.
//
// Both requesters present virtual-address accesses with valid/ready. When
// both want the path the grant alternates (round robin); one access is in
// flight at a time and its response is returned to the requester that issued
// it. A processor fence (OP_FENCE) is answered by the arbiter itself, one
// cycle after it is accepted, and is only accepted while the DMA engine is
// idle, so a fence waits for all earlier DMA transfers to finish. Fence
// semantics follow the design description; round robin, one access in
// flight and the handshake are this design's choices.
module vls_req_arb
  import vls_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // processor
  input  logic              cpu_req_valid,
  output logic              cpu_req_ready,
  input  cpu_req_t          cpu_req,
  output logic              cpu_resp_valid,
  output cpu_resp_t         cpu_resp,
  // DMA engine
  input  logic              dma_req_valid,
  output logic              dma_req_ready,
  input  acc_req_t          dma_req,
  output logic              dma_resp_valid,
  output logic [WORD_W-1:0] dma_resp_rdata,
  output logic              dma_resp_fault,
  input  logic              dma_idle,
  // shared access path
  output logic              out_valid,
  input  logic              out_ready,
  output acc_req_t          out_req,
  input  logic              in_resp_valid,
  input  logic [WORD_W-1:0] in_resp_rdata,
  input  logic              in_resp_fault
);

  typedef enum logic [1:0] {A_FREE, A_BUSY, A_FENCE} astate_e;

  astate_e st_q;
  logic    owner_dma_q;   // owner of the access in flight
  logic    prio_dma_q;    // DMA wins the next tie

  logic cpu_fence, cpu_wants, grant_dma, grant_cpu;
  acc_req_t cpu_acc;

  assign cpu_fence = cpu_req.op == OP_FENCE;
  assign cpu_wants = cpu_req_valid && (!cpu_fence || dma_idle);
  assign grant_dma = (st_q == A_FREE) && dma_req_valid && (!cpu_wants || prio_dma_q);
  assign grant_cpu = (st_q == A_FREE) && cpu_wants && !grant_dma;

  always_comb begin
    cpu_acc           = '0;
    cpu_acc.we        = cpu_req.op == OP_STORE;
    cpu_acc.va        = cpu_req.va;
    cpu_acc.wdata     = cpu_req.wdata;
    cpu_acc.be        = cpu_req.be;
  end

  always_comb begin
    out_valid     = 1'b0;
    out_req       = cpu_acc;
    cpu_req_ready = 1'b0;
    dma_req_ready = 1'b0;
    if (grant_dma) begin
      out_valid     = 1'b1;
      out_req       = dma_req;
      dma_req_ready = out_ready;
    end else if (grant_cpu) begin
      if (cpu_fence) begin
        cpu_req_ready = 1'b1;
      end else begin
        out_valid     = 1'b1;
        cpu_req_ready = out_ready;
      end
    end
  end

  assign cpu_resp_valid = (st_q == A_FENCE) || (st_q == A_BUSY && !owner_dma_q && in_resp_valid);
  assign cpu_resp.rdata = (st_q == A_FENCE) ? '0 : in_resp_rdata;
  assign cpu_resp.fault = (st_q == A_FENCE) ? 1'b0 : in_resp_fault;
  assign dma_resp_valid = st_q == A_BUSY && owner_dma_q && in_resp_valid;
  assign dma_resp_rdata = in_resp_rdata;
  assign dma_resp_fault = in_resp_fault;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q        <= A_FREE;
      owner_dma_q <= 1'b0;
      prio_dma_q  <= 1'b0;
    end else begin
      unique case (st_q)
        A_FREE: begin
          if (grant_dma && out_ready) begin
            st_q <= A_BUSY; owner_dma_q <= 1'b1; prio_dma_q <= 1'b0;
          end else if (grant_cpu && cpu_fence) begin
            st_q <= A_FENCE; prio_dma_q <= 1'b1;
          end else if (grant_cpu && out_ready) begin
            st_q <= A_BUSY; owner_dma_q <= 1'b0; prio_dma_q <= 1'b1;
          end
        end
        A_BUSY:  if (in_resp_valid) st_q <= A_FREE;
        A_FENCE: st_q <= A_FREE;
        default: st_q <= A_FREE;
      endcase
    end
  end

  // a response only arrives for an access in flight
  a_resp_owner: assert property (@(posedge clk) disable iff (!rst_n)
    in_resp_valid |-> st_q == A_BUSY);

endmodule
