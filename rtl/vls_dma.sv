// vls_dma: user-level DMA engine integrated with the cache controller.
//
// It moves count 32-bit words between arbitrary virtual addresses, in
// parallel with the processor, through the same data-buffer access path as
// processor loads and stores (it shares the refill datapath of the cache).
// Modes: unit stride (memcpy), constant stride (byte strides on both sides),
// gather (source word index list at idx) and scatter (destination index
// list). Each element is one read then one write; gather/scatter first read
// the element's index.
// Allocation hints sent with every access:
//   no_alloc  - a non-VLS source read of a memory-to-VLS copy, or a non-VLS
//               destination write of a VLS-to-memory copy: only the VLS copy
//               occupies the data buffer.
//   no_refill - a write into a VLS line that this transfer overwrites
//               entirely (unit-stride destination): a miss installs the line
//               without fetching it.
// Interface: a command is taken on cmd_valid && cmd_ready (only when idle);
// busy stays high until the last write has been answered, and the processor
// fences on it. A faulting access ends the transfer and sets error until the
// next command. The modes, the hints and the fence follow the design
// description; word granularity, one access in flight, the index-list format
// (32-bit word indices) and the fault handling are this design's choices.
module vls_dma
  import vls_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  dma_cmd_t          cmd,
  output logic              busy,
  output logic              error,
  output logic              done,        // one-cycle pulse at the end of a transfer
  output logic              acc_valid,
  input  logic              acc_ready,
  output acc_req_t          acc,
  input  logic              resp_valid,
  input  logic [WORD_W-1:0] resp_rdata,
  input  logic              resp_fault
);

  typedef enum logic [2:0] {D_IDLE, D_IDX, D_IDX_W, D_RD, D_RD_W, D_WR, D_WR_W} dstate_e;

  dstate_e           st_q;
  dma_cmd_t          c_q;
  logic [15:0]       i_q;
  logic [VA_W-1:0]   src_p, dst_p;
  logic [WORD_W-1:0] idx_q, data_q;

  logic [VA_W-1:0] src_e, dst_e, idx_e, inc_s, inc_d, lb, dst_end;
  logic            src_vls, dst_vls, contiguous_dst, covered;

  assign inc_s   = (c_q.mode == DMA_STRIDE) ? {{32{c_q.src_stride[31]}}, c_q.src_stride} : 64'd4;
  assign inc_d   = (c_q.mode == DMA_STRIDE) ? {{32{c_q.dst_stride[31]}}, c_q.dst_stride} : 64'd4;
  assign src_e   = (c_q.mode == DMA_GATHER)  ? c_q.src + {30'd0, idx_q, 2'b00} : src_p;
  assign dst_e   = (c_q.mode == DMA_SCATTER) ? c_q.dst + {30'd0, idx_q, 2'b00} : dst_p;
  assign idx_e   = c_q.idx + {46'd0, i_q, 2'b00};
  assign src_vls = is_vls_va(src_e);
  assign dst_vls = is_vls_va(dst_e);

  assign contiguous_dst = (c_q.mode == DMA_UNIT) || (c_q.mode == DMA_GATHER) ||
                          (c_q.mode == DMA_STRIDE && c_q.dst_stride == 32'd4);
  assign lb      = {dst_e[VA_W-1:OFF_BITS], {OFF_BITS{1'b0}}};
  assign dst_end = c_q.dst + {46'd0, c_q.count, 2'b00};
  assign covered = contiguous_dst && (lb >= c_q.dst) && (lb + 64'(LINE_BYTES) <= dst_end);

  assign cmd_ready = (st_q == D_IDLE);
  assign busy      = (st_q != D_IDLE);

  always_comb begin
    acc_valid = 1'b0;
    acc       = '0;
    acc.be    = 4'hF;
    unique case (st_q)
      D_IDX: begin
        acc_valid = 1'b1;
        acc.va    = idx_e;
      end
      D_RD: begin
        acc_valid    = 1'b1;
        acc.va       = src_e;
        acc.no_alloc = !src_vls && dst_vls;
      end
      D_WR: begin
        acc_valid     = 1'b1;
        acc.we        = 1'b1;
        acc.va        = dst_e;
        acc.wdata     = data_q;
        acc.no_alloc  = !dst_vls && src_vls;
        acc.no_refill = dst_vls && covered;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= D_IDLE;
      c_q    <= '0;
      i_q    <= '0;
      src_p  <= '0;
      dst_p  <= '0;
      idx_q  <= '0;
      data_q <= '0;
      error  <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (st_q)
        D_IDLE: if (cmd_valid) begin
          c_q   <= cmd;
          i_q   <= '0;
          src_p <= cmd.src;
          dst_p <= cmd.dst;
          error <= 1'b0;
          if (cmd.count == 16'd0) done <= 1'b1;
          else st_q <= (cmd.mode == DMA_GATHER || cmd.mode == DMA_SCATTER) ? D_IDX : D_RD;
        end
        D_IDX:   if (acc_ready) st_q <= D_IDX_W;
        D_IDX_W: if (resp_valid) begin
          idx_q <= resp_rdata;
          if (resp_fault) begin error <= 1'b1; done <= 1'b1; st_q <= D_IDLE; end
          else st_q <= D_RD;
        end
        D_RD:    if (acc_ready) st_q <= D_RD_W;
        D_RD_W:  if (resp_valid) begin
          data_q <= resp_rdata;
          if (resp_fault) begin error <= 1'b1; done <= 1'b1; st_q <= D_IDLE; end
          else st_q <= D_WR;
        end
        D_WR:    if (acc_ready) st_q <= D_WR_W;
        D_WR_W:  if (resp_valid) begin
          if (resp_fault) begin
            error <= 1'b1; done <= 1'b1; st_q <= D_IDLE;
          end else begin
            src_p <= src_p + inc_s;
            dst_p <= dst_p + inc_d;
            i_q   <= i_q + 16'd1;
            if (i_q + 16'd1 == c_q.count) begin
              done <= 1'b1;
              st_q <= D_IDLE;
            end else begin
              st_q <= (c_q.mode == DMA_GATHER || c_q.mode == DMA_SCATTER) ? D_IDX : D_RD;
            end
          end
        end
        default: st_q <= D_IDLE;
      endcase
    end
  end

endmodule
