// vls_shared_mem: behavioural shared next memory level for the multi-core
// testbench: one memory image behind N independent line-wide ports. Not
// synthesizable logic of the design.
//
// Each port behaves like vls_mem_model: a line never written reads as
// init_word() of each word's byte address; writes are posted and
// byte-masked; a read answers LAT cycles after acceptance, one read at a
// time per port. All ports see one image, so data written back by one core
// can be read by another (there are no other caches in between).
module vls_shared_mem
  import vls_pkg::*;
#(
  parameter int N   = 16,
  parameter int LAT = 4
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic     [N-1:0]             req_valid,
  output logic     [N-1:0]             req_ready,
  input  mem_req_t [N-1:0]             req,
  output logic     [N-1:0]             resp_valid,
  output logic     [N-1:0][LINE_W-1:0] resp_data
);

  logic [LINE_W-1:0]      lines [logic [LINE_ADDR_W-1:0]];
  int                     busy_cnt [N];
  logic [LINE_ADDR_W-1:0] rd_line  [N];
  int                     n_reads, n_writes;

  function automatic logic [WORD_W-1:0] init_word(input logic [PA_W-1:0] pa);
    return pa[31:0] ^ 32'h5A00_0000 ^ {pa[39:32], 24'h0};
  endfunction

  function automatic logic [LINE_W-1:0] get_line(input logic [LINE_ADDR_W-1:0] l);
    logic [LINE_W-1:0] v;
    if (lines.exists(l)) return lines[l];
    for (int w = 0; w < WORDS_PER_LINE; w++)
      v[w*WORD_W +: WORD_W] = init_word({l, OFF_BITS'(w*4)});
    return v;
  endfunction

  function automatic logic [WORD_W-1:0] peek(input logic [PA_W-1:0] pa);
    logic [LINE_W-1:0] v;
    v = get_line(pa[PA_W-1:OFF_BITS]);
    return v[pa[OFF_BITS-1:2]*WORD_W +: WORD_W];
  endfunction

  always_comb
    for (int p = 0; p < N; p++) req_ready[p] = busy_cnt[p] == 0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < N; p++) begin
        busy_cnt[p] <= 0;
        rd_line[p]  <= '0;
      end
      resp_valid <= '0;
      resp_data  <= '0;
      n_reads    <= 0;
      n_writes   <= 0;
    end else begin
      int nr, nw;
      nr = 0; nw = 0;
      for (int p = 0; p < N; p++) begin
        resp_valid[p] <= 1'b0;
        if (busy_cnt[p] > 1) busy_cnt[p] <= busy_cnt[p] - 1;
        else if (busy_cnt[p] == 1) begin
          busy_cnt[p]   <= 0;
          resp_valid[p] <= 1'b1;
          resp_data[p]  <= get_line(rd_line[p]);
        end
        if (req_valid[p] && req_ready[p]) begin
          if (req[p].we) begin
            logic [LINE_W-1:0] v;
            v = get_line(req[p].line);
            for (int b = 0; b < LINE_BYTES; b++)
              if (req[p].be[b]) v[b*8 +: 8] = req[p].wdata[b*8 +: 8];
            lines[req[p].line] = v;
            nw++;
          end else begin
            rd_line[p]  <= req[p].line;
            busy_cnt[p] <= LAT;
            nr++;
          end
        end
      end
      n_reads  <= n_reads + nr;
      n_writes <= n_writes + nw;
    end
  end

endmodule
