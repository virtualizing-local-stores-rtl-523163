// vls_mem_model: behavioural model of the next memory level (shared L2 and
// DRAM) for the testbenches. Not synthesizable logic of the design.
//
// Line-addressed, 32-byte lines. A line never written reads as
// init_word() of each word's byte address, a formula the testbenches also use
// to work out expected values. Writes are posted and byte-masked; a read
// answers LAT cycles after it is accepted, one read at a time. Counts reads
// and writes for the testbenches.
module vls_mem_model
  import vls_pkg::*;
#(
  parameter int LAT = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  mem_req_t          req,
  output logic              resp_valid,
  output logic [LINE_W-1:0] resp_data
);

  logic [LINE_W-1:0] lines [logic [LINE_ADDR_W-1:0]];
  int                busy_cnt;
  logic [LINE_ADDR_W-1:0] rd_line;
  int                n_reads, n_writes;

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

  // read a word as memory holds it now (for checks of write-backs)
  function automatic logic [WORD_W-1:0] peek(input logic [PA_W-1:0] pa);
    logic [LINE_W-1:0] v;
    v = get_line(pa[PA_W-1:OFF_BITS]);
    return v[pa[OFF_BITS-1:2]*WORD_W +: WORD_W];
  endfunction

  assign req_ready = busy_cnt == 0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_cnt   <= 0;
      resp_valid <= 1'b0;
      resp_data  <= '0;
      rd_line    <= '0;
      n_reads    <= 0;
      n_writes   <= 0;
    end else begin
      resp_valid <= 1'b0;
      if (busy_cnt > 1) busy_cnt <= busy_cnt - 1;
      else if (busy_cnt == 1) begin
        busy_cnt   <= 0;
        resp_valid <= 1'b1;
        resp_data  <= get_line(rd_line);
      end
      if (req_valid && req_ready) begin
        if (req.we) begin
          logic [LINE_W-1:0] v;
          v = get_line(req.line);
          for (int b = 0; b < LINE_BYTES; b++)
            if (req.be[b]) v[b*8 +: 8] = req.wdata[b*8 +: 8];
          lines[req.line] = v;
          n_writes <= n_writes + 1;
        end else begin
          rd_line  <= req.line;
          busy_cnt <= LAT;
          n_reads  <= n_reads + 1;
        end
      end
    end
  end

endmodule
