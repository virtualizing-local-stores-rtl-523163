// vls_cache_ctrl: the VLS-capable L1 data buffer and its controller.
//
// A physically tagged, write-back, write-allocate set-associative cache
// (WAYS ways of SETS sets of 32-byte lines) whose first part_ways ways form
// the VLS partition. Per way it holds a tag array and a data array
// (vls_sram); valid and dirty bits and the per-set LRU ages are flip-flops so
// they can be reset.
//
// Access flow (one access at a time):
//   IDLE    accept a translated request; read the enabled ways (all ways for
//           cached data, only the direct-mapped way for VLS data).
//   LOOKUP  compare tags of the enabled ways. A hit answers in this cycle
//           (one cycle after the request was accepted) and a store writes its
//           bytes into the line. On a miss the victim is chosen: the
//           direct-mapped way for a VLS access, whatever it holds; for cached
//           data the LRU way outside the VLS partition.
//   WB      a valid dirty victim is written back to memory.
//   REFILL  the missing line is read from memory ...
//   INSTALL ... and written into the victim way, merged with store data.
//           A DMA write flagged no_refill (the transfer overwrites the whole
//           line) skips REFILL and installs a zero line instead.
//   BYP_*   a DMA access flagged no_alloc that misses reads or writes memory
//           directly without allocating a line (memory-to-VLS source reads,
//           VLS-to-memory destination writes).
// Memory interface: line requests with valid/ready; writes are posted (no
// response), reads return one line on mem_resp_valid. The access sequence,
// partition rule and DMA allocation rules follow the design description; the
// state machine, the blocking (one miss at a time) organisation and the
// interface timing are this design's choices.
module vls_cache_ctrl
  import vls_pkg::*;
#(
  parameter int SETS = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [WAY_W-1:0]  part_ways,
  // request / response
  input  logic              req_valid,
  output logic              req_ready,
  input  dbuf_req_t         req,
  output logic              resp_valid,
  output logic [WORD_W-1:0] resp_rdata,
  // next memory level
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output mem_req_t          mem_req,
  input  logic              mem_resp_valid,
  input  logic [LINE_W-1:0] mem_resp_data,
  // events
  output logic              ev_hit,
  output logic              ev_miss,
  output logic              ev_writeback,
  output logic              ev_refill,
  output logic              ev_refill_skipped,
  output logic              ev_bypass
);

  localparam int IDX_BITS = $clog2(SETS);
  localparam int TAG_W    = PA_W - OFF_BITS - IDX_BITS;
  localparam int WSEL_W   = $clog2(WORDS_PER_LINE);

  typedef enum logic [3:0] {
    S_IDLE, S_LOOKUP, S_WB, S_REFILL_REQ, S_REFILL_WAIT, S_INSTALL,
    S_BYP_RD_REQ, S_BYP_RD_WAIT, S_BYP_WR
  } state_e;

  state_e state_q, state_d;

  dbuf_req_t               r_q;
  logic [WAYS-1:0]         way_en_q;
  logic [WAY_W-1:0]        victim_q;
  logic [TAG_W-1:0]        vtag_q;
  logic [LINE_W-1:0]       vdata_q;
  logic [LINE_W-1:0]       line_q;
  logic                    after_wb_refill_q;

  logic [WAYS-1:0] valid_q [SETS];
  logic [WAYS-1:0] dirty_q [SETS];
  logic [WAYS-1:0][WAY_W-1:0] age_q [SETS];

  // ---------------------------------------------------------------- arrays
  logic [WAYS-1:0]              tag_en, tag_we, dat_en, dat_we;
  logic [IDX_BITS-1:0]          arr_idx;
  logic [TAG_W-1:0]             tag_wdata;
  logic [LINE_W-1:0]            dat_wdata;
  logic [LINE_BYTES-1:0]        dat_be;
  logic [WAYS-1:0][TAG_W-1:0]   tag_rdata;
  logic [WAYS-1:0][LINE_W-1:0]  dat_rdata;
  logic [WAYS-1:0]              req_way_en;

  vls_way_enable u_way_en (
    .is_vls (req.is_vls),
    .vls_way(req.vls_way),
    .way_en (req_way_en)
  );

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    vls_sram #(.DEPTH(SETS), .WIDTH(TAG_W), .GRAN(TAG_W)) u_tag (
      .clk  (clk),
      .en   (tag_en[w]),
      .we   (tag_we[w]),
      .addr (arr_idx),
      .wdata(tag_wdata),
      .be   (1'b1),
      .rdata(tag_rdata[w])
    );
    vls_sram #(.DEPTH(SETS), .WIDTH(LINE_W), .GRAN(8)) u_data (
      .clk  (clk),
      .en   (dat_en[w]),
      .we   (dat_we[w]),
      .addr (arr_idx),
      .wdata(dat_wdata),
      .be   (dat_be),
      .rdata(dat_rdata[w])
    );
  end

  // ---------------------------------------------------------------- lookup
  logic [IDX_BITS-1:0]  r_idx;
  logic [TAG_W-1:0]     r_tag;
  logic [WSEL_W-1:0]    r_word;
  logic [WAYS-1:0]      hit_vec;
  logic                 hit;
  logic [WAY_W-1:0]     hit_way;
  logic [WAYS-1:0]      allowed;
  logic [WAY_W-1:0]     repl_victim;
  logic                 repl_ok;
  logic [WAY_W-1:0]     touch_way;
  logic [WAYS-1:0][WAY_W-1:0] age_next;
  logic [LINE_W-1:0]    st_line;
  logic [LINE_BYTES-1:0] st_be;

  assign r_idx  = r_q.pa[OFF_BITS +: IDX_BITS];
  assign r_tag  = r_q.pa[PA_W-1 -: TAG_W];
  assign r_word = r_q.pa[2 +: WSEL_W];

  always_comb begin
    hit_vec = '0;
    hit_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      hit_vec[w] = way_en_q[w] && valid_q[r_idx][w] && tag_rdata[w] == r_tag;
      if (hit_vec[w]) hit_way = WAY_W'(w);
    end
    hit = |hit_vec;
  end

  // regular misses may not evict the VLS ways [0, part_ways)
  always_comb begin
    for (int w = 0; w < WAYS; w++) allowed[w] = WAY_W'(w) >= part_ways;
  end

  vls_repl u_repl (
    .age      (age_q[r_idx]),
    .valid    (valid_q[r_idx]),
    .allowed  (allowed),
    .victim   (repl_victim),
    .victim_ok(repl_ok),
    .touch_way(touch_way),
    .age_next (age_next)
  );

  // store data and byte enables placed at the word's position in the line
  always_comb begin
    st_line = '0;
    st_be   = '0;
    st_line[r_word*WORD_W +: WORD_W] = r_q.wdata;
    st_be[r_word*4 +: 4]             = r_q.be;
  end

  function automatic logic [LINE_W-1:0] merge(input logic [LINE_W-1:0] base,
                                              input logic [LINE_W-1:0] data,
                                              input logic [LINE_BYTES-1:0] be);
    logic [LINE_W-1:0] m;
    for (int b = 0; b < LINE_BYTES; b++) m[b*8 +: 8] = be[b] ? data[b*8 +: 8] : base[b*8 +: 8];
    return m;
  endfunction

  logic [WAY_W-1:0] miss_victim;
  assign miss_victim = r_q.is_vls ? r_q.vls_way : repl_victim;

  // ---------------------------------------------------------------- control
  always_comb begin
    state_d       = state_q;
    req_ready     = 1'b0;
    resp_valid    = 1'b0;
    resp_rdata    = '0;
    mem_req_valid = 1'b0;
    mem_req       = '0;
    tag_en        = '0;
    tag_we        = '0;
    dat_en        = '0;
    dat_we        = '0;
    arr_idx       = r_idx;
    tag_wdata     = r_tag;
    dat_wdata     = st_line;
    dat_be        = st_be;
    touch_way     = hit_way;
    ev_hit = 1'b0; ev_miss = 1'b0; ev_writeback = 1'b0;
    ev_refill = 1'b0; ev_refill_skipped = 1'b0; ev_bypass = 1'b0;

    unique case (state_q)
      S_IDLE: begin
        req_ready = 1'b1;
        arr_idx   = req.pa[OFF_BITS +: IDX_BITS];
        if (req_valid) begin
          tag_en  = req_way_en;
          dat_en  = req_way_en;
          state_d = S_LOOKUP;
        end
      end
      S_LOOKUP: begin
        if (hit) begin
          ev_hit     = 1'b1;
          resp_valid = 1'b1;
          resp_rdata = dat_rdata[hit_way][r_word*WORD_W +: WORD_W];
          if (r_q.we) begin
            dat_en[hit_way] = 1'b1;
            dat_we[hit_way] = 1'b1;
          end
          state_d = S_IDLE;
        end else begin
          ev_miss = 1'b1;
          if (r_q.no_alloc || (!r_q.is_vls && !repl_ok)) begin
            state_d = r_q.we ? S_BYP_WR : S_BYP_RD_REQ;
          end else if (valid_q[r_idx][miss_victim] && dirty_q[r_idx][miss_victim]) begin
            state_d = S_WB;
          end else begin
            state_d = r_q.no_refill ? S_INSTALL : S_REFILL_REQ;
          end
        end
      end
      S_WB: begin
        mem_req_valid = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.line  = {vtag_q, r_idx};
        mem_req.wdata = vdata_q;
        mem_req.be    = '1;
        if (mem_req_ready) begin
          ev_writeback = 1'b1;
          state_d = r_q.no_refill ? S_INSTALL : S_REFILL_REQ;
        end
      end
      S_REFILL_REQ: begin
        mem_req_valid = 1'b1;
        mem_req.we    = 1'b0;
        mem_req.line  = r_q.pa[PA_W-1:OFF_BITS];
        if (mem_req_ready) state_d = S_REFILL_WAIT;
      end
      S_REFILL_WAIT: begin
        if (mem_resp_valid) begin
          ev_refill = 1'b1;
          state_d   = S_INSTALL;
        end
      end
      S_INSTALL: begin
        tag_en[victim_q] = 1'b1;
        tag_we[victim_q] = 1'b1;
        dat_en[victim_q] = 1'b1;
        dat_we[victim_q] = 1'b1;
        dat_wdata        = r_q.we ? merge(line_q, st_line, st_be) : line_q;
        dat_be           = '1;
        touch_way        = victim_q;
        resp_valid       = 1'b1;
        resp_rdata       = line_q[r_word*WORD_W +: WORD_W];
        ev_refill_skipped = r_q.no_refill && !after_wb_refill_q;
        state_d          = S_IDLE;
      end
      S_BYP_RD_REQ: begin
        mem_req_valid = 1'b1;
        mem_req.we    = 1'b0;
        mem_req.line  = r_q.pa[PA_W-1:OFF_BITS];
        if (mem_req_ready) state_d = S_BYP_RD_WAIT;
      end
      S_BYP_RD_WAIT: begin
        if (mem_resp_valid) begin
          ev_bypass  = 1'b1;
          resp_valid = 1'b1;
          resp_rdata = mem_resp_data[r_word*WORD_W +: WORD_W];
          state_d    = S_IDLE;
        end
      end
      S_BYP_WR: begin
        mem_req_valid = 1'b1;
        mem_req.we    = 1'b1;
        mem_req.line  = r_q.pa[PA_W-1:OFF_BITS];
        mem_req.wdata = st_line;
        mem_req.be    = st_be;
        if (mem_req_ready) begin
          ev_bypass  = 1'b1;
          resp_valid = 1'b1;
          state_d    = S_IDLE;
        end
      end
      default: state_d = S_IDLE;
    endcase
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q           <= S_IDLE;
      r_q               <= '0;
      way_en_q          <= '0;
      victim_q          <= '0;
      vtag_q            <= '0;
      vdata_q           <= '0;
      line_q            <= '0;
      after_wb_refill_q <= 1'b0;
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        dirty_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) age_q[s][w] <= WAY_W'(w);
      end
    end else begin
      state_q <= state_d;
      if (state_q == S_IDLE && req_valid) begin
        r_q      <= req;
        way_en_q <= req_way_en;
      end
      if (state_q == S_LOOKUP) begin
        after_wb_refill_q <= 1'b0;
        if (hit) begin
          age_q[r_idx] <= age_next;
          if (r_q.we) dirty_q[r_idx][hit_way] <= 1'b1;
        end else begin
          victim_q <= miss_victim;
          vtag_q   <= tag_rdata[miss_victim];
          vdata_q  <= dat_rdata[miss_victim];
          line_q   <= '0;
        end
      end
      if (state_q == S_REFILL_WAIT && mem_resp_valid) line_q <= mem_resp_data;
      if (state_q == S_INSTALL) begin
        valid_q[r_idx][victim_q] <= 1'b1;
        dirty_q[r_idx][victim_q] <= r_q.we;
        age_q[r_idx]             <= age_next;
      end
    end
  end

  // a VLS access only ever enables its direct-mapped way
  a_vls_direct: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == S_LOOKUP && r_q.is_vls) |-> $onehot(way_en_q));

endmodule
