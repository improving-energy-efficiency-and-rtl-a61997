// dvi_llc: phase-change-memory last-level cache with a delta value array.
//
// Organisation (defaults): 4 MB, 16-way set associative, 64-byte (512-bit)
// lines, 4096 sets, 32-bit words. Beside the tag array and the PCM data array
// sits the delta value array (DVA): one M-bit delta value indicator (DVI) per
// 32-bit word, with the same sets and ways as the data array. A write-back
// whose new word differs from the stored word by a small amount
// (-2^(M-1) .. 2^(M-1)-1) only writes the delta into the DVA; otherwise the data
// array is written and the delta cleared. Reads add the sign-extended delta to
// the stored word. Underneath, the cache applies the schemes DVI builds on:
//   * MDB  - only words marked dirty by the upper level are written;
//   * NWV  - a word whose upper half is zero is stored narrow (flag set, only
//            the lower half written, the upper half read as zero);
//   * RBW  - every array write first reads the row and toggles only the bits
//            that differ (pcm_line_array masks, rbw_compare counts).
//
// Upper-level interface: req_valid/req_ready handshake; req_op selects a line
// read or a write-back (req_wdata, req_wmask = one dirty bit per word).
// resp_valid pulses for one cycle when the request completes; resp_rdata holds
// the line for reads; resp_hit tells whether the first lookup hit. A hit
// completes exactly READ_LAT (read) or WRITE_LAT (write-back) clock edges after
// the accepting edge, the access latencies of the evaluated system. A miss
// first evicts a dirty victim to memory, fetches the line, fills it, and then
// repeats the lookup, which hits and takes the same latency again.
// Memory interface: mem_req_valid/mem_req_ready with mem_req_write, a line
// address and a whole line of write data; mem_resp_valid returns a line.
// After every array write stat_valid pulses with a dvi_wr_stat_t record.
//
// Control: after reset the controller clears the tag array one set per cycle
// (SETS cycles, req_ready low). Replacement takes the first invalid way, else a
// per-set round-robin pointer kept in the tag row. The replacement policy, the
// interfaces, the reset sweep, the line-wide memory port and the word-dirty
// mask arriving with the write-back are this design's choices; the cache
// geometry, latencies and the DVI write/read rule follow the scheme.
module dvi_llc
  import dvi_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned M         = 4,
  parameter int unsigned LINE_BITS = 512,
  parameter int unsigned WAYS      = 16,
  parameter int unsigned SETS      = 4096,
  parameter int unsigned ADDR_W    = 32,
  parameter int unsigned READ_LAT  = 27,
  parameter int unsigned WRITE_LAT = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // upper-level cache
  input  logic                   req_valid,
  output logic                   req_ready,
  input  llc_op_e                req_op,
  input  logic [ADDR_W-1:0]      req_addr,
  input  logic [LINE_BITS-1:0]   req_wdata,
  input  logic [LINE_BITS/N-1:0] req_wmask,
  output logic                   resp_valid,
  output logic                   resp_hit,
  output logic [LINE_BITS-1:0]   resp_rdata,
  // main memory
  output logic                   mem_req_valid,
  input  logic                   mem_req_ready,
  output logic                   mem_req_write,
  output logic [ADDR_W-1:0]      mem_req_addr,
  output logic [LINE_BITS-1:0]   mem_req_wdata,
  input  logic                   mem_resp_valid,
  input  logic [LINE_BITS-1:0]   mem_resp_rdata,
  // write statistics
  output logic                   stat_valid,
  output dvi_wr_stat_t           stat
);
  localparam int unsigned WORDS  = LINE_BITS / N;
  localparam int unsigned OFF_W  = $clog2(LINE_BITS / 8);
  localparam int unsigned IDX_W  = $clog2(SETS);
  localparam int unsigned WAY_W  = $clog2(WAYS);
  localparam int unsigned TAG_W  = ADDR_W - IDX_W - OFF_W;
  localparam int unsigned ENT_W  = TAG_W + 2;               // {valid, dirty, tag}
  localparam int unsigned ROW_W  = WAYS * ENT_W + WAY_W;    // + round-robin pointer
  localparam int unsigned LINES  = SETS * WAYS;
  localparam int unsigned LIDX_W = IDX_W + WAY_W;
  localparam int unsigned DVA_W  = WORDS * M;
  localparam int unsigned LAT_W  = 16;
  localparam int unsigned CNT_W  = $clog2(LINE_BITS + 1);

  initial begin
    assert (READ_LAT >= 5 && WRITE_LAT >= 5)
      else $error("dvi_llc: latencies below the 5-cycle pipeline depth");
    assert (WAYS >= 2 && SETS >= 2) else $error("dvi_llc: need WAYS >= 2 and SETS >= 2");
  end

  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_TAG_RD, S_TAG_CMP, S_LINE_OP,
    S_EVICT, S_FETCH, S_FILL_WAIT, S_FILL, S_WAIT
  } state_e;

  state_e                 state;
  llc_op_e                op_q;
  logic [ADDR_W-1:0]      addr_q;
  logic [LINE_BITS-1:0]   wdata_q;
  logic [WORDS-1:0]       wmask_q;
  logic [LINE_BITS-1:0]   fill_q;
  logic [LINE_BITS-1:0]   evict_q;
  logic [ADDR_W-1:0]      evict_addr_q;
  logic [ROW_W-1:0]       row_q;
  logic [WAY_W-1:0]       way_q;
  logic                   hit_q;
  logic                   missed_q;
  logic [LAT_W-1:0]       lat_cnt;
  logic [IDX_W-1:0]       init_idx;
  logic [LINE_BITS-1:0]   rdata_q;

  // addr_q[OFF_W-1:0] (byte offset in the line) is not needed: requests are whole lines.
  logic [IDX_W-1:0] set_idx;
  logic [TAG_W-1:0] tag_in;
  always_comb begin
    set_idx = addr_q[OFF_W +: IDX_W];
    tag_in  = addr_q[OFF_W + IDX_W +: TAG_W];
  end

  // ---------------------------------------------------------------- arrays
  logic                   tag_rd_en, tag_wr_en;
  logic [IDX_W-1:0]       tag_rd_addr, tag_wr_addr;
  logic [ROW_W-1:0]       tag_rd_data, tag_wr_data;

  logic                   line_rd_en, line_wr_en;
  logic [LIDX_W-1:0]      line_rd_addr, line_wr_addr;
  logic [LINE_BITS-1:0]   data_rd, data_wr, data_mask;
  logic [WORDS-1:0]       nar_rd, nar_wr, nar_mask;
  logic [DVA_W-1:0]       dva_rd, dva_wr, dva_mask;
  logic                   d_any, v_any;            // RBW: some bit changes

  pcm_line_array #(.DEPTH(SETS), .WIDTH(ROW_W)) u_tag_array (
    .clk, .rd_en(tag_rd_en), .rd_addr(tag_rd_addr), .rd_data(tag_rd_data),
    .wr_en(tag_wr_en), .wr_addr(tag_wr_addr), .wr_data(tag_wr_data), .wr_mask({ROW_W{1'b1}})
  );

  pcm_line_array #(.DEPTH(LINES), .WIDTH(LINE_BITS)) u_data_array (
    .clk, .rd_en(line_rd_en), .rd_addr(line_rd_addr), .rd_data(data_rd),
    .wr_en(line_wr_en & d_any), .wr_addr(line_wr_addr), .wr_data(data_wr), .wr_mask(data_mask)
  );

  pcm_line_array #(.DEPTH(LINES), .WIDTH(WORDS)) u_narrow_array (
    .clk, .rd_en(line_rd_en), .rd_addr(line_rd_addr), .rd_data(nar_rd),
    .wr_en(line_wr_en & (|nar_mask)), .wr_addr(line_wr_addr), .wr_data(nar_wr), .wr_mask(nar_mask)
  );

  pcm_line_array #(.DEPTH(LINES), .WIDTH(DVA_W)) u_dv_array (
    .clk, .rd_en(line_rd_en), .rd_addr(line_rd_addr), .rd_data(dva_rd),
    .wr_en(line_wr_en & v_any), .wr_addr(line_wr_addr), .wr_data(dva_wr), .wr_mask(dva_mask)
  );

  // ------------------------------------------------------ tag row decoding
  logic [WAYS-1:0]  way_valid, way_match;
  logic [TAG_W-1:0] way_tag [WAYS];
  logic [WAY_W-1:0] rr_ptr;
  logic             lookup_hit, any_invalid;
  logic [WAY_W-1:0] hit_way, inv_way, pick_way;

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      way_valid[w] = tag_rd_data[w*ENT_W + TAG_W + 1];
      way_tag[w]   = tag_rd_data[w*ENT_W +: TAG_W];
      way_match[w] = way_valid[w] && (way_tag[w] == tag_in);
    end
    rr_ptr      = tag_rd_data[WAYS*ENT_W +: WAY_W];
    lookup_hit  = |way_match;
    any_invalid = ~&way_valid;
    hit_way     = '0;
    inv_way     = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (way_match[w])  hit_way = WAY_W'(w);
      if (!way_valid[w]) inv_way = WAY_W'(w);
    end
    pick_way = lookup_hit ? hit_way : (any_invalid ? inv_way : rr_ptr);
  end

  // ------------------------------------------------------ word datapaths
  logic                 is_fill;
  logic [LINE_BITS-1:0] new_line;
  logic [LINE_BITS-1:0] cur_line;       // current values of the line read
  logic [WORDS-1:0]     w_we_lo, w_we_hi, w_nar_we, w_nar_new, w_dva_we, w_small;
  logic [DVA_W-1:0]     w_dva_wdata;

  always_comb begin
    is_fill  = (state == S_FILL);
    new_line = is_fill ? fill_q : wdata_q;
  end

  for (genvar g = 0; g < WORDS; g++) begin : g_word
    dvi_word_path #(.N(N), .M(M)) u_word (
      .fill      (is_fill),
      .wr        (is_fill | wmask_q[g]),
      .new_val   (new_line[g*N +: N]),
      .base      (data_rd[g*N +: N]),
      .narrow    (nar_rd[g]),
      .delta     (dva_rd[g*M +: M]),
      .rd_val    (cur_line[g*N +: N]),
      .data_we_lo(w_we_lo[g]),
      .data_we_hi(w_we_hi[g]),
      .narrow_we (w_nar_we[g]),
      .narrow_new(w_nar_new[g]),
      .dva_we    (w_dva_we[g]),
      .dva_wdata (w_dva_wdata[g*M +: M]),
      .absorbed  (w_small[g])
    );
  end

  // Intended contents of each array after the write; RBW turns them into masks.
  logic [LINE_BITS-1:0] data_next;
  logic [WORDS-1:0]     nar_next;
  logic [DVA_W-1:0]     dva_next;

  always_comb begin
    for (int g = 0; g < WORDS; g++) begin
      data_next[g*N +: N/2]       = w_we_lo[g] ? new_line[g*N +: N/2]       : data_rd[g*N +: N/2];
      data_next[g*N + N/2 +: N/2] = w_we_hi[g] ? new_line[g*N + N/2 +: N/2] : data_rd[g*N + N/2 +: N/2];
      nar_next[g]                 = w_nar_we[g] ? w_nar_new[g] : nar_rd[g];
      dva_next[g*M +: M]          = w_dva_we[g] ? w_dva_wdata[g*M +: M] : dva_rd[g*M +: M];
    end
  end

  logic [CNT_W-1:0]          d_set, d_reset;
  logic [$clog2(DVA_W+1)-1:0] v_set, v_reset;

  rbw_compare #(.W(LINE_BITS)) u_rbw_data (
    .old_bits(data_rd), .new_bits(data_next), .toggle(data_mask),
    .set_cnt(d_set), .reset_cnt(d_reset), .any(d_any)
  );

  rbw_compare #(.W(DVA_W)) u_rbw_dva (
    .old_bits(dva_rd), .new_bits(dva_next), .toggle(dva_mask),
    .set_cnt(v_set), .reset_cnt(v_reset), .any(v_any)
  );

  always_comb begin
    nar_wr   = nar_next;
    nar_mask = nar_rd ^ nar_next;
    data_wr  = data_next;
    dva_wr   = dva_next;
  end

  // -------------------------------------------------------------- control
  logic line_write;
  logic [LAT_W-1:0] lat_target;

  always_comb begin
    line_write = ((state == S_LINE_OP) && hit_q && (op_q == OP_WRITEBACK)) || is_fill;
    lat_target = (op_q == OP_READ) ? LAT_W'(READ_LAT - 1) : LAT_W'(WRITE_LAT - 1);

    req_ready    = (state == S_IDLE);
    resp_valid   = (state == S_WAIT) && (lat_cnt >= lat_target);
    resp_hit     = ~missed_q;
    resp_rdata   = rdata_q;

    tag_rd_en    = (state == S_TAG_RD);
    tag_rd_addr  = set_idx;
    tag_wr_en    = 1'b0;
    tag_wr_addr  = set_idx;
    tag_wr_data  = row_q;

    line_rd_en   = (state == S_TAG_CMP);
    line_rd_addr = {set_idx, pick_way};
    line_wr_en   = line_write;
    line_wr_addr = {set_idx, way_q};

    mem_req_valid = (state == S_EVICT) || (state == S_FETCH);
    mem_req_write = (state == S_EVICT);
    mem_req_addr  = (state == S_EVICT) ? evict_addr_q
                                       : {tag_in, set_idx, {OFF_W{1'b0}}};
    mem_req_wdata = evict_q;

    if (state == S_INIT) begin
      tag_wr_en   = 1'b1;
      tag_wr_addr = init_idx;
      tag_wr_data = '0;
    end else if ((state == S_LINE_OP) && hit_q && (op_q == OP_WRITEBACK)) begin
      tag_wr_en = 1'b1;
      tag_wr_data[way_q*ENT_W + TAG_W] = 1'b1;                  // line now dirty
    end else if (is_fill) begin
      tag_wr_en = 1'b1;
      tag_wr_data[way_q*ENT_W +: ENT_W] = {1'b1, 1'b0, tag_in}; // valid, clean
      tag_wr_data[WAYS*ENT_W +: WAY_W]  = way_q + 1'b1;         // advance round robin
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_INIT;
      init_idx     <= '0;
      op_q         <= OP_READ;
      addr_q       <= '0;
      wdata_q      <= '0;
      wmask_q      <= '0;
      fill_q       <= '0;
      evict_q      <= '0;
      evict_addr_q <= '0;
      row_q        <= '0;
      way_q        <= '0;
      hit_q        <= 1'b0;
      missed_q     <= 1'b0;
      lat_cnt      <= '0;
      rdata_q      <= '0;
    end else begin
      if (lat_cnt != '1) lat_cnt <= lat_cnt + 1'b1;
      unique case (state)
        S_INIT: begin
          init_idx <= init_idx + 1'b1;
          if (init_idx == IDX_W'(SETS - 1)) state <= S_IDLE;
        end
        S_IDLE: begin
          if (req_valid) begin
            op_q     <= req_op;
            addr_q   <= req_addr;
            wdata_q  <= req_wdata;
            wmask_q  <= req_wmask;
            missed_q <= 1'b0;
            lat_cnt  <= '0;
            state    <= S_TAG_RD;
          end
        end
        S_TAG_RD:  state <= S_TAG_CMP;
        S_TAG_CMP: begin
          row_q        <= tag_rd_data;
          way_q        <= pick_way;
          hit_q        <= lookup_hit;
          evict_addr_q <= {way_tag[pick_way], set_idx, {OFF_W{1'b0}}};
          state        <= S_LINE_OP;
        end
        S_LINE_OP: begin
          if (hit_q) begin
            if (op_q == OP_READ) rdata_q <= cur_line;
            state <= S_WAIT;
          end else begin
            missed_q <= 1'b1;
            evict_q  <= cur_line;
            // a valid, dirty victim goes back to memory before the fetch
            if (row_q[way_q*ENT_W + TAG_W + 1] && row_q[way_q*ENT_W + TAG_W]) state <= S_EVICT;
            else                                                            state <= S_FETCH;
          end
        end
        S_EVICT:     if (mem_req_ready) state <= S_FETCH;
        S_FETCH:     if (mem_req_ready) state <= S_FILL_WAIT;
        S_FILL_WAIT: if (mem_resp_valid) begin
          fill_q <= mem_resp_rdata;
          state  <= S_FILL;
        end
        S_FILL: begin
          lat_cnt <= '0;
          state   <= S_TAG_RD;
        end
        S_WAIT: if (resp_valid) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------- statistics
  function automatic logic [15:0] popcount16(input logic [WORDS-1:0] v);
    logic [15:0] c = '0;
    for (int i = 0; i < WORDS; i++) c += 16'(v[i]);
    return c;
  endfunction

  logic [WORDS-1:0] data_word_changed, dva_word_changed;
  always_comb begin
    for (int g = 0; g < WORDS; g++) begin
      data_word_changed[g] = |data_mask[g*N +: N];
      dva_word_changed[g]  = |dva_mask[g*M +: M];
    end
    stat_valid              = line_write;
    stat.fill               = is_fill;
    stat.dirty_words        = is_fill ? 16'(WORDS) : popcount16(wmask_q);
    stat.small_words        = popcount16(w_small);
    stat.narrow_words       = popcount16(w_nar_we & w_nar_new);
    stat.data_words_written = popcount16(data_word_changed);
    stat.dva_words_written  = popcount16(dva_word_changed);
    stat.data_set_bits      = 16'(d_set);
    stat.data_reset_bits    = 16'(d_reset);
    stat.dva_set_bits       = 16'(v_set);
    stat.dva_reset_bits     = 16'(v_reset);
  end

  // ----------------------------------------------------------- assertions
  a_mem_req_state: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid |-> (state == S_EVICT || state == S_FETCH))
    else $error("dvi_llc: memory request outside evict/fetch");
  a_clean_not_absorbed: assert property (@(posedge clk) disable iff (!rst_n)
    (stat_valid && !is_fill) |-> ((w_small & ~wmask_q) == '0))
    else $error("dvi_llc: clean word absorbed by the DVA");
  a_resp_one_cycle: assert property (@(posedge clk) disable iff (!rst_n)
    resp_valid |=> !resp_valid)
    else $error("dvi_llc: response longer than one cycle");
endmodule
