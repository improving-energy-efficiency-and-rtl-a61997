// tb_dvi_llc: end-to-end test of the DVI last-level cache at reduced size.
//
// Geometry 4 sets x 2 ways (so that lines are evicted often), 32-bit words,
// 4-bit deltas, read/write latencies 8/12. A behavioural main memory with a
// random response delay backs the cache. A golden model of the memory image
// (what the upper level last wrote, else the memory's initial contents) checks
// every read. The test counts how often each mechanism of the cache happens
// and fails if one never does: hit, miss, dirty eviction, DVA-absorbed word
// (small delta), data-array word write, narrow-width store, clean words
// skipped (per-word dirty mask) and writes removed by read-before-write.
// Directed sequences also check the write statistics exactly, and every hit
// is checked to complete in exactly READ_LAT / WRITE_LAT cycles.
module tb_dvi_llc;
  import dvi_pkg::*;
  localparam int unsigned N = 32, M = 4, LINE_BITS = 512, WAYS = 2, SETS = 4;
  localparam int unsigned ADDR_W = 32, READ_LAT = 8, WRITE_LAT = 12;
  localparam int unsigned WORDS = LINE_BITS / N;
  localparam int unsigned NLINES = 16;  // distinct lines used by the traffic

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  llc_op_e req_op = OP_READ;
  logic [ADDR_W-1:0] req_addr = '0;
  logic [LINE_BITS-1:0] req_wdata = '0;
  logic [WORDS-1:0] req_wmask = '0;
  logic resp_valid, resp_hit;
  logic [LINE_BITS-1:0] resp_rdata;
  logic mem_req_valid, mem_req_ready, mem_req_write;
  logic [ADDR_W-1:0] mem_req_addr;
  logic [LINE_BITS-1:0] mem_req_wdata;
  logic mem_resp_valid;
  logic [LINE_BITS-1:0] mem_resp_rdata;
  logic stat_valid;
  dvi_wr_stat_t stat;

  dvi_llc #(.N(N), .M(M), .LINE_BITS(LINE_BITS), .WAYS(WAYS), .SETS(SETS),
            .ADDR_W(ADDR_W), .READ_LAT(READ_LAT), .WRITE_LAT(WRITE_LAT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  int n_hit = 0, n_miss = 0, n_evict = 0, n_small = 0, n_data = 0, n_narrow = 0;
  int n_clean_skip = 0, n_rbw_saved = 0, n_fill = 0;

  always @(posedge clk) begin
    cycles++;
    if (cycles > 400000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // ---------------------------------------------------------- main memory
  logic [LINE_BITS-1:0] mem [NLINES];
  logic [LINE_BITS-1:0] gold [NLINES];

  function automatic logic [LINE_BITS-1:0] init_line(input int ln);
    logic [LINE_BITS-1:0] l;
    for (int w = 0; w < WORDS; w++)
      l[w*N +: N] = (w % 2 == 0) ? N'(ln * 100 + w) : N'(32'h9E37_79B9 * (ln * 16 + w + 1));
    return l;
  endfunction

  int mem_delay = 0;
  logic pending_rd = 0;
  logic [LINE_BITS-1:0] pending_data;
  always_ff @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (mem_req_valid && mem_req_ready) begin
      int ln;
      ln = int'(mem_req_addr >> 6);
      if (ln >= NLINES) begin
        failures++;
        $display("FAIL memory address %h out of range", mem_req_addr);
      end else if (mem_req_write) begin
        mem[ln] <= mem_req_wdata;
        n_evict++;
        checks++;
        if (mem_req_wdata !== gold[ln]) begin
          failures++;
          $display("FAIL evicted line %0d differs from golden", ln);
        end
      end else begin
        pending_rd   <= 1'b1;
        pending_data <= mem[ln];
        mem_delay    <= $urandom_range(1, 6);
      end
    end
    if (pending_rd) begin
      if (mem_delay == 0) begin
        mem_resp_valid <= 1'b1;
        mem_resp_rdata <= pending_data;
        pending_rd     <= 1'b0;
      end else mem_delay <= mem_delay - 1;
    end
  end
  always_comb mem_req_ready = mem_req_valid && !pending_rd && ($urandom_range(0, 2) != 0);

  // ------------------------------------------------------ statistics watch
  dvi_wr_stat_t last_stat;
  always @(posedge clk) if (stat_valid) begin
    last_stat = stat;
    if (stat.fill) n_fill++;
    else begin
      n_small  += int'(stat.small_words);
      n_data   += int'(stat.data_words_written);
      if (stat.dirty_words < WORDS) n_clean_skip++;
      if (int'(stat.data_words_written) + int'(stat.dva_words_written) < int'(stat.dirty_words)) n_rbw_saved++;
    end
    n_narrow += int'(stat.narrow_words);
  end

  // ------------------------------------------------------------- requests
  task automatic access(input llc_op_e op, input int ln, input logic [LINE_BITS-1:0] wd,
                        input logic [WORDS-1:0] wm, output logic hit);
    longint t0;
    @(negedge clk);
    req_valid = 1; req_op = op; req_addr = ADDR_W'(ln) << 6; req_wdata = wd; req_wmask = wm;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    t0 = cycles;
    @(negedge clk);
    req_valid = 0;
    @(posedge clk);
    while (!resp_valid) @(posedge clk);
    hit = resp_hit;
    if (hit) begin
      n_hit++;
      checks++;
      if (cycles - t0 != longint'((op == OP_READ) ? READ_LAT : WRITE_LAT)) begin
        failures++;
        $display("FAIL latency %0d for op %s", cycles - t0, op.name());
      end
    end else n_miss++;
    if (op == OP_READ) begin
      checks++;
      if (resp_rdata !== gold[ln]) begin
        failures++;
        $display("FAIL read line %0d", ln);
        for (int w = 0; w < WORDS; w++)
          if (resp_rdata[w*N +: N] !== gold[ln][w*N +: N])
            $display("   word %0d got %h exp %h", w, resp_rdata[w*N +: N], gold[ln][w*N +: N]);
      end
    end else begin
      for (int w = 0; w < WORDS; w++) if (wm[w]) gold[ln][w*N +: N] = wd[w*N +: N];
    end
  endtask

  task automatic expect_stat(input string what, input int small_w, input int data_w);
    checks++;
    if (int'(last_stat.small_words) != small_w || int'(last_stat.data_words_written) != data_w) begin
      failures++;
      $display("FAIL %s: small=%0d (exp %0d) data=%0d (exp %0d)", what,
               last_stat.small_words, small_w, last_stat.data_words_written, data_w);
    end
  endtask

  initial begin
    logic h;
    logic [LINE_BITS-1:0] l;
    for (int i = 0; i < NLINES; i++) begin
      mem[i] = init_line(i);
      gold[i] = mem[i];
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Directed: fill line 5, small deltas, large change, identical rewrite.
    access(OP_READ, 5, '0, '0, h);
    checks++; if (h) begin failures++; $display("FAIL first access hit"); end
    access(OP_READ, 5, '0, '0, h);
    checks++; if (!h) begin failures++; $display("FAIL second access missed"); end
    l = gold[5];
    for (int w = 0; w < WORDS; w++) l[w*N +: N] = l[w*N +: N] + N'(w % 8) - 4;
    access(OP_WRITEBACK, 5, l, '1, h);
    expect_stat("small deltas", WORDS, 0);
    checks++;
    if (int'(last_stat.dva_words_written) != WORDS - 2) begin  // delta 0 words need no toggle
      failures++;
      $display("FAIL dva words written %0d", last_stat.dva_words_written);
    end
    access(OP_READ, 5, '0, '0, h);
    l = gold[5];
    for (int w = 0; w < WORDS; w++) l[w*N +: N] = l[w*N +: N] + 32'd1000;
    access(OP_WRITEBACK, 5, l, 16'h00FF, h);
    expect_stat("large deltas", 0, 8);
    access(OP_WRITEBACK, 5, gold[5], 16'h0F00, h);   // same values again: RBW saves them
    expect_stat("identical", 4, 0);
    access(OP_READ, 5, '0, '0, h);

    // Random traffic.
    for (int i = 0; i < 3000; i++) begin
      int ln;
      ln = $urandom_range(0, NLINES - 1);
      if ($urandom_range(0, 1) == 0) access(OP_READ, ln, '0, '0, h);
      else begin
        logic [WORDS-1:0] wm;
        wm = WORDS'($urandom);
        l = gold[ln];
        for (int w = 0; w < WORDS; w++) begin
          case ($urandom_range(0, 5))
            0: l[w*N +: N] = $urandom;
            1: l[w*N +: N] = $urandom_range(0, 65535);
            2: l[w*N +: N] = l[w*N +: N];
            default: l[w*N +: N] = l[w*N +: N] + N'($urandom_range(0, 20)) - 10;
          endcase
        end
        access(OP_WRITEBACK, ln, l, wm, h);
      end
    end
    // read everything back
    for (int ln = 0; ln < NLINES; ln++) access(OP_READ, ln, '0, '0, h);

    $display("mechanisms: hit=%0d miss=%0d fill=%0d dirty_evict=%0d dva_words=%0d data_words=%0d narrow=%0d clean_skip=%0d rbw_saved=%0d",
             n_hit, n_miss, n_fill, n_evict, n_small, n_data, n_narrow, n_clean_skip, n_rbw_saved);
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_fill == 0 || n_evict == 0 || n_small == 0 || n_data == 0 ||
        n_narrow == 0 || n_clean_skip == 0 || n_rbw_saved == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
