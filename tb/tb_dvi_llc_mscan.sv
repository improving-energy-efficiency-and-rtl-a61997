// tb_dvi_llc_mscan: the same write-back traffic through four caches that differ
// only in the delta width, M = 1, 2, 3 and 4, side by side.
//
// Geometry 16 sets x 4 ways, latencies 27/64, 128 distinct lines (so lines are
// evicted and refetched). The traffic follows the kind of value changes the
// scheme targets: a dirty word moves by at most +-16 in 40 % of the cases, is
// rewritten unchanged in 10 %, and gets an unrelated (sometimes narrow) value
// otherwise. The four caches see identical requests and, having identical tags
// and replacement, run in lockstep. Every read of every cache is checked against
// a golden image, and the test prints, for each M, the data-array words written
// normalised to the words an RBW+MDB cache would write (dirty words whose value
// changed). It checks that each configuration writes fewer data-array words than
// that baseline and that M = 4 writes fewer than M = 1.
module tb_dvi_llc_mscan;
  import dvi_pkg::*;
  localparam int unsigned LINE_BITS = 512, WORDS = 16, N = 32;
  localparam int unsigned SETS = 16, WAYS = 4, NLINES = 128;
  localparam int unsigned NCFG = 4;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0;
  llc_op_e req_op = OP_READ;
  logic [31:0] req_addr = '0;
  logic [LINE_BITS-1:0] req_wdata = '0;
  logic [WORDS-1:0] req_wmask = '0;

  logic [NCFG-1:0] req_ready, resp_valid, resp_hit, stat_valid;
  logic [LINE_BITS-1:0] resp_rdata [NCFG];
  dvi_wr_stat_t stat [NCFG];
  int ev_writes [NCFG];

  always #5 clk = ~clk;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic mem_req_valid, mem_req_ready, mem_req_write, mem_resp_valid;
    logic [31:0] mem_req_addr;
    logic [LINE_BITS-1:0] mem_req_wdata, mem_resp_rdata;
    dvi_llc #(.M(c + 1), .SETS(SETS), .WAYS(WAYS)) u_llc (
      .clk, .rst_n, .req_valid, .req_ready(req_ready[c]), .req_op, .req_addr, .req_wdata,
      .req_wmask, .resp_valid(resp_valid[c]), .resp_hit(resp_hit[c]), .resp_rdata(resp_rdata[c]),
      .mem_req_valid, .mem_req_ready, .mem_req_write, .mem_req_addr, .mem_req_wdata,
      .mem_resp_valid, .mem_resp_rdata, .stat_valid(stat_valid[c]), .stat(stat[c])
    );
    tb_mem_model #(.LINE_BITS(LINE_BITS), .NLINES(NLINES), .DELAY(10)) u_mem (
      .clk, .mem_req_valid, .mem_req_ready, .mem_req_write, .mem_req_addr, .mem_req_wdata,
      .mem_resp_valid, .mem_resp_rdata, .writes(ev_writes[c])
    );
  end

  int checks = 0, failures = 0;
  longint cycles = 0;
  longint data_words [NCFG];
  longint dva_words [NCFG];
  longint data_bits [NCFG];
  longint baseline_words = 0;
  logic [LINE_BITS-1:0] gold [NLINES];

  always @(posedge clk) begin
    cycles++;
    if (cycles > 3000000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    for (int c = 0; c < NCFG; c++) if (stat_valid[c] && !stat[c].fill) begin
      data_words[c] += longint'(stat[c].data_words_written);
      dva_words[c]  += longint'(stat[c].dva_words_written);
      data_bits[c]  += longint'(stat[c].data_set_bits) + longint'(stat[c].data_reset_bits);
    end
    if (rst_n && (resp_valid != '0 && resp_valid != '1)) begin
      failures++;
      $display("FAIL caches out of lockstep");
    end
  end

  function automatic logic [LINE_BITS-1:0] init_line(input int unsigned ln);
    logic [LINE_BITS-1:0] l;
    for (int w = 0; w < WORDS; w++)
      l[w*32 +: 32] = (w % 2 == 0) ? 32'(ln * 100 + 32'(w)) : 32'h9E37_79B9 * 32'(ln * 16 + 32'(w) + 1);
    return l;
  endfunction

  task automatic access(input llc_op_e op, input int ln, input logic [LINE_BITS-1:0] wd,
                        input logic [WORDS-1:0] wm);
    @(negedge clk);
    req_valid = 1; req_op = op; req_addr = 32'(ln) << 6; req_wdata = wd; req_wmask = wm;
    @(posedge clk);
    while (!req_ready[0]) @(posedge clk);
    @(negedge clk);
    req_valid = 0;
    @(posedge clk);
    while (!resp_valid[0]) @(posedge clk);
    if (op == OP_READ) begin
      for (int c = 0; c < NCFG; c++) begin
        checks++;
        if (resp_rdata[c] !== gold[ln]) begin
          failures++;
          $display("FAIL M=%0d read line %0d", c + 1, ln);
        end
      end
    end else begin
      for (int w = 0; w < WORDS; w++)
        if (wm[w]) begin
          if (wd[w*N +: N] != gold[ln][w*N +: N]) baseline_words++;
          gold[ln][w*N +: N] = wd[w*N +: N];
        end
    end
  endtask

  initial begin
    logic [LINE_BITS-1:0] l;
    logic [WORDS-1:0] wm;
    int ln, r;
    for (int c = 0; c < NCFG; c++) begin
      data_words[c] = 0; dva_words[c] = 0; data_bits[c] = 0;
    end
    for (int i = 0; i < NLINES; i++) gold[i] = init_line(i);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      ln = $urandom_range(0, NLINES / 2 - 1) + (($urandom_range(0, 9) == 0) ? NLINES / 2 : 0);
      if ($urandom_range(0, 2) == 0) access(OP_READ, ln, '0, '0);
      else begin
        l = gold[ln];
        wm = WORDS'($urandom);
        for (int w = 0; w < WORDS; w++) begin
          r = $urandom_range(0, 9);
          if (r < 4)      l[w*N +: N] = l[w*N +: N] + N'($urandom_range(0, 32)) - 16;
          else if (r < 5) l[w*N +: N] = l[w*N +: N];
          else if (r < 7) l[w*N +: N] = $urandom_range(0, 65535);
          else            l[w*N +: N] = $urandom;
        end
        access(OP_WRITEBACK, ln, l, wm);
      end
    end
    for (int i = 0; i < NLINES; i++) access(OP_READ, i, '0, '0);

    $display("baseline (RBW+MDB) data-array word writes: %0d", baseline_words);
    for (int c = 0; c < NCFG; c++) begin
      $display("M=%0d: data-array words %0d (normalised %0d.%03d), DVA words %0d, data bits toggled %0d, evictions %0d",
               c + 1, data_words[c], data_words[c] * 1000 / baseline_words / 1000,
               data_words[c] * 1000 / baseline_words % 1000, dva_words[c], data_bits[c], ev_writes[c]);
      checks++;
      if (data_words[c] >= baseline_words) begin
        failures++;
        $display("FAIL M=%0d writes no fewer data-array words than the baseline", c + 1);
      end
    end
    checks++;
    if (data_words[3] >= data_words[0] || ev_writes[0] == 0) begin
      failures++;
      $display("FAIL M=4 not better than M=1, or no eviction happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
