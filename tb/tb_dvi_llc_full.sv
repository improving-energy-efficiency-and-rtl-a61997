// tb_dvi_llc_full: the DVI cache at its full default size (4 MB, 16 ways,
// 4096 sets, 4-bit deltas, latencies 27/64) through one complete operation.
//
// After the reset sweep of the tag array it fetches a line (miss and fill),
// reads it back (hit, 27 cycles), writes back small changes to every word
// (absorbed by the delta value array, no data-array word written, 64 cycles),
// writes back a large change to half of the words (data array written, deltas
// cleared), and reads the line again; then it fills all 16 ways of that set
// plus one more line so that the dirty line is evicted, and reads it back from
// memory. A behavioural memory model with a fixed delay backs the cache.
module tb_dvi_llc_full;
  import dvi_pkg::*;
  localparam int unsigned LINE_BITS = 512, WORDS = 16, N = 32;

  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready;
  llc_op_e req_op = OP_READ;
  logic [31:0] req_addr = '0;
  logic [LINE_BITS-1:0] req_wdata = '0;
  logic [WORDS-1:0] req_wmask = '0;
  logic resp_valid, resp_hit;
  logic [LINE_BITS-1:0] resp_rdata;
  logic mem_req_valid, mem_req_ready, mem_req_write;
  logic [31:0] mem_req_addr;
  logic [LINE_BITS-1:0] mem_req_wdata;
  logic mem_resp_valid = 0;
  logic [LINE_BITS-1:0] mem_resp_rdata = '0;
  logic stat_valid;
  dvi_wr_stat_t stat;

  dvi_llc dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycles = 0;
  int n_evict = 0;
  dvi_wr_stat_t last_stat;

  always @(posedge clk) begin
    cycles++;
    if (stat_valid) last_stat = stat;
    if (cycles > 200000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  // memory: sparse image, initial contents a function of the address
  logic [LINE_BITS-1:0] mem_img [logic [31:0]];
  function automatic logic [LINE_BITS-1:0] init_line(input logic [31:0] a);
    logic [LINE_BITS-1:0] l;
    for (int w = 0; w < WORDS; w++) l[w*N +: N] = (a >> 6) * 7 + 32'(w) * 32'h0101_0101;
    return l;
  endfunction
  function automatic logic [LINE_BITS-1:0] mem_line(input logic [31:0] a);
    return mem_img.exists(a) ? mem_img[a] : init_line(a);
  endfunction

  int delay = -1;
  logic [31:0] rd_addr_q;
  assign mem_req_ready = mem_req_valid && delay < 0;
  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (mem_req_valid && mem_req_ready) begin
      if (mem_req_write) begin
        mem_img[mem_req_addr] = mem_req_wdata;
        n_evict++;
      end else begin
        rd_addr_q = mem_req_addr;
        delay = 20;
      end
    end else if (delay > 0) delay--;
    else if (delay == 0) begin
      mem_resp_valid <= 1'b1;
      mem_resp_rdata <= mem_line(rd_addr_q);
      delay = -1;
    end
  end

  task automatic access(input llc_op_e op, input logic [31:0] a, input logic [LINE_BITS-1:0] wd,
                        input logic [WORDS-1:0] wm, output logic hit, output longint lat,
                        output logic [LINE_BITS-1:0] rd);
    longint t0;
    @(negedge clk);
    req_valid = 1; req_op = op; req_addr = a; req_wdata = wd; req_wmask = wm;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    t0 = cycles;
    @(negedge clk);
    req_valid = 0;
    @(posedge clk);
    while (!resp_valid) @(posedge clk);
    hit = resp_hit; lat = cycles - t0; rd = resp_rdata;
  endtask

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic h;
    longint lat;
    logic [LINE_BITS-1:0] rd, gold;
    logic [31:0] a;
    a = 32'h0012_3440;
    repeat (3) @(posedge clk);
    rst_n = 1;

    access(OP_READ, a, '0, '0, h, lat, rd);
    gold = init_line(a);
    check("first read misses", !h);
    check("first read data", rd == gold);
    access(OP_READ, a, '0, '0, h, lat, rd);
    check("second read hits", h);
    check("read hit latency 27", lat == 27);
    check("second read data", rd == gold);

    for (int w = 0; w < WORDS; w++) gold[w*N +: N] = gold[w*N +: N] + N'(w % 16) - 8;
    access(OP_WRITEBACK, a, gold, '1, h, lat, rd);
    check("write-back hit latency 64", h && lat == 64);
    check("all words absorbed by the DVA", last_stat.small_words == 16 && last_stat.data_words_written == 0);
    access(OP_READ, a, '0, '0, h, lat, rd);
    check("read after small deltas", rd == gold);

    for (int w = 0; w < 8; w++) gold[w*N +: N] = gold[w*N +: N] ^ 32'h5500_0000;
    access(OP_WRITEBACK, a, gold, 16'h00FF, h, lat, rd);
    check("large change writes data array", last_stat.small_words == 0 && last_stat.data_words_written == 8);
    access(OP_READ, a, '0, '0, h, lat, rd);
    check("read after large change", rd == gold);

    // 16 more lines of the same set evict the dirty line
    for (int i = 1; i <= 16; i++) begin
      logic [LINE_BITS-1:0] rd2;
      access(OP_READ, a + (32'(i) << 18), '0, '0, h, lat, rd2);
      check("conflicting line data", rd2 == init_line(a + (32'(i) << 18)));
    end
    check("dirty line written back", n_evict == 1 && mem_img.exists(a) && mem_img[a] == gold);
    access(OP_READ, a, '0, '0, h, lat, rd);
    check("evicted line refetched", !h && rd == gold);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
