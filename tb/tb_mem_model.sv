// tb_mem_model: behavioural main memory for the cache testbenches.
//
// Not synthesizable logic: a line-wide memory of NLINES lines with a fixed
// response delay of DELAY cycles. Lines start as init_line(address), a fixed
// function of the line number that mixes small (narrow) and large words. A
// write (eviction) is accepted at once; a read is accepted when no other read
// is pending and answered with one mem_resp_valid pulse DELAY cycles later.
// Addresses beyond NLINES lines are reported with $error.
module tb_mem_model #(
  parameter int unsigned LINE_BITS = 512,
  parameter int unsigned NLINES    = 64,
  parameter int unsigned DELAY     = 4
) (
  input  logic                 clk,
  input  logic                 mem_req_valid,
  output logic                 mem_req_ready,
  input  logic                 mem_req_write,
  input  logic [31:0]          mem_req_addr,
  input  logic [LINE_BITS-1:0] mem_req_wdata,
  output logic                 mem_resp_valid,
  output logic [LINE_BITS-1:0] mem_resp_rdata,
  output int                   writes
);
  logic [LINE_BITS-1:0] mem [NLINES];
  int unsigned cnt = 0;
  logic busy = 1'b0;
  int unsigned ln_q = 0;

  function automatic logic [LINE_BITS-1:0] init_line(input int unsigned ln);
    logic [LINE_BITS-1:0] l;
    for (int w = 0; w < LINE_BITS / 32; w++)
      l[w*32 +: 32] = (w % 2 == 0) ? 32'(ln * 100 + 32'(w)) : 32'h9E37_79B9 * 32'(ln * 16 + 32'(w) + 1);
    return l;
  endfunction

  initial begin
    writes = 0;
    mem_resp_valid = 1'b0;
    mem_resp_rdata = '0;
    for (int i = 0; i < NLINES; i++) mem[i] = init_line(i);
  end

  assign mem_req_ready = mem_req_valid && (mem_req_write || !busy);

  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (mem_req_valid && mem_req_ready) begin
      if ((mem_req_addr >> 6) >= NLINES) $error("tb_mem_model: address %h out of range", mem_req_addr);
      else if (mem_req_write) begin
        mem[mem_req_addr >> 6] <= mem_req_wdata;
        writes <= writes + 1;
      end else begin
        busy <= 1'b1;
        cnt  <= DELAY;
        ln_q <= mem_req_addr >> 6;
      end
    end
    if (busy) begin
      if (cnt == 0) begin
        mem_resp_valid <= 1'b1;
        mem_resp_rdata <= mem[ln_q];
        busy <= 1'b0;
      end else cnt <= cnt - 1;
    end
  end
endmodule
