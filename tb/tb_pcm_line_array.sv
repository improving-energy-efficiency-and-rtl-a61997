// tb_pcm_line_array: self-checking test of the line array.
// A shadow copy in the testbench follows every masked write; reads are checked
// one cycle after rd_en, including that rd_data holds while rd_en is low and
// that a same-cycle read and write of one row returns the old contents.
module tb_pcm_line_array;
  localparam int unsigned DEPTH = 16, WIDTH = 48;
  logic clk = 0;
  logic rd_en = 0, wr_en = 0;
  logic [$clog2(DEPTH)-1:0] rd_addr = '0, wr_addr = '0;
  logic [WIDTH-1:0] rd_data, wr_data = '0, wr_mask = '0;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0, cycles = 0;

  pcm_line_array #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cycles++;
    if (cycles > 20000) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  task automatic wr(input int a, input logic [WIDTH-1:0] d, input logic [WIDTH-1:0] m);
    @(negedge clk);
    wr_en = 1; wr_addr = a[$clog2(DEPTH)-1:0]; wr_data = d; wr_mask = m;
    @(negedge clk);
    wr_en = 0;
    shadow[a] = (shadow[a] & ~m) | (d & m);
  endtask

  task automatic rd_check(input int a);
    @(negedge clk);
    rd_en = 1; rd_addr = a[$clog2(DEPTH)-1:0];
    @(negedge clk);
    rd_en = 0;
    checks++;
    if (rd_data !== shadow[a]) begin
      failures++;
      $display("FAIL row %0d: %h expected %h", a, rd_data, shadow[a]);
    end
    rd_addr = rd_addr + 1'b1;  // must not change rd_data while rd_en is low
    @(negedge clk);
    checks++;
    if (rd_data !== shadow[a]) begin
      failures++;
      $display("FAIL row %0d not held", a);
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) wr(a, {$urandom, $urandom}, '1);
    for (int a = 0; a < DEPTH; a++) rd_check(a);
    for (int i = 0; i < 300; i++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      wr(a, {$urandom, $urandom}, {$urandom, $urandom});
      rd_check($urandom_range(0, DEPTH - 1));
      rd_check(a);
    end
    // read and write of one row in the same cycle
    @(negedge clk);
    rd_en = 1; rd_addr = 3; wr_en = 1; wr_addr = 3; wr_data = ~shadow[3]; wr_mask = '1;
    @(negedge clk);
    rd_en = 0; wr_en = 0;
    checks++;
    if (rd_data !== shadow[3]) begin
      failures++;
      $display("FAIL read-during-write did not return old data");
    end
    shadow[3] = ~shadow[3];
    rd_check(3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
