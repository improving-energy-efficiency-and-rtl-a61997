// tb_dvi_adder: self-checking test of the read adder with sign extension.
// Every 4-bit delta is added to corner and random base values; the expected
// sum is base plus the delta read as a signed number, modulo 2^32.
module tb_dvi_adder;
  localparam int unsigned N = 32, M = 4;
  logic [N-1:0] base, sum;
  logic [M-1:0] delta;
  logic         carry;
  int checks = 0, failures = 0;

  dvi_adder #(.N(N), .M(M)) dut (.base, .delta, .sum, .carry);

  task automatic check(input logic [N-1:0] b, input int d);
    longint signed s;
    base = b; delta = M'(d);
    #1;
    s = longint'(b) + longint'(d);
    checks++;
    if (sum !== s[N-1:0]) begin
      failures++;
      $display("FAIL base=%h delta=%0d sum=%h", b, d, sum);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = -8; d <= 7; d++) begin
      check(0, d);
      check(32'hFFFF_FFFF, d);
      check(32'h0000_FFFF, d);
      check(100, d);
      for (int i = 0; i < 30; i++) check($urandom, d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
