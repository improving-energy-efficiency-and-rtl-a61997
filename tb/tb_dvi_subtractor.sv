// tb_dvi_subtractor: self-checking test of the N-bit subtractor.
// Drives corner cases and random operands and compares out/borrow with a
// 64-bit reference difference computed in the testbench.
module tb_dvi_subtractor;
  localparam int unsigned N = 32;
  logic [N-1:0] in1, in2, out;
  logic         borrow;
  int checks = 0, failures = 0;

  dvi_subtractor #(.N(N)) dut (.in1, .in2, .out, .borrow);

  task automatic check(input logic [N-1:0] a, input logic [N-1:0] b);
    longint signed ref_diff;
    in1 = a; in2 = b;
    #1;
    ref_diff = longint'(b) - longint'(a);
    checks++;
    if (out !== ref_diff[N-1:0] || borrow !== (ref_diff < 0)) begin
      failures++;
      $display("FAIL in1=%h in2=%h out=%h borrow=%b", a, b, out, borrow);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0);
    check(5, 7);
    check(7, 5);
    check(32'hFFFF_FFFF, 0);
    check(0, 32'hFFFF_FFFF);
    check(32'h8000_0000, 32'h7FFF_FFFF);
    for (int i = 0; i < 500; i++) begin
      logic [N-1:0] a;
      a = $urandom;
      check(a, a + N'($urandom_range(0, 40)) - 20);
      check($urandom, $urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
