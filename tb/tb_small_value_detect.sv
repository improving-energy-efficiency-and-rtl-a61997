// tb_small_value_detect: self-checking test of the small delta detector.
// For every M from the instance (M=4) and for a second instance with M=2, it
// feeds exact (N+1)-bit differences and checks fits/data_we against the
// range -2^(M-1) .. 2^(M-1)-1 computed in the testbench.
module tb_small_value_detect;
  localparam int unsigned N = 32;
  logic [N-1:0] diff;
  logic         borrow;
  logic         fits4, we4, fits2, we2;
  int checks = 0, failures = 0;

  small_value_detect #(.N(N), .M(4)) dut4 (.diff, .borrow, .fits(fits4), .data_we(we4));
  small_value_detect #(.N(N), .M(2)) dut2 (.diff, .borrow, .fits(fits2), .data_we(we2));

  task automatic check(input longint signed d);
    logic [N:0] enc;
    logic exp4, exp2;
    enc = (N+1)'(d);
    {borrow, diff} = enc;
    #1;
    exp4 = (d >= -8) && (d <= 7);
    exp2 = (d >= -2) && (d <= 1);
    checks++;
    if (fits4 !== exp4 || we4 !== !exp4 || fits2 !== exp2 || we2 !== !exp2) begin
      failures++;
      $display("FAIL d=%0d fits4=%b fits2=%b", d, fits4, fits2);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (longint signed d = -40; d <= 40; d++) check(d);
    check(longint'(32'hFFFF_FFFF));
    check(-longint'(32'hFFFF_FFFF));
    check(longint'(32'h8000_0000));
    check(-longint'(32'h8000_0000));
    for (int i = 0; i < 500; i++) check(longint'($urandom) - longint'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
