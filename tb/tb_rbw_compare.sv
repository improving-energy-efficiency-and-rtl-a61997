// tb_rbw_compare: self-checking test of the read-before-write comparator.
// Random and corner old/new words; expected toggle mask and SET (0->1) and
// RESET (1->0) counts are computed bit by bit in the testbench.
module tb_rbw_compare;
  localparam int unsigned W = 64;
  logic [W-1:0] old_bits, new_bits, toggle;
  logic [$clog2(W+1)-1:0] set_cnt, reset_cnt;
  logic any;
  int checks = 0, failures = 0;

  rbw_compare #(.W(W)) dut (.old_bits, .new_bits, .toggle, .set_cnt, .reset_cnt, .any);

  task automatic check(input logic [W-1:0] o, input logic [W-1:0] n);
    int es = 0, er = 0;
    old_bits = o; new_bits = n;
    #1;
    for (int i = 0; i < W; i++) begin
      if (o[i] == 1'b0 && n[i] == 1'b1) es++;
      if (o[i] == 1'b1 && n[i] == 1'b0) er++;
    end
    checks++;
    if (toggle !== (o ^ n) || int'(set_cnt) != es || int'(reset_cnt) != er || any !== (o != n)) begin
      failures++;
      $display("FAIL old=%h new=%h set=%0d/%0d reset=%0d/%0d", o, n, set_cnt, es, reset_cnt, er);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0, '0);
    check('0, '1);
    check('1, '0);
    check(64'h1, 64'h2);
    for (int i = 0; i < 500; i++) check({$urandom, $urandom}, {$urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
