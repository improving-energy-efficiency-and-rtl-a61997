// tb_dvi_word_path: self-checking test of the per-word DVI datapath.
// For random stored states (base, narrow flag, delta) and new values it checks
//  * the read value: effective base plus the signed delta;
//  * the write decision: a new value within -8..7 of the effective base goes to
//    the DVA only, anything else rewrites the data array (narrow when the upper
//    half is zero, upper half then not written) and clears the delta;
//  * fill always rewrites the data array; an unwritten word changes nothing.
// After each write the testbench applies the enables to its own copy and
// checks that the word then reads back as the new value.
module tb_dvi_word_path;
  localparam int unsigned N = 32, M = 4;
  logic         fill, wr, narrow;
  logic [N-1:0] new_val, base, rd_val;
  logic [M-1:0] delta, dva_wdata;
  logic data_we_lo, data_we_hi, narrow_we, narrow_new, dva_we, absorbed;
  int checks = 0, failures = 0;
  int n_small = 0, n_large = 0, n_narrow = 0;

  dvi_word_path #(.N(N), .M(M)) dut (.*);

  function automatic logic [N-1:0] eff(input logic [N-1:0] b, input logic nr);
    return nr ? {16'h0, b[15:0]} : b;
  endfunction

  task automatic step(input logic [N-1:0] b, input logic nr, input logic [M-1:0] d,
                      input logic [N-1:0] nv, input logic f, input logic w);
    longint signed diff;
    logic exp_small;
    logic [N-1:0] cur, b2;
    logic nr2;
    logic [M-1:0] d2;
    base = b; narrow = nr; delta = d; new_val = nv; fill = f; wr = w;
    #1;
    cur = eff(b, nr) + {{(N-M){d[M-1]}}, d};
    checks++;
    if (rd_val !== cur) begin
      failures++;
      $display("FAIL read b=%h nr=%b d=%h got %h exp %h", b, nr, d, rd_val, cur);
    end
    diff = longint'(nv) - longint'(eff(b, nr));
    exp_small = w && !f && diff >= -8 && diff <= 7;
    checks++;
    if (absorbed !== exp_small || (data_we_lo !== (w && !exp_small))) begin
      failures++;
      $display("FAIL decision b=%h nv=%h diff=%0d absorbed=%b we=%b", b, nv, diff, absorbed, data_we_lo);
    end
    // apply enables to a copy of the stored state
    b2 = b; nr2 = nr; d2 = d;
    if (data_we_lo) b2[15:0]  = nv[15:0];
    if (data_we_hi) b2[31:16] = nv[31:16];
    if (narrow_we)  nr2 = narrow_new;
    if (dva_we)     d2 = dva_wdata;
    if (w) begin
      checks++;
      if (eff(b2, nr2) + {{(N-M){d2[M-1]}}, d2} !== nv) begin
        failures++;
        $display("FAIL write b=%h nv=%h stored b2=%h nr2=%b d2=%h", b, nv, b2, nr2, d2);
      end
      if (!exp_small) begin
        checks++;
        if (d2 !== '0 || nr2 !== (nv[31:16] == 0) || data_we_hi !== (nv[31:16] != 0)) begin
          failures++;
          $display("FAIL large write flags nv=%h", nv);
        end
        if (nv[31:16] == 0) n_narrow++;
        n_large++;
      end else n_small++;
    end else begin
      checks++;
      if (data_we_lo || data_we_hi || narrow_we || dva_we) begin
        failures++;
        $display("FAIL unwritten word has an enable");
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // exact boundaries
    step(32'd1000, 0, 0, 32'd1007, 0, 1);
    step(32'd1000, 0, 0, 32'd1008, 0, 1);
    step(32'd1000, 0, 0, 32'd992, 0, 1);
    step(32'd1000, 0, 0, 32'd991, 0, 1);
    step(32'h0001_0000, 0, 4'hF, 32'h0000_FFFF, 0, 1);   // crosses a half boundary
    step(32'hABCD_0005, 1, 4'h2, 32'h0000_0003, 0, 1);    // narrow stored value
    step(32'd0, 0, 0, 32'hFFFF_FFFF, 0, 1);               // no wrap-around deltas
    step(32'd50, 0, 0, 32'd51, 1, 1);                     // fill
    for (int i = 0; i < 3000; i++) begin
      logic [N-1:0] b;
      logic nr;
      logic [M-1:0] d;
      logic [N-1:0] nv;
      b = $urandom;
      nr = 1'($urandom);
      d = M'($urandom);
      case ($urandom_range(0, 3))
        0: nv = $urandom;
        1: nv = $urandom_range(0, 65535);
        default: nv = eff(b, nr) + N'($urandom_range(0, 24)) - 12;
      endcase
      step(b, nr, d, nv, ($urandom_range(0, 9) == 0), ($urandom_range(0, 5) != 0));
    end
    checks++;
    if (n_small == 0 || n_large == 0 || n_narrow == 0) begin
      failures++;
      $display("FAIL coverage small=%0d large=%0d narrow=%0d", n_small, n_large, n_narrow);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
