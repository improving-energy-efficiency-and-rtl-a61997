// dvi_adder: read-path adder of the delta value indicator.
//
// The m-bit delta stored in the DVA is sign-extended to N bits (its top bit is
// copied into the upper N-M bits) and added to the value read from the data
// array, giving the current value of the word. The sum is taken modulo 2^N; the
// carry out is produced but has no use in the cache, because a delta was only
// ever stored when the new value equals stored + delta exactly. Purely
// combinational.
module dvi_adder #(
  parameter int unsigned N = 32,
  parameter int unsigned M = 4
) (
  input  logic [N-1:0] base,   // value read from the data array
  input  logic [M-1:0] delta,  // signed delta read from the DVA
  output logic [N-1:0] sum,    // current value
  output logic         carry   // carry out of the N-bit addition
);
  logic [N-1:0] delta_ext;
  logic [N:0]   full;

  always_comb begin
    delta_ext = {{(N-M){delta[M-1]}}, delta};
    full      = {1'b0, base} + {1'b0, delta_ext};
    sum       = full[N-1:0];
    carry     = full[N];
  end
endmodule
