// dvi_subtractor: the N-bit subtractor of the DVI write path.
//
// It subtracts the value held in the data array (in1) from the value arriving
// from the higher-level cache (in2), so that out is the delta that, added back
// to the stored value, gives the new one. borrow is set when in2 < in1 taken as
// unsigned numbers; {borrow, out} is then the exact (N+1)-bit two's-complement
// difference, which the small value detection logic examines. The operand
// order (new minus stored) is this design's reading: it is the order under which
// the read-path adder reproduces the new value. Purely combinational.
module dvi_subtractor #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] in1,    // stored value (data array)
  input  logic [N-1:0] in2,    // new value (from the higher-level cache)
  output logic [N-1:0] out,    // in2 - in1, modulo 2^N
  output logic         borrow  // in2 < in1 (unsigned)
);
  logic [N:0] diff;

  always_comb begin
    diff   = {1'b0, in2} - {1'b0, in1};
    out    = diff[N-1:0];
    borrow = diff[N];
  end
endmodule
