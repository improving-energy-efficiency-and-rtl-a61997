// small_value_detect: decides whether a difference fits in an m-bit delta.
//
// The difference is the (N+1)-bit two's-complement value {borrow, diff}. It
// fits (is "small") when it lies in -2^(M-1) .. 2^(M-1)-1, i.e. when the borrow and the
// bits diff[N-1:M-1] are all zeros (small positive delta) or all ones (small
// negative delta). One reduction AND tree and one reduction NOR tree detect the
// two cases, as in the two halves of the detection logic; when either holds,
// the data-array write enable is blocked (data_we low) and the delta is written
// to the delta value indicator instead. Including the sign bit diff[M-1] in the
// comparison is what makes the range exact. The low M-1 bits of diff are the
// delta itself and play no part in the decision. Purely combinational.
module small_value_detect #(
  parameter int unsigned N = 32,
  parameter int unsigned M = 4
) (
  input  logic [N-1:0] diff,
  input  logic         borrow,
  output logic         fits,    // delta fits in M signed bits
  output logic         data_we  // write enable for the data array (not small)
);
  logic [N-M+1:0] upper;  // borrow and diff[N-1:M-1]
  logic all_zero, all_one;

  always_comb begin
    upper    = {borrow, diff[N-1:M-1]};
    all_zero = ~|upper;
    all_one  = &upper;
    fits     = all_zero | all_one;
    data_we  = ~fits;
  end
endmodule
