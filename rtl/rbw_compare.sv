// rbw_compare: read-before-write comparison of a PCM word or line.
//
// The stored bits (old_bits) are read before a write and compared with the bits
// to be written (new_bits). Only differing bits are toggled: toggle is the
// per-bit write mask handed to the array. The toggles are split by direction
// into SET operations (a cell going from 0 to 1) and RESET operations (1 to 0),
// because the two cost different energy in PCM; set_cnt and reset_cnt count
// them. Which direction is called SET follows the first definition the
// scheme's energy model gives (0 -> 1). Purely combinational.
module rbw_compare #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0]           old_bits,
  input  logic [W-1:0]           new_bits,
  output logic [W-1:0]           toggle,     // bits that must be written
  output logic [$clog2(W+1)-1:0] set_cnt,    // 0 -> 1 transitions
  output logic [$clog2(W+1)-1:0] reset_cnt,  // 1 -> 0 transitions
  output logic                   any         // at least one bit changes
);
  always_comb begin
    toggle    = old_bits ^ new_bits;
    any       = |toggle;
    set_cnt   = '0;
    reset_cnt = '0;
    for (int i = 0; i < W; i++) begin
      if (!old_bits[i] &&  new_bits[i]) set_cnt++;
      if ( old_bits[i] && !new_bits[i]) reset_cnt++;
    end
  end
endmodule
