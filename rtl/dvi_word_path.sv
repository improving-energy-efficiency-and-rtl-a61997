// dvi_word_path: the per-word datapath of the delta value indicator (DVI).
//
// Each N-bit word of a cache line has a stored value (base) in the data array,
// a narrow flag (narrow-width value, NWV) and an M-bit signed delta in the
// delta value array (DVA). The current value of the word is
//   eff_base + sign_extend(delta),  eff_base = narrow ? {0, base[N/2-1:0]} : base
// and is produced by the read adder on rd_val.
//
// On a write of new_val (wr high) the subtractor forms new_val - eff_base and
// the small value detection logic checks whether it fits in M signed bits:
//   * small:     the data array is left untouched (its write enable blocked),
//                and the multiplexer passes the low M bits of the difference to
//                the DVA;
//   * not small: the multiplexer passes 0 to the DVA and the data array is
//                written with new_val. If the upper half of new_val is zero the
//                word is stored narrow: the narrow flag is set and only the
//                lower half is written (data_we_hi stays low).
// fill forces the second case; it is used when a line arrives from memory.
// Delta against the stored value, the mux and the blocked write enable follow
// the scheme; the per-word narrow flag and the order in which the narrow check
// is applied are this design's reading of how DVI sits on top of NWV.
// Purely combinational; the caller applies the enables to the arrays.
module dvi_word_path #(
  parameter int unsigned N = 32,
  parameter int unsigned M = 4
) (
  input  logic         fill,        // line fill: always write the data array
  input  logic         wr,          // this word is written (dirty, or fill)
  input  logic [N-1:0] new_val,     // value from the higher level / memory
  input  logic [N-1:0] base,        // value stored in the data array
  input  logic         narrow,      // stored narrow flag
  input  logic [M-1:0] delta,       // stored delta
  output logic [N-1:0] rd_val,      // current value of the word
  output logic         data_we_lo,  // write lower half of the data word
  output logic         data_we_hi,  // write upper half of the data word
  output logic         narrow_we,   // write the narrow flag
  output logic         narrow_new,  // new narrow flag
  output logic         dva_we,      // write the DVA entry
  output logic [M-1:0] dva_wdata,   // new DVA entry
  output logic         absorbed     // the write is absorbed by the DVA
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] eff_base;
  logic [N-1:0] diff;
  logic         borrow;
  logic         is_small;
  logic         data_we_raw;
  logic         carry_unused;
  logic         take_data;

  always_comb eff_base = narrow ? {{(N-H){1'b0}}, base[H-1:0]} : base;

  dvi_subtractor #(.N(N)) u_sub (
    .in1(eff_base), .in2(new_val), .out(diff), .borrow(borrow)
  );

  small_value_detect #(.N(N), .M(M)) u_det (
    .diff(diff), .borrow(borrow), .fits(is_small), .data_we(data_we_raw)
  );

  dvi_adder #(.N(N), .M(M)) u_add (
    .base(eff_base), .delta(delta), .sum(rd_val), .carry(carry_unused)
  );

  always_comb begin
    take_data  = wr & (fill | data_we_raw);
    absorbed   = wr & ~fill & is_small;
    // delta / zero multiplexer in front of the DVA
    dva_wdata  = take_data ? '0 : diff[M-1:0];
    dva_we     = wr;
    narrow_new = (new_val[N-1:H] == '0);
    narrow_we  = take_data;
    data_we_lo = take_data;
    data_we_hi = take_data & ~narrow_new;
  end
endmodule
