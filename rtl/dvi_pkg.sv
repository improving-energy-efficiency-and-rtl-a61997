// dvi_pkg: types shared by the delta-value-indicator (DVI) last-level cache.
//
// llc_op_e names the two requests the upper-level cache sends: a line read
// (an L1 miss) and a write-back of a dirty L1 line with a per-word dirty mask.
// dvi_wr_stat_t is the record the cache emits for every array write: how many
// words and bits each PCM array really had to change. The write counts and the
// SET/RESET split are the quantities the energy and lifetime arguments of the
// scheme are built on; the record itself is this design's own choice.
package dvi_pkg;

  typedef enum logic {
    OP_READ      = 1'b0,
    OP_WRITEBACK = 1'b1
  } llc_op_e;

  // One record per array write (a write-back hit or a line fill).
  typedef struct packed {
    logic        fill;              // 1: line fill from memory, 0: write-back
    logic [15:0] dirty_words;       // words offered for writing (MDB mask)
    logic [15:0] small_words;       // words absorbed by the delta value array
    logic [15:0] narrow_words;      // words stored narrow (upper half skipped)
    logic [15:0] data_words_written;// data-array words with at least one toggled bit
    logic [15:0] dva_words_written; // DVA entries with at least one toggled bit
    logic [15:0] data_set_bits;     // data-array bits switched 0 -> 1
    logic [15:0] data_reset_bits;   // data-array bits switched 1 -> 0
    logic [15:0] dva_set_bits;      // DVA bits switched 0 -> 1
    logic [15:0] dva_reset_bits;    // DVA bits switched 1 -> 0
  } dvi_wr_stat_t;

endpackage
