// smd_pkg: types and constants shared by the structure-measure-distance
// systolic array.
//
// The array computes edit (Levenshtein) distances in incremental form: every
// matrix element is carried as two differences to its neighbours, ivc (to the
// element above) and ihc (to the element on the left). With insertion and
// deletion both costing C and substitution costs that are never negative,
// both differences stay inside [-C, +C], so a small signed word holds them.
//
// Widths follow the implementation described for the array: substitution
// costs are limited to 0..7 (3 bits per array input) and the incremental
// values sent to the accumulators are 4 bits wide. Two's-complement coding of
// the 4-bit incremental values is this design's choice. The {valid, init} tag
// that travels with each matrix row is also this design's addition: init is
// the documented sequence-start signal, valid marks idle cycles so that the
// accumulators can tell a finished distance from a stream of empty slots.
package smd_pkg;

  // substitution cost word: costs 0..7
  localparam int unsigned SUB_W = 3;
  // incremental cost word (ivc, ihc): signed, range [-C, +C]
  localparam int unsigned INC_W = 4;
  // largest insertion/deletion cost C the incremental word can represent
  localparam int unsigned C_MAX = (1 << (INC_W - 1)) - 1;

  typedef logic [SUB_W-1:0]        sub_t;
  typedef logic signed [INC_W-1:0] inc_t;

  // control tag that moves along the wavefront with one matrix row
  typedef struct packed {
    logic valid;  // this slot carries a row of an input sequence
    logic init;   // this row is the first row of a new input sequence
  } tag_t;

endpackage
