// Shared types of the single-pass connected components analysis (CCA) core.
// sel_e encodes the outcome of the label selection decision tree: the
// current pixel is background (ZERO), starts a region on this row (NEW) or
// takes the current-row label of neighbour A, B, C or D.
// state_e is the row sequencer of cca_top: pixels are accepted in ST_ROW;
// the other states are the end-of-row work (merger stack unwinding, read-out
// of completed regions, table swap) and the end-of-frame flush.
package cca_pkg;
  typedef enum logic [2:0] {
    SEL_ZERO,
    SEL_NEW,
    SEL_A,
    SEL_B,
    SEL_C,
    SEL_D
  } sel_e;

  typedef enum logic [2:0] {
    ST_LOAD0,  // prime neighbour C with column 0 of the previous row
    ST_LOAD1,  // shift in column 1; A, B, C now hold columns -1, 0, 1
    ST_ROW,    // one pixel per accepted cycle
    ST_POP,    // unwind the merger stack into the current-row merger table
    ST_SCAN,   // emit the previous-row regions that were not continued
    ST_FLUSH   // after the last row: emit every region still open
  } state_e;
endpackage
