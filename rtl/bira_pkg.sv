// bira_pkg: shared constants and encodings of the built-in redundancy
// analyzer (BIRA).
//
// The default sizes are the analyzer configuration evaluated first for the
// design: an 8192 x 64-bit RAM (7 row-address bits, 6 column-address bits),
// one global spare row, one local spare column in each half of the array,
// and a 4-entry 1D local bitmap.
//
// Also defined here: the operations the controller issues to the bitmap and
// the controller's state encoding.  Both encodings are this design's own.
package bira_pkg;

  // Default configuration.
  localparam int unsigned DEF_ROW_BITS        = 7;   // n
  localparam int unsigned DEF_COL_BITS        = 6;   // m
  localparam int unsigned DEF_WORD_W          = 64;  // W
  localparam int unsigned DEF_SPARE_ROWS      = 1;   // r
  localparam int unsigned DEF_SPARE_COLS_HALF = 1;   // c/2
  localparam int unsigned DEF_ENTRIES         = 4;   // X

  // Longest analysis of one fault, in cycles, that the analyzer is
  // expected to stay within (critical analysis time of the reference
  // implementation).
  localparam int unsigned CAT_CYCLES = 39;

  // Length of the serial repair image of the Remapping Data Register:
  // per spare row a valid bit and the row address, per spare column a valid
  // bit, the column address and the bit position inside its half.
  function automatic int unsigned remap_image_w(int unsigned spare_rows,
                                                int unsigned spare_cols_half,
                                                int unsigned row_bits,
                                                int unsigned col_bits,
                                                int unsigned word_w);
    int unsigned pos_w;
    pos_w = (word_w / 2 > 1) ? $clog2(word_w / 2) : 1;
    return spare_rows * (1 + row_bits) + 2 * spare_cols_half * (1 + col_bits + pos_w);
  endfunction

  // Operations on the 1D local bitmap.  One is applied per clock.
  typedef enum logic [2:0] {
    BM_NOP     = 3'd0,  // keep contents
    BM_MERGE   = 3'd1,  // OR the syndrome into the entry whose RAR and CAR match
    BM_STORE   = 3'd2,  // write the fault into the lowest empty entry
    BM_DEL_ROW = 3'd3,  // invalidate every entry whose RAR equals op_row
    BM_CLR_COL = 3'd4,  // clear HSR bit op_bit of every entry whose CAR equals
                        // op_col; entries left with an all-zero HSR are freed
    BM_CLEAR   = 3'd5   // invalidate all entries
  } bm_op_e;

  // Controller states.
  typedef enum logic [3:0] {
    S_IDLE     = 4'd0,  // waiting for bira_en
    S_LISTEN   = 4'd1,  // BIST running, waiting for fail_h or test_done
    S_CLASSIFY = 4'd2,  // Phase-1: classify the captured fault
    S_SUB      = 4'd3,  // Subroutine: one allocation decision
    S_ROWFIX   = 4'd4,  // Subroutine: replace the faulty rows of an exhausted half
    S_SUB_NEXT = 4'd5,  // after an allocation: bitmap full / Phase-2 / resume
    S_PHASE2   = 4'd6,  // Phase-2: BIST done, drain the bitmap
    S_SHIFT    = 4'd7,  // shift the repair data to the fuse group
    S_DONE     = 4'd8,  // repairable, repair data delivered
    S_UNREP    = 4'd9   // unrepairable
  } bira_state_e;

endpackage
