// remap_register: the Remapping Data Register of the redundancy analyzer.
//
// Keeps every spare element allocated so far and shifts them, once the
// analysis has succeeded, to the fuse group of the repaired RAM.  Spare rows
// are global (one row address each).  Spare columns are local: SPARE_COLS_HALF
// of them serve the left half of the word (data bits 0 .. WORD_W/2-1) and as
// many the right half; a spare column replaces one bit line, named by a
// column address and a bit position inside its half.
//
// Beyond storing, this design lets the register answer two questions for the
// fault being reported (chk_ra / chk_ca):
//   row_repaired - its row already went to a spare row
//   col_mask     - data bits of that word whose bit line already went to a
//                  spare column
// so that the controller ignores faults that are already repaired while the
// BIST keeps testing the unrepaired array.  The counts of free spares (N_ASR,
// LN_ASC, RN_ASC of the algorithm) come from here as well.
//
// Allocation: alloc_row / alloc_col for one clock write the next free slot.
// Shift-out: shift_start rewinds, then every clock with shift high moves to
// the next bit; tdo shows the current bit.  Serial image, bit 0 first:
//   for each spare row:          valid, row address (LSB first)
//   for each left spare column:  valid, column address, bit position
//   for each right spare column: valid, column address, bit position
// The image layout and bit order are this design's own.  rst (synchronous,
// active high) frees all spares.  SPARE_ROWS or SPARE_COLS_HALF may be 0
// (configurations without spare rows or without spare columns).
module remap_register
  import bira_pkg::*;
#(
  parameter int unsigned SPARE_ROWS      = DEF_SPARE_ROWS,
  parameter int unsigned SPARE_COLS_HALF = DEF_SPARE_COLS_HALF,
  parameter int unsigned ROW_BITS        = DEF_ROW_BITS,
  parameter int unsigned COL_BITS        = DEF_COL_BITS,
  parameter int unsigned WORD_W          = DEF_WORD_W,
  localparam int unsigned BIT_IW  = (WORD_W > 1) ? $clog2(WORD_W) : 1,
  localparam int unsigned HALF    = WORD_W / 2,
  localparam int unsigned POS_W   = (HALF > 1) ? $clog2(HALF) : 1,
  localparam int unsigned ROW_REC = 1 + ROW_BITS,
  localparam int unsigned COL_REC = 1 + COL_BITS + POS_W,
  localparam int unsigned IMG_W   = remap_image_w(SPARE_ROWS, SPARE_COLS_HALF, ROW_BITS, COL_BITS, WORD_W),
  localparam int unsigned PTR_W   = (IMG_W > 1) ? $clog2(IMG_W) : 1,
  localparam int unsigned RCNT_W  = (SPARE_ROWS > 0) ? $clog2(SPARE_ROWS + 1) : 1,
  localparam int unsigned CCNT_W  = (SPARE_COLS_HALF > 0) ? $clog2(SPARE_COLS_HALF + 1) : 1,
  // Storage is never sized zero; a kind of spare that is absent keeps one
  // slot that is never written.
  localparam int unsigned RS      = (SPARE_ROWS > 0) ? SPARE_ROWS : 1,
  localparam int unsigned CS      = (SPARE_COLS_HALF > 0) ? SPARE_COLS_HALF : 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                alloc_row,
  input  logic [ROW_BITS-1:0] alloc_row_addr,
  input  logic                alloc_col,
  input  logic [COL_BITS-1:0] alloc_col_addr,
  input  logic [BIT_IW-1:0]   alloc_bit,
  input  logic [ROW_BITS-1:0] chk_ra,
  input  logic [COL_BITS-1:0] chk_ca,
  input  logic                shift_start,
  input  logic                shift,
  output logic [RCNT_W-1:0]   n_asr,
  output logic [CCNT_W-1:0]   ln_asc,
  output logic [CCNT_W-1:0]   rn_asc,
  output logic                row_repaired,
  output logic [WORD_W-1:0]   col_mask,
  output logic [IMG_W-1:0]    image,
  output logic                tdo
);

  logic [RCNT_W-1:0]   rows_used;
  logic [CCNT_W-1:0]   cols_used [2];
  logic                row_v   [RS];
  logic [ROW_BITS-1:0] row_a   [RS];
  logic                col_v   [2][CS];
  logic [COL_BITS-1:0] col_a   [2][CS];
  logic [POS_W-1:0]    col_p   [2][CS];
  logic [PTR_W-1:0]    ptr;

  assign n_asr  = RCNT_W'(SPARE_ROWS) - rows_used;
  assign ln_asc = CCNT_W'(SPARE_COLS_HALF) - cols_used[0];
  assign rn_asc = CCNT_W'(SPARE_COLS_HALF) - cols_used[1];

  // Which half and which position inside it the allocated bit belongs to.
  logic             alloc_half;
  logic [POS_W-1:0] alloc_pos;
  always_comb begin
    alloc_half = (32'(alloc_bit) >= HALF);
    alloc_pos  = alloc_half ? POS_W'(32'(alloc_bit) - HALF) : POS_W'(alloc_bit);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rows_used <= '0;
      cols_used <= '{default: '0};
      row_v     <= '{default: 1'b0};
      row_a     <= '{default: '0};
      col_v     <= '{default: 1'b0};
      col_a     <= '{default: '0};
      col_p     <= '{default: '0};
      ptr       <= '0;
    end else begin
      if (alloc_row && n_asr != '0) begin
        for (int s = 0; s < SPARE_ROWS; s++) begin
          if (RCNT_W'(s) == rows_used) begin
            row_v[s] <= 1'b1;
            row_a[s] <= alloc_row_addr;
          end
        end
        rows_used <= rows_used + 1'b1;
      end
      if (alloc_col && cols_used[alloc_half] != CCNT_W'(SPARE_COLS_HALF)) begin
        for (int s = 0; s < SPARE_COLS_HALF; s++) begin
          if (CCNT_W'(s) == cols_used[alloc_half]) begin
            col_v[alloc_half][s] <= 1'b1;
            col_a[alloc_half][s] <= alloc_col_addr;
            col_p[alloc_half][s] <= alloc_pos;
          end
        end
        cols_used[alloc_half] <= cols_used[alloc_half] + 1'b1;
      end
      if (shift_start)  ptr <= '0;
      else if (shift)   ptr <= ptr + 1'b1;
    end
  end

  // Repaired-element lookup for the reported fault.
  always_comb begin
    row_repaired = 1'b0;
    for (int s = 0; s < SPARE_ROWS; s++) begin
      if (row_v[s] && row_a[s] == chk_ra) row_repaired = 1'b1;
    end
    col_mask = '0;
    for (int h = 0; h < 2; h++) begin
      for (int s = 0; s < SPARE_COLS_HALF; s++) begin
        if (col_v[h][s] && col_a[h][s] == chk_ca) begin
          col_mask[h * HALF + 32'(col_p[h][s])] = 1'b1;
        end
      end
    end
  end

  // Serial image.
  always_comb begin
    image = '0;
    for (int s = 0; s < SPARE_ROWS; s++) begin
      image[s * ROW_REC +: ROW_REC] = {row_a[s], row_v[s]};
    end
    for (int h = 0; h < 2; h++) begin
      for (int s = 0; s < SPARE_COLS_HALF; s++) begin
        image[SPARE_ROWS * ROW_REC + (h * SPARE_COLS_HALF + s) * COL_REC +: COL_REC] =
          {col_p[h][s], col_a[h][s], col_v[h][s]};
      end
    end
  end

  assign tdo = image[ptr];

endmodule
