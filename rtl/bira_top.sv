// bira_top: built-in redundancy analyzer (BIRA) for a word-oriented RAM
// with 2D redundancy, using a 1D local bitmap.
//
// The RAM is split into a left and a right subarray.  Spare rows are global:
// one replaces a row in both halves.  Spare columns are local: each half has
// its own and can only replace a bit line of that half.  While a BIST tests
// the RAM, every failing word is reported here; the analyzer records it in a
// small bitmap of ENTRIES words (valid flag, row address, column address,
// hamming syndrome), decides how to spend the spares, and keeps the BIST
// frozen (hold_l low) while it does.  When the BIST is done and every fault
// is covered, the allocated spare addresses are shifted to the fuse group
// (shift_en, tdo); if the spares run out first, unrepairable is raised.
//
// Inside, as in the scheme's block diagram: the controller (bira_fsm), the
// 1D local bitmap (local_bitmap), the B_MF detector (bmf_detector) and the
// Remapping Data Register (remap_register).
//
// Interface: syndrome = {row address [ROW_BITS], column address [COL_BITS],
// hamming syndrome [WORD_W]}, valid in the clock fail_h is high; syndrome bit
// b is set where data bit b of the word read differs from the expected one.
// Data bits 0 .. WORD_W/2-1 lie in the left subarray.  The packing of that
// bus, the synchronous active-high rst and the handshake details (see
// bira_fsm) are this design's choices.  Defaults: 8192 x 64-bit RAM
// (n = 7, m = 6), 1 spare row, 1 spare column per half, 4 bitmap entries.
module bira_top
  import bira_pkg::*;
#(
  parameter int unsigned ROW_BITS        = DEF_ROW_BITS,
  parameter int unsigned COL_BITS        = DEF_COL_BITS,
  parameter int unsigned WORD_W          = DEF_WORD_W,
  parameter int unsigned SPARE_ROWS      = DEF_SPARE_ROWS,
  parameter int unsigned SPARE_COLS_HALF = DEF_SPARE_COLS_HALF,
  parameter int unsigned ENTRIES         = DEF_ENTRIES,
  localparam int unsigned SYN_W = ROW_BITS + COL_BITS + WORD_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             bira_en,
  input  logic             fail_h,
  input  logic             test_done,
  input  logic [SYN_W-1:0] syndrome,
  output logic             hold_l,
  output logic             shift_en,
  output logic             unrepairable,
  output logic             tdo
);

  localparam int unsigned BIT_IW = (WORD_W > 1) ? $clog2(WORD_W) : 1;
  localparam int unsigned RCNT_W = (SPARE_ROWS > 0) ? $clog2(SPARE_ROWS + 1) : 1;
  localparam int unsigned CCNT_W = (SPARE_COLS_HALF > 0) ? $clog2(SPARE_COLS_HALF + 1) : 1;

  logic [ROW_BITS-1:0] in_ra;
  logic [COL_BITS-1:0] in_ca;
  logic [WORD_W-1:0]   in_hs;
  assign {in_ra, in_ca, in_hs} = syndrome;

  // controller <-> bitmap
  bm_op_e              bm_op;
  logic [ROW_BITS-1:0] f_ra, bm_row;
  logic [COL_BITS-1:0] f_ca;
  logic [WORD_W-1:0]   f_hs;
  logic [ENTRIES-1:0]  vf, hit_both, row_hit, col_hit;
  logic [ROW_BITS-1:0] rar [ENTRIES];
  logic [COL_BITS-1:0] car [ENTRIES];
  logic [WORD_W-1:0]   hsr [ENTRIES];
  logic                bm_full, bm_empty;
  // B_MF detector (half_en from the free-column counts)
  logic [1:0]          half_en;
  logic [COL_BITS-1:0] gmc_col;
  logic [BIT_IW-1:0]   bmf_bit;
  logic                bmf_found;
  // controller <-> remapping data register
  logic                alloc_row, alloc_col, shift_start, shift;
  logic [ROW_BITS-1:0] alloc_row_addr;
  logic [RCNT_W-1:0]   n_asr;
  logic [CCNT_W-1:0]   ln_asc, rn_asc;
  logic                row_repaired;
  logic [WORD_W-1:0]   col_mask;

  bira_fsm #(
    .ENTRIES(ENTRIES), .ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS), .WORD_W(WORD_W),
    .SPARE_ROWS(SPARE_ROWS), .SPARE_COLS_HALF(SPARE_COLS_HALF)
  ) u_fsm (
    .clk, .rst, .bira_en, .fail_h, .test_done, .in_ra, .in_ca, .in_hs,
    .hold_l, .shift_en, .unrepairable,
    .bm_op, .f_ra, .f_ca, .f_hs, .bm_row,
    .vf, .rar, .hsr, .hit_both, .row_hit, .col_hit, .bm_full, .bm_empty,
    .bmf_found,
    .alloc_row, .alloc_row_addr, .alloc_col,
    .shift_start, .shift, .n_asr, .ln_asc, .rn_asc, .row_repaired, .col_mask
  );

  local_bitmap #(
    .ENTRIES(ENTRIES), .ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS), .WORD_W(WORD_W)
  ) u_bitmap (
    .clk, .rst, .op(bm_op), .cmp_ra(f_ra), .cmp_ca(f_ca), .wr_hs(f_hs),
    .op_row(bm_row), .op_col(gmc_col), .op_bit(bmf_bit),
    .vf, .rar, .car, .hsr, .hit_both, .row_hit, .col_hit,
    .full(bm_full), .empty(bm_empty)
  );

  // The detector searches only halves that still have a free spare column.
  assign half_en = {rn_asc != '0, ln_asc != '0};

  bmf_detector #(
    .ENTRIES(ENTRIES), .COL_BITS(COL_BITS), .WORD_W(WORD_W)
  ) u_bmf (
    .vf, .car, .hsr, .half_en, .gmc_mask(), .gmc_col, .bmf_bit, .bmf_found
  );

  remap_register #(
    .SPARE_ROWS(SPARE_ROWS), .SPARE_COLS_HALF(SPARE_COLS_HALF),
    .ROW_BITS(ROW_BITS), .COL_BITS(COL_BITS), .WORD_W(WORD_W)
  ) u_remap (
    .clk, .rst, .alloc_row, .alloc_row_addr, .alloc_col, .alloc_col_addr(gmc_col),
    .alloc_bit(bmf_bit),
    .chk_ra(in_ra), .chk_ca(in_ca), .shift_start, .shift,
    .n_asr, .ln_asc, .rn_asc, .row_repaired, .col_mask, .image(), .tdo
  );

endmodule
