// bira_fsm: controller of the redundancy analyzer.
//
// Runs the three parts of the analysis algorithm on the 1D local bitmap:
//
// Phase-1 (BIST running).  A fault report (fail_h with {RA, CA, syndrome})
// is captured in LISTEN and classified the next clock:
//   - already repaired (row on a spare row, or every failing bit on a spare
//     column): ignored;
//   - RAR and CAR of one entry match: the syndrome is ORed into its HSR;
//   - RA matches a stored RAR but CA matches no stored CAR: a spare row
//     takes the row (no spare row left: unrepairable);
//   - otherwise: the fault is stored in an empty entry, and a full bitmap
//     calls the Subroutine.
// Phase-2 (test_done).  While the bitmap holds faults the Subroutine runs;
// an empty bitmap means the memory is repairable and the repair data are
// shifted out.
// Subroutine.  If a half whose spare columns are used up still has faulty
// entries, the distinct faulty rows of that half (N_FR) are all given spare
// rows when N_FR <= N_ASR, else the memory is unrepairable.  Otherwise, while
// spare columns remain, the bit position B_MF of group G_MC gets a spare
// column.  With no spare column left at all, one row of the bitmap (the
// lowest-indexed entry's) gets a spare row.  After each step a still-full
// bitmap reruns the Subroutine, else the BIST resumes (Phase-1) or Phase-2
// checks again.
//
// The algorithm follows the scheme; the state split, the one-allocation-
// per-clock pacing, the filtering of repaired faults, the "<=" in the N_FR
// test (the worked example repairs N_FR = N_ASR = 2) and the choice of the
// lowest-indexed entry are this design's own.
//
// Column allocation: the column address (G_MC) and bit (B_MF) go straight
// from the B_MF detector to the bitmap and the remapping register; this
// controller only issues the strobes (bm_op = BM_CLR_COL, alloc_col).
//
// BIST handshake: hold_l is high in LISTEN.  The clock after fail_h it is
// low and stays low until the analysis of that fault is over; the BIST must
// stay frozen from its fail_h pulse until it sees hold_l high again.  A fault
// needs 2 clocks at least.  test_done is sampled in LISTEN only (fail_h
// first).  bira_en starts the analyzer from IDLE.  After an unrepairable
// verdict hold_l goes high so the BIST can finish, and unrepairable stays
// set until rst.  shift_en is high for exactly the image length, with tdo
// valid in each of those clocks.  Concurrent assertions at the end of the
// module check these rules in simulation.
module bira_fsm
  import bira_pkg::*;
#(
  parameter int unsigned ENTRIES         = DEF_ENTRIES,
  parameter int unsigned ROW_BITS        = DEF_ROW_BITS,
  parameter int unsigned COL_BITS        = DEF_COL_BITS,
  parameter int unsigned WORD_W          = DEF_WORD_W,
  parameter int unsigned SPARE_ROWS      = DEF_SPARE_ROWS,
  parameter int unsigned SPARE_COLS_HALF = DEF_SPARE_COLS_HALF,
  localparam int unsigned HALF    = WORD_W / 2,
  localparam int unsigned RCNT_W  = (SPARE_ROWS > 0) ? $clog2(SPARE_ROWS + 1) : 1,
  localparam int unsigned CCNT_W  = (SPARE_COLS_HALF > 0) ? $clog2(SPARE_COLS_HALF + 1) : 1,
  localparam int unsigned IMG_W   = remap_image_w(SPARE_ROWS, SPARE_COLS_HALF, ROW_BITS, COL_BITS, WORD_W),
  localparam int unsigned SCNT_W  = $clog2(IMG_W + 1)
) (
  input  logic                clk,
  input  logic                rst,
  // BIST side
  input  logic                bira_en,
  input  logic                fail_h,
  input  logic                test_done,
  input  logic [ROW_BITS-1:0] in_ra,
  input  logic [COL_BITS-1:0] in_ca,
  input  logic [WORD_W-1:0]   in_hs,
  output logic                hold_l,
  output logic                shift_en,
  output logic                unrepairable,
  // bitmap
  output bm_op_e              bm_op,
  output logic [ROW_BITS-1:0] f_ra,
  output logic [COL_BITS-1:0] f_ca,
  output logic [WORD_W-1:0]   f_hs,
  output logic [ROW_BITS-1:0] bm_row,
  input  logic [ENTRIES-1:0]  vf,
  input  logic [ROW_BITS-1:0] rar [ENTRIES],
  input  logic [WORD_W-1:0]   hsr [ENTRIES],
  input  logic [ENTRIES-1:0]  hit_both,
  input  logic [ENTRIES-1:0]  row_hit,
  input  logic [ENTRIES-1:0]  col_hit,
  input  logic                bm_full,
  input  logic                bm_empty,
  // B_MF detector
  input  logic                bmf_found,
  // remapping data register
  output logic                alloc_row,
  output logic [ROW_BITS-1:0] alloc_row_addr,
  output logic                alloc_col,
  output logic                shift_start,
  output logic                shift,
  input  logic [RCNT_W-1:0]   n_asr,
  input  logic [CCNT_W-1:0]   ln_asc,
  input  logic [CCNT_W-1:0]   rn_asc,
  input  logic                row_repaired,
  input  logic [WORD_W-1:0]   col_mask
);

  bira_state_e       state, state_n;
  logic              phase2, phase2_n;
  logic              f_skip;
  logic              rf_half, rf_half_n;
  logic [SCNT_W-1:0] scnt;

  // Entries holding faults in the left / right half of the word.
  logic [ENTRIES-1:0] left_set, right_set, rf_set;
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      left_set[i]  = vf[i] && ((hsr[i] & ((WORD_W'(1) << HALF) - 1'b1)) != '0);
      right_set[i] = vf[i] && ((hsr[i] >> HALF) != '0);
    end
  end

  logic left_ex, right_ex;
  assign left_ex  = (ln_asc == '0) && (left_set != '0);
  assign right_ex = (rn_asc == '0) && (right_set != '0);
  assign rf_set   = rf_half_n ? right_set : left_set;

  // N_FR: distinct row addresses among the entries of the selected half.
  int unsigned n_fr;
  always_comb begin
    n_fr = 0;
    for (int i = 0; i < ENTRIES; i++) begin
      logic dup;
      dup = 1'b0;
      for (int j = 0; j < i; j++) begin
        if (rf_set[j] && rar[j] == rar[i]) dup = 1'b1;
      end
      if (rf_set[i] && !dup) n_fr++;
    end
  end

  // Lowest-indexed entry of a set.
  function automatic logic [ROW_BITS-1:0] first_row(logic [ENTRIES-1:0] set,
                                                   logic [ROW_BITS-1:0] rows [ENTRIES]);
    first_row = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (set[i]) first_row = rows[i];
    end
  endfunction

  always_comb begin
    state_n        = state;
    phase2_n       = phase2;
    rf_half_n      = rf_half;
    bm_op          = BM_NOP;
    bm_row         = f_ra;
    alloc_row      = 1'b0;
    alloc_row_addr = f_ra;
    alloc_col      = 1'b0;
    shift_start    = 1'b0;
    shift          = 1'b0;

    unique case (state)
      S_IDLE: if (bira_en) state_n = S_LISTEN;

      S_LISTEN: begin
        if (fail_h)         state_n = S_CLASSIFY;
        else if (test_done) begin
          phase2_n = 1'b1;
          state_n  = S_PHASE2;
        end
      end

      S_CLASSIFY: begin
        if (f_skip) begin
          state_n = S_LISTEN;
        end else if (hit_both != '0) begin
          bm_op   = BM_MERGE;
          state_n = S_LISTEN;
        end else if (row_hit != '0 && col_hit == '0) begin
          if (n_asr != '0) begin
            alloc_row = 1'b1;
            bm_op     = BM_DEL_ROW;
            state_n   = S_LISTEN;
          end else begin
            state_n = S_UNREP;
          end
        end else begin
          bm_op   = BM_STORE;
          state_n = S_SUB_NEXT;
        end
      end

      S_SUB: begin
        if (ln_asc != '0 || rn_asc != '0) begin
          if (left_ex || right_ex) begin
            rf_half_n = !left_ex;
            state_n   = (n_fr <= 32'(n_asr)) ? S_ROWFIX : S_UNREP;
          end else if (bmf_found) begin
            alloc_col = 1'b1;
            bm_op     = BM_CLR_COL;
            state_n   = S_SUB_NEXT;
          end else begin
            state_n = S_UNREP;
          end
        end else if (n_asr != '0) begin
          alloc_row      = 1'b1;
          alloc_row_addr = first_row(vf, rar);
          bm_row         = first_row(vf, rar);
          bm_op          = BM_DEL_ROW;
          state_n        = S_SUB_NEXT;
        end else begin
          state_n = S_UNREP;
        end
      end

      S_ROWFIX: begin
        if (rf_set != '0) begin
          alloc_row      = 1'b1;
          alloc_row_addr = first_row(rf_set, rar);
          bm_row         = first_row(rf_set, rar);
          bm_op          = BM_DEL_ROW;
        end else begin
          state_n = S_SUB_NEXT;
        end
      end

      S_SUB_NEXT: begin
        if (phase2)       state_n = S_PHASE2;
        else if (bm_full) state_n = S_SUB;
        else              state_n = S_LISTEN;
      end

      S_PHASE2: begin
        if (bm_empty) begin
          shift_start = 1'b1;
          state_n     = S_SHIFT;
        end else begin
          state_n = S_SUB;
        end
      end

      S_SHIFT: begin
        shift = 1'b1;
        if (scnt == SCNT_W'(IMG_W - 1)) state_n = S_DONE;
      end

      S_DONE, S_UNREP: ;

      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      phase2  <= 1'b0;
      rf_half <= 1'b0;
      scnt    <= '0;
      f_ra    <= '0;
      f_ca    <= '0;
      f_hs    <= '0;
      f_skip  <= 1'b0;
    end else begin
      state   <= state_n;
      phase2  <= phase2_n;
      rf_half <= rf_half_n;
      if (state == S_SHIFT) scnt <= scnt + 1'b1;
      else                  scnt <= '0;
      // Capture the fault report; drop bits already on spare columns.
      if (state == S_LISTEN && fail_h) begin
        f_ra   <= in_ra;
        f_ca   <= in_ca;
        f_hs   <= in_hs & ~col_mask;
        f_skip <= row_repaired || ((in_hs & ~col_mask) == '0);
      end
    end
  end

  assign hold_l       = (state == S_IDLE) || (state == S_LISTEN) || (state == S_SHIFT) ||
                        (state == S_DONE) || (state == S_UNREP);
  assign shift_en     = (state == S_SHIFT);
  assign unrepairable = (state == S_UNREP);

  // Handshake rules.
  // The BIST reports a fault only while it is released.
  a_fail_while_released: assert property (@(posedge clk) disable iff (rst)
    fail_h |-> hold_l)
    else $error("fail_h while the BIST is held");
  // A fault report taken while listening holds the BIST from the next clock.
  a_hold_after_fail: assert property (@(posedge clk) disable iff (rst)
    (state == S_LISTEN && fail_h) |=> !hold_l)
    else $error("hold_l not lowered after fail_h");
  // The verdicts exclude each other, and "unrepairable" is kept.
  a_verdicts: assert property (@(posedge clk) disable iff (rst)
    !(shift_en && unrepairable));
  a_unrep_sticky: assert property (@(posedge clk) disable iff (rst)
    unrepairable |=> unrepairable);

endmodule
