// local_bitmap: the 1D local bitmap of the redundancy analyzer.
//
// ENTRIES rows, each holding a valid flag (VF), the row address (RAR) and
// column address (CAR) of a faulty word, and its hamming syndrome (HSR, one
// bit per data bit, set where the word failed).  The layout of an entry and
// the parallel comparison of every RAR/CAR against the fault being analysed
// follow the 1D-bitmap organisation of the scheme.
//
// Comparison (combinational, against cmp_ra / cmp_ca):
//   hit_both[i] - entry i is valid and matches both addresses
//   row_hit[i]  - entry i is valid and its RAR matches
//   col_hit[i]  - entry i is valid and its CAR matches
//
// Update (one operation per clock, selected by op, see bira_pkg::bm_op_e):
//   BM_MERGE   HSR of the hit_both entry |= wr_hs
//   BM_STORE   {cmp_ra, cmp_ca, wr_hs} into the lowest-indexed empty entry
//   BM_DEL_ROW free every entry whose RAR equals op_row (a spare row took it)
//   BM_CLR_COL clear HSR bit op_bit in every entry whose CAR equals op_col
//              (a spare column took it) and free entries whose HSR becomes 0
//   BM_CLEAR   free all entries
// The choice of these operations, the lowest-empty-entry rule and freeing an
// entry once its HSR is empty are this design's own.  rst (synchronous,
// active high) empties the bitmap; results appear the clock after the op.
module local_bitmap
  import bira_pkg::*;
#(
  parameter int unsigned ENTRIES  = DEF_ENTRIES,
  parameter int unsigned ROW_BITS = DEF_ROW_BITS,
  parameter int unsigned COL_BITS = DEF_COL_BITS,
  parameter int unsigned WORD_W   = DEF_WORD_W,
  localparam int unsigned BIT_IW  = (WORD_W > 1) ? $clog2(WORD_W) : 1
) (
  input  logic                clk,
  input  logic                rst,
  input  bm_op_e              op,
  input  logic [ROW_BITS-1:0] cmp_ra,
  input  logic [COL_BITS-1:0] cmp_ca,
  input  logic [WORD_W-1:0]   wr_hs,
  input  logic [ROW_BITS-1:0] op_row,
  input  logic [COL_BITS-1:0] op_col,
  input  logic [BIT_IW-1:0]   op_bit,
  output logic [ENTRIES-1:0]  vf,
  output logic [ROW_BITS-1:0] rar [ENTRIES],
  output logic [COL_BITS-1:0] car [ENTRIES],
  output logic [WORD_W-1:0]   hsr [ENTRIES],
  output logic [ENTRIES-1:0]  hit_both,
  output logic [ENTRIES-1:0]  row_hit,
  output logic [ENTRIES-1:0]  col_hit,
  output logic                full,
  output logic                empty
);

  // Parallel comparison.
  always_comb begin
    for (int i = 0; i < ENTRIES; i++) begin
      row_hit[i]  = vf[i] && (rar[i] == cmp_ra);
      col_hit[i]  = vf[i] && (car[i] == cmp_ca);
      hit_both[i] = row_hit[i] && col_hit[i];
    end
  end

  assign full  = &vf;
  assign empty = ~|vf;

  // Lowest-indexed empty entry, one-hot.
  logic [ENTRIES-1:0] free_sel;
  always_comb begin
    free_sel = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (!vf[i]) free_sel = ENTRIES'(1) << i;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      vf <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        rar[i] <= '0;
        car[i] <= '0;
        hsr[i] <= '0;
      end
    end else begin
      for (int i = 0; i < ENTRIES; i++) begin
        unique case (op)
          BM_MERGE: begin
            if (hit_both[i]) hsr[i] <= hsr[i] | wr_hs;
          end
          BM_STORE: begin
            if (free_sel[i]) begin
              vf[i]  <= 1'b1;
              rar[i] <= cmp_ra;
              car[i] <= cmp_ca;
              hsr[i] <= wr_hs;
            end
          end
          BM_DEL_ROW: begin
            if (vf[i] && rar[i] == op_row) vf[i] <= 1'b0;
          end
          BM_CLR_COL: begin
            if (vf[i] && car[i] == op_col) begin
              hsr[i][op_bit] <= 1'b0;
              if ((hsr[i] & ~(WORD_W'(1) << op_bit)) == '0) vf[i] <= 1'b0;
            end
          end
          BM_CLEAR: vf[i] <= 1'b0;
          default: ;
        endcase
      end
    end
  end

endmodule
