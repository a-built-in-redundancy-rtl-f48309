// bmf_detector: finds where the next spare column should go.
//
// G_MC is the group of valid bitmap entries that share the column address
// held by the most entries.  B_MF is the data-bit position, inside G_MC, that
// is set in the most HSRs.  Where several bit positions have the same largest
// count, the least significant one wins, as the scheme prescribes.  Where
// several column addresses have the same number of entries, the one held by
// the lowest-indexed entry wins: that tie rule is this design's own.
//
// Only bit positions of a half whose spare columns are not used up
// (half_en[0] = left half, bits 0 .. WORD_W/2-1; half_en[1] = right half)
// compete for B_MF.  bmf_found is low when no enabled bit of G_MC is set.
//
// Purely combinational; the controller registers the result when it
// allocates the column.
module bmf_detector
  import bira_pkg::*;
#(
  parameter int unsigned ENTRIES  = DEF_ENTRIES,
  parameter int unsigned COL_BITS = DEF_COL_BITS,
  parameter int unsigned WORD_W   = DEF_WORD_W,
  localparam int unsigned BIT_IW  = (WORD_W > 1) ? $clog2(WORD_W) : 1,
  localparam int unsigned CNT_W   = $clog2(ENTRIES + 1)
) (
  input  logic [ENTRIES-1:0]  vf,
  input  logic [COL_BITS-1:0] car [ENTRIES],
  input  logic [WORD_W-1:0]   hsr [ENTRIES],
  input  logic [1:0]          half_en,
  output logic [ENTRIES-1:0]  gmc_mask,
  output logic [COL_BITS-1:0] gmc_col,
  output logic [BIT_IW-1:0]   bmf_bit,
  output logic                bmf_found
);

  localparam int unsigned HALF = WORD_W / 2;

  // Group size seen from every entry; keep the first largest.
  logic [CNT_W-1:0] grp_cnt [ENTRIES];
  logic [CNT_W-1:0] best_grp;

  always_comb begin
    best_grp = '0;
    gmc_col  = '0;
    for (int i = 0; i < ENTRIES; i++) begin
      grp_cnt[i] = '0;
      for (int j = 0; j < ENTRIES; j++) begin
        if (vf[i] && vf[j] && car[j] == car[i]) grp_cnt[i] = grp_cnt[i] + 1'b1;
      end
      if (grp_cnt[i] > best_grp) begin
        best_grp = grp_cnt[i];
        gmc_col  = car[i];
      end
    end
    for (int i = 0; i < ENTRIES; i++) begin
      gmc_mask[i] = (best_grp != '0) && vf[i] && (car[i] == gmc_col);
    end
  end

  // Fault count per bit position inside G_MC; keep the first (LSB) largest.
  logic [CNT_W-1:0] bit_cnt [WORD_W];
  logic [CNT_W-1:0] best_bit;

  always_comb begin
    best_bit = '0;
    bmf_bit  = '0;
    for (int b = 0; b < WORD_W; b++) begin
      bit_cnt[b] = '0;
      if (half_en[(b < HALF) ? 0 : 1]) begin
        for (int i = 0; i < ENTRIES; i++) begin
          if (gmc_mask[i] && hsr[i][b]) bit_cnt[b] = bit_cnt[b] + 1'b1;
        end
      end
      if (bit_cnt[b] > best_bit) begin
        best_bit = bit_cnt[b];
        bmf_bit  = BIT_IW'(b);
      end
    end
    bmf_found = (best_bit != '0);
  end

endmodule
