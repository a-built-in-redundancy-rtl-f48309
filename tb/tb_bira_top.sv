// tb_bira_top: end-to-end test of the redundancy analyzer.
//
// A BIST stand-in sweeps a small RAM (16 rows x 8 column addresses x 8-bit
// words, two read passes, as a march test reads each word several times)
// into which random faults are injected: single cells, row twin-bits, column
// twin-bits and 2x2 clusters.  Every failing read is reported on
// fail_h / syndrome and the stand-in stays frozen until hold_l is high; at
// the end it raises test_done and collects the serial repair data.
//
// Checks per trial:
//   - the verdict and the shifted-out repair data equal those of a reference
//     model of the analysis algorithm written here from its description;
//   - when repairable, every injected faulty cell lies on a repaired row or
//     a repaired bit line (independent of any algorithm);
//   - the BIST is never held longer than 39 clocks for one fault.
// Each mechanism of the analyzer must occur at least once over the run; they
// are counted in the reference model, whose every decision shows up in the
// repair data the analyzer must match:
// merging into an HSR, an immediate spare row for a second word of a stored
// row, storing, the Subroutine called by a full bitmap, a spare column at
// B_MF, spare rows for an exhausted half (N_FR), a spare row with all spare
// columns gone, the Subroutine in Phase-2, ignoring an already repaired
// fault, both verdicts.
module tb_bira_top;
  import bira_pkg::*;
  localparam int unsigned RB = 4, CB = 3, W = 8, R = 2, CH = 1, E = 4;
  localparam int unsigned NROW = 1 << RB, NCOL = 1 << CB, HALF = W / 2;
  localparam int unsigned POS_W = $clog2(HALF);
  localparam int unsigned IMG_W = remap_image_w(R, CH, RB, CB, W);
  localparam int unsigned TRIALS = 600, PASSES = 2;

  logic clk = 0, rst, bira_en, fail_h, test_done;
  logic [RB+CB+W-1:0] syndrome;
  logic hold_l, shift_en, unrepairable, tdo;

  bira_top #(.ROW_BITS(RB), .COL_BITS(CB), .WORD_W(W), .SPARE_ROWS(R),
             .SPARE_COLS_HALF(CH), .ENTRIES(E)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- faults
  logic [W-1:0] fmap [NROW][NCOL];

  task automatic inject(int n);
    for (int r = 0; r < NROW; r++) for (int c = 0; c < NCOL; c++) fmap[r][c] = '0;
    repeat (n) begin
      int r = $urandom_range(0, NROW - 2), c = $urandom_range(0, NCOL - 1);
      int b = $urandom_range(0, W - 2), kind = $urandom_range(0, 9);
      fmap[r][c][b] = 1'b1;
      if (kind inside {4, 5} || kind == 8) fmap[r][c][b + 1] = 1'b1;      // row twin / cluster
      if (kind inside {6, 7} || kind == 8) fmap[r + 1][c][b] = 1'b1;      // column twin / cluster
      if (kind == 8) fmap[r + 1][c][b + 1] = 1'b1;
    end
  endtask

  // ------------------------------------------------------- reference model
  bit            m_v [E];
  int            m_r [E], m_c [E];
  logic [W-1:0]  m_h [E];
  int            rows_q [$];
  int            colc_q [2][$], colb_q [2][$];
  bit            m_unrep;
  // Mechanism counts, taken in the reference model.
  int n_merge, n_rowhit, n_store, n_sub_full, n_col, n_nfr, n_rowonly, n_ph2sub,
      n_ignored, n_unrep, n_rep;

  function automatic bit m_full();
    foreach (m_v[i]) if (!m_v[i]) return 0;
    return 1;
  endfunction
  function automatic bit m_empty();
    foreach (m_v[i]) if (m_v[i]) return 0;
    return 1;
  endfunction
  function automatic bit in_half(logic [W-1:0] h, int half);
    for (int b = half * HALF; b < (half + 1) * HALF; b++) if (h[b]) return 1;
    return 0;
  endfunction
  function automatic void take_row(int row);
    rows_q.push_back(row);
    foreach (m_v[i]) if (m_v[i] && m_r[i] == row) m_v[i] = 0;
  endfunction

  function automatic void m_subroutine();
    int lasc = CH - colc_q[0].size(), rasc = CH - colc_q[1].size();
    if (lasc > 0 || rasc > 0) begin
      int ex = -1;
      for (int hh = 0; hh < 2; hh++) begin
        if (CH - colc_q[hh].size() == 0)
          foreach (m_v[i]) if (m_v[i] && in_half(m_h[i], hh)) ex = hh;
      end
      if (ex >= 0) begin
        int rws [$];
        foreach (m_v[i]) if (m_v[i] && in_half(m_h[i], ex)) begin
          int dup [$] = rws.find_index with (item == m_r[i]);
          if (dup.size() == 0) rws.push_back(m_r[i]);
        end
        if (rws.size() > R - rows_q.size()) m_unrep = 1;
        else foreach (rws[k]) begin take_row(rws[k]); n_nfr++; end
      end else begin
        int best = 0, gcol = 0, bbest = 0, bmf = -1;
        foreach (m_v[i]) if (m_v[i]) begin
          int n = 0;
          foreach (m_v[j]) if (m_v[j] && m_c[j] == m_c[i]) n++;
          if (n > best) begin best = n; gcol = m_c[i]; end
        end
        for (int b = 0; b < W; b++) begin
          int n = 0;
          if (CH - colc_q[b / HALF].size() == 0) continue;
          foreach (m_v[i]) if (m_v[i] && m_c[i] == gcol && m_h[i][b]) n++;
          if (n > bbest) begin bbest = n; bmf = b; end
        end
        if (bmf < 0) m_unrep = 1;
        else begin
          n_col++;
          colc_q[bmf / HALF].push_back(gcol);
          colb_q[bmf / HALF].push_back(bmf % HALF);
          foreach (m_v[i]) if (m_v[i] && m_c[i] == gcol) begin
            m_h[i][bmf] = 1'b0;
            if (m_h[i] == 0) m_v[i] = 0;
          end
        end
      end
    end else if (rows_q.size() < R) begin
      foreach (m_v[i]) if (m_v[i]) begin take_row(m_r[i]); n_rowonly++; break; end
    end else m_unrep = 1;
  endfunction

  function automatic void m_fault(int ra, int ca, logic [W-1:0] hs);
    int hit = -1;
    bit rowhit = 0, colhit = 0;
    if (m_unrep) return;
    foreach (rows_q[k]) if (rows_q[k] == ra) begin n_ignored++; return; end
    for (int hh = 0; hh < 2; hh++)
      foreach (colc_q[hh][k]) if (colc_q[hh][k] == ca) hs[hh * HALF + colb_q[hh][k]] = 1'b0;
    if (hs == 0) begin n_ignored++; return; end
    foreach (m_v[i]) if (m_v[i]) begin
      if (m_r[i] == ra && m_c[i] == ca) hit = i;
      if (m_r[i] == ra) rowhit = 1;
      if (m_c[i] == ca) colhit = 1;
    end
    if (hit >= 0) begin m_h[hit] |= hs; n_merge++; end
    else if (rowhit && !colhit) begin
      if (rows_q.size() < R) begin take_row(ra); n_rowhit++; end
      else m_unrep = 1;
    end else begin
      foreach (m_v[i]) if (!m_v[i]) begin
        m_v[i] = 1; m_r[i] = ra; m_c[i] = ca; m_h[i] = hs;
        break;
      end
      n_store++;
      while (m_full() && !m_unrep) begin m_subroutine(); n_sub_full++; end
    end
  endfunction

  function automatic logic [IMG_W-1:0] m_image();
    logic [IMG_W-1:0] img = '0;
    int p = 0;
    for (int s = 0; s < R; s++) begin
      img[p] = s < rows_q.size();
      if (s < rows_q.size()) img[p + 1 +: RB] = RB'(rows_q[s]);
      p += 1 + RB;
    end
    for (int hh = 0; hh < 2; hh++) for (int s = 0; s < CH; s++) begin
      img[p] = s < colc_q[hh].size();
      if (s < colc_q[hh].size()) begin
        img[p + 1 +: CB]         = CB'(colc_q[hh][s]);
        img[p + 1 + CB +: POS_W] = POS_W'(colb_q[hh][s]);
      end
      p += 1 + CB + POS_W;
    end
    return img;
  endfunction

  // ------------------------------------------------------------ BIST model
  task automatic run_trial(int nf);
    bit done = 0;
    int held, t;
    logic [IMG_W-1:0] img;
    int k;
    inject(nf);
    m_unrep = 0;
    rows_q.delete();
    for (int hh = 0; hh < 2; hh++) begin colc_q[hh].delete(); colb_q[hh].delete(); end
    foreach (m_v[i]) m_v[i] = 0;

    rst = 1; bira_en = 0; fail_h = 0; test_done = 0; syndrome = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0; bira_en = 1;
    @(posedge clk); #1;
    for (int p = 0; p < PASSES; p++)
      for (int r = 0; r < NROW; r++)
        for (int c = 0; c < NCOL; c++) begin
          if (fmap[r][c] != 0) begin
            fail_h = 1;
            syndrome = {RB'(r), CB'(c), fmap[r][c]};
            m_fault(r, c, fmap[r][c]);
          end
          @(posedge clk); #1;
          if (fail_h) begin
            fail_h = 0;
            held = 0;
            while (!hold_l && held < 100) begin @(posedge clk); #1; held++; end
            checks++;
            if (held > CAT_CYCLES) begin
              failures++; $display("FAIL held %0d clocks", held);
            end
          end
        end
    while (!m_empty() && !m_unrep) begin m_subroutine(); n_ph2sub++; end
    test_done = 1;
    @(posedge clk); #1;
    test_done = 0;
    img = '0; k = 0; t = 0;
    while (!unrepairable && !(k > 0 && !shift_en) && t < 2000) begin
      if (shift_en) begin img[k] = tdo; k++; end
      @(posedge clk); #1; t++;
    end
    check("verdict", unrepairable, m_unrep);
    if (!m_unrep) begin
      n_rep++;
      check("shift length", k, IMG_W);
      check("repair data", img, m_image());
      // Independent coverage check from the shifted-out data.
      for (int r = 0; r < NROW; r++) for (int c = 0; c < NCOL; c++) for (int b = 0; b < W; b++)
        if (fmap[r][c][b]) begin
          bit cov = 0;
          int p = 0;
          for (int s = 0; s < R; s++) begin
            if (img[p] && img[p + 1 +: RB] == RB'(r)) cov = 1;
            p += 1 + RB;
          end
          for (int hh = 0; hh < 2; hh++) for (int s = 0; s < CH; s++) begin
            if (img[p] && img[p + 1 +: CB] == CB'(c) && hh == b / HALF &&
                img[p + 1 + CB +: POS_W] == POS_W'(b % HALF)) cov = 1;
            p += 1 + CB + POS_W;
          end
          check("faulty cell covered", cov, 1);
        end
    end else n_unrep++;
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_merge = 0; n_rowhit = 0; n_store = 0; n_sub_full = 0; n_col = 0; n_nfr = 0;
    n_rowonly = 0; n_ph2sub = 0; n_ignored = 0; n_unrep = 0; n_rep = 0;
    for (int t = 0; t < TRIALS; t++) run_trial($urandom_range(1, 5));
    $display("repairable %0d unrepairable %0d", n_rep, n_unrep);
    $display("merge %0d rowhit %0d store %0d sub_full %0d col %0d nfr_rows %0d row_only %0d ph2_sub %0d ignored %0d",
             n_merge, n_rowhit, n_store, n_sub_full, n_col, n_nfr, n_rowonly, n_ph2sub, n_ignored);
    check("mechanism merge", n_merge > 0, 1);
    check("mechanism row for second word", n_rowhit > 0, 1);
    check("mechanism store", n_store > 0, 1);
    check("mechanism subroutine on full bitmap", n_sub_full > 0, 1);
    check("mechanism spare column at B_MF", n_col > 0, 1);
    check("mechanism N_FR rows", n_nfr > 0, 1);
    check("mechanism row with columns exhausted", n_rowonly > 0, 1);
    check("mechanism Phase-2 subroutine", n_ph2sub > 0, 1);
    check("mechanism repaired fault ignored", n_ignored > 0, 1);
    check("verdict repairable seen", n_rep > 0, 1);
    check("verdict unrepairable seen", n_unrep > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
