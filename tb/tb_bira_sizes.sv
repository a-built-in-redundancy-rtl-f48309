// tb_bira_sizes: the analyzer at three RAM sizes and two spare budgets.
//
// Six analyzers run side by side: 8192 x 64, 4096 x 128 and 2048 x 256-bit
// RAMs (row/column address bits 7/6, 6/6 and 6/5), each with 1 spare row
// and 2 spare columns, and with 2 spare rows and 2 spare columns; all have a
// 4-entry bitmap.  Each one analyses 250 defective cores with 1 to 6 faults
// (40% single cells, 20% row twin-bits, 20% column twin-bits, 20% 2x2
// clusters), reported by a BIST stand-in in address order over two read
// passes (fault-free reads are skipped).  Checked: every "repairable"
// verdict comes with repair data that cover every faulty cell and agrees
// with an exhaustive search, and no fault holds the BIST longer than 39
// clocks.  Printed per size: repair rate (analyzer / optimal) and the
// analysis clocks per fault report and the longest hold.
module tb_bira_sizes;
  import bira_pkg::*;
  localparam int unsigned NCFG = 6, CORES = 250;
  localparam int CFG_RB [NCFG] = '{7, 6, 6, 7, 6, 6};
  localparam int CFG_CB [NCFG] = '{6, 6, 5, 6, 6, 5};
  localparam int CFG_W  [NCFG] = '{64, 128, 256, 64, 128, 256};
  localparam int CFG_R  [NCFG] = '{1, 1, 1, 2, 2, 2};
  localparam int CFG_C  [NCFG] = '{2, 2, 2, 2, 2, 2};

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int ours [2][NCFG], opt [2][NCFG];
  bit done [NCFG];
  longint tat [NCFG];
  int nrep [NCFG], cat [NCFG];

  typedef struct { int r; int c; int b; } cell_t;

  // Deterministic fault generator: the same cores for every configuration.
  function automatic void gen_core(int cs, int core, int nrow, int ncol, int w, ref cell_t cells [$]);
    int unsigned s = 32'h1234_5678 ^ (cs * 7919 + core * 104729);
    int n;
    cells.delete();
    s = s * 1103515245 + 12345;
    n = 1 + (s >> 8) % 6;
    repeat (n) begin
      int r, c, b, kind;
      s = s * 1103515245 + 12345; r = (s >> 8) % (nrow - 1);
      s = s * 1103515245 + 12345; c = (s >> 8) % ncol;
      s = s * 1103515245 + 12345; b = (s >> 8) % (w - 1);
      s = s * 1103515245 + 12345; kind = (cs == 0) ? 0 : (s >> 8) % 10;
      cells.push_back('{r, c, b});
      if (kind inside {4, 5, 8}) cells.push_back('{r, c, b + 1});
      if (kind inside {6, 7, 8}) cells.push_back('{r + 1, c, b});
      if (kind == 8)             cells.push_back('{r + 1, c, b + 1});
    end
  endfunction

  // Exhaustive search: can rows_left spare rows and cols_left[h] spare
  // columns per half cover every cell?
  function automatic bit can_repair(cell_t cells [$], int half, int rows_left, int lcols, int rcols);
    cell_t rest [$];
    cell_t f;
    if (cells.size() == 0) return 1;
    f = cells[0];
    if (rows_left > 0) begin
      rest = cells.find with (item.r != f.r);
      if (can_repair(rest, half, rows_left - 1, lcols, rcols)) return 1;
    end
    if ((f.b < half) ? lcols > 0 : rcols > 0) begin
      rest = cells.find with (!(item.c == f.c && item.b == f.b));
      if (f.b < half) begin
        if (can_repair(rest, half, rows_left, lcols - 1, rcols)) return 1;
      end else begin
        if (can_repair(rest, half, rows_left, lcols, rcols - 1)) return 1;
      end
    end
    return 0;
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : cfg
    localparam int unsigned RB = CFG_RB[g], CB = CFG_CB[g], W = CFG_W[g], HALF = W / 2;
    localparam int unsigned POS_W = $clog2(HALF), NCOL = 1 << CB;
    localparam int unsigned R  = CFG_R[g];
    localparam int unsigned CH = CFG_C[g] / 2;
    localparam int unsigned IMG_W = remap_image_w(R, CH, RB, CB, W);

    logic rst, bira_en, fail_h, test_done;
    logic [RB+CB+W-1:0] syndrome;
    logic hold_l, shift_en, unrepairable, tdo;

    bira_top #(.ROW_BITS(RB), .COL_BITS(CB), .WORD_W(W), .SPARE_ROWS(R),
               .SPARE_COLS_HALF(CH), .ENTRIES(4)) dut (.*);

    initial begin
      cell_t cells [$];
      logic [W-1:0] words [int];
      logic [IMG_W-1:0] img;
      int k, t, held;
      bit rep, best;
      tat[g] = 0; nrep[g] = 0; cat[g] = 0;
      for (int cs = 0; cs < 1; cs++) begin
        ours[cs][g] = 0; opt[cs][g] = 0;
        for (int core = 0; core < CORES; core++) begin
          gen_core(1, core, 1 << RB, NCOL, W, cells);
          words.delete();
          foreach (cells[i]) begin
            int a;
            a = cells[i].r * NCOL + cells[i].c;
            if (!words.exists(a)) words[a] = '0;
            words[a][cells[i].b] = 1'b1;
          end
          rst = 1; bira_en = 0; fail_h = 0; test_done = 0; syndrome = '0;
          repeat (2) @(posedge clk);
          #1 rst = 0; bira_en = 1;
          @(posedge clk); #1;
          for (int p = 0; p < 2; p++) begin
            foreach (words[a]) begin
              fail_h = 1;
              syndrome = {RB'(a / NCOL), CB'(a % NCOL), words[a]};
              @(posedge clk); #1;
              fail_h = 0;
              held = 0;
              while (!hold_l && held < 100) begin @(posedge clk); #1; held++; end
              tat[g] += held + 1;
              nrep[g]++;
              if (held + 1 > cat[g]) cat[g] = held + 1;
              checks++;
              if (held > CAT_CYCLES) begin
                failures++; $display("FAIL (%0d,%0d) held %0d clocks", R, 2 * CH, held);
              end
            end
          end
          test_done = 1;
          @(posedge clk); #1;
          test_done = 0;
          img = '0; k = 0; t = 0;
          while (!unrepairable && !(k > 0 && !shift_en) && t < 2000) begin
            if (shift_en) begin img[k] = tdo; k++; end
            else if (k == 0) tat[g]++;           // Phase-2 analysis
            @(posedge clk); #1; t++;
          end
          rep  = !unrepairable;
          best = can_repair(cells, HALF, R, CH, CH);
          ours[cs][g] += rep;
          opt[cs][g]  += best;
          checks++;
          if (rep && !best) begin
            failures++; $display("FAIL (%0d,%0d) repair claimed, none exists", R, 2 * CH);
          end
          if (rep) begin
            checks++;
            if (k != IMG_W) begin failures++; $display("FAIL shift length %0d", k); end
            foreach (cells[i]) begin
              bit cov;
              int p;
              cov = 0;
              p = 0;
              for (int s = 0; s < R; s++) begin
                if (img[p] && img[p + 1 +: RB] == RB'(cells[i].r)) cov = 1;
                p += 1 + RB;
              end
              for (int h = 0; h < 2; h++) for (int s = 0; s < CH; s++) begin
                if (img[p] && img[p + 1 +: CB] == CB'(cells[i].c) && h == cells[i].b / HALF &&
                    img[p + 1 + CB +: POS_W] == POS_W'(cells[i].b % HALF)) cov = 1;
                p += 1 + CB + POS_W;
              end
              checks++;
              if (!cov) begin
                failures++;
                $display("FAIL (%0d,%0d) cell %0d/%0d/%0d not covered", R, 2 * CH,
                         cells[i].r, cells[i].c, cells[i].b);
              end
            end
          end
        end
      end
      done[g] = 1;
    end
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    foreach (done[g]) done[g] = 0;
    do begin
      @(posedge clk);
      all = 1;
      foreach (done[g]) all &= done[g];
    end while (!all);
    $display("size          (r,c)  repair rate ours / opt   analysis clocks per report, longest");
    for (int g = 0; g < NCFG; g++) begin
      $display("  %0dx%0d  (%0d,%0d)   %5.1f%% / %5.1f%%   %5.2f  %0d", (1 << (CFG_RB[g] + CFG_CB[g])), CFG_W[g],
               CFG_R[g], CFG_C[g], 100.0 * ours[0][g] / CORES, 100.0 * opt[0][g] / CORES,
               real'(tat[g]) / nrep[g], cat[g]);
      checks++;
      if (ours[0][g] * 10 < opt[0][g] * 8) begin
        failures++;
        $display("FAIL size %0d rate far below optimal", g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
