// tb_bmf_detector: self-checking test of the G_MC / B_MF search.
//
// Uses a 6-bit word (bits 0-2 left half, 3-5 right half) and a 4-entry
// bitmap, the size of the worked examples of the scheme:
//   - example 1: three entries at column 2 with faults at bits 1, 2, 1 and
//     one at column 3 -> G_MC = entries 0..2 at column 2, B_MF = bit 1;
//   - example 2: column 2 entries with bits {0,2}, {1}, {3} -> all tie at one
//     fault, the LSB wins: B_MF = bit 0; with the left half disabled, bit 3;
// then random bitmaps against a reference search written with queues.
module tb_bmf_detector;
  localparam int unsigned E = 4, CB = 3, W = 6;

  logic [E-1:0]    vf;
  logic [CB-1:0]   car [E];
  logic [W-1:0]    hsr [E];
  logic [1:0]      half_en;
  logic [E-1:0]    gmc_mask;
  logic [CB-1:0]   gmc_col;
  logic [2:0]      bmf_bit;
  logic            bmf_found;

  int checks = 0, failures = 0;

  bmf_detector #(.ENTRIES(E), .COL_BITS(CB), .WORD_W(W)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Reference: column with the most valid entries (first entry wins ties),
  // then the most frequent enabled bit inside it (lowest bit wins ties).
  task automatic reference(output logic [E-1:0] mask, output int col, output int bb, output bit found);
    int best = 0, c;
    int cnt [W];
    col = 0;
    for (int i = 0; i < E; i++) begin
      if (!vf[i]) continue;
      c = 0;
      foreach (car[j]) if (vf[j] && car[j] == car[i]) c++;
      if (c > best) begin best = c; col = car[i]; end
    end
    mask = '0;
    for (int i = 0; i < E; i++) mask[i] = vf[i] && best > 0 && car[i] == col;
    best = 0; bb = 0;
    for (int b = 0; b < W; b++) begin
      cnt[b] = 0;
      if (!half_en[b / (W / 2)]) continue;
      for (int i = 0; i < E; i++) if (mask[i] && hsr[i][b]) cnt[b]++;
      if (cnt[b] > best) begin best = cnt[b]; bb = b; end
    end
    found = best > 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [E-1:0] m;
    int col, bb;
    bit found;

    // Example 1.
    vf = 4'b1111; half_en = 2'b11;
    car = '{3'd2, 3'd2, 3'd2, 3'd3};
    hsr = '{6'b000010, 6'b000100, 6'b000010, 6'b001000};
    #1;
    check("ex1 gmc_col", gmc_col, 2);
    check("ex1 gmc_mask", gmc_mask, 4'b0111);
    check("ex1 bmf", bmf_bit, 1);
    check("ex1 found", bmf_found, 1);

    // Example 2.
    hsr = '{6'b000101, 6'b000010, 6'b001000, 6'b001000};
    #1;
    check("ex2 bmf", bmf_bit, 0);
    half_en = 2'b10;
    #1;
    check("ex2 bmf right only", bmf_bit, 3);
    half_en = 2'b01;
    hsr = '{6'b001000, 6'b010000, 6'b001000, 6'b000001};
    #1;
    check("ex2 nothing left", bmf_found, 0);

    // Random bitmaps.
    repeat (3000) begin
      vf = 4'($urandom);
      half_en = 2'($urandom);
      for (int i = 0; i < E; i++) begin
        car[i] = 3'($urandom_range(0, 2));
        hsr[i] = 6'($urandom) & 6'($urandom);
      end
      #1;
      reference(m, col, bb, found);
      check("rnd found", bmf_found, found);
      check("rnd mask", gmc_mask, m);
      if (m != 0) check("rnd col", gmc_col, col);
      if (found) check("rnd bmf", bmf_bit, bb);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
