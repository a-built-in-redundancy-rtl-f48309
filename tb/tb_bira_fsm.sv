// tb_bira_fsm: self-checking test of the analyzer controller.
//
// The controller is wired to the bitmap, the B_MF detector and the
// remapping register exactly as in the top level, sized like the worked
// example of the scheme: 6-bit words (bits 0-2 left, 3-5 right), 3-bit row
// and column addresses, two spare rows, one spare column per half, a
// 4-entry bitmap.  A small BIST stand-in reports faults one at a time and
// waits for hold_l between them.
//
// Scenario A: faults (row 1, col 2, bits 0 and 2), (2, 2, bit 1),
// (3, 2, bit 3), then test_done.  Expected: in Phase-2, G_MC is column 2 and
// B_MF is bit 0 (all tie, LSB wins) -> left spare column; the left half is
// then used up with faulty rows 1 and 2, N_FR = 2 = N_ASR -> both rows get
// spares; then bit 3 of column 2 -> right spare column; repairable.  The
// shifted-out image is checked bit by bit.
// Scenario B: the same faults plus (4, 3, bit 3), which fills the bitmap
// during the test.  The same allocations happen, in Phase-1, and the fault
// at column 3 is then left with no spare: unrepairable.
// Scenario C: a second fault in an already-stored row at a new column
// address takes a spare row at once; a repeated fault is merged; faults in
// a repaired row or bit line are ignored.
// Scenario D: the N_FR example bitmap.  Three faults at column 7, bit 0
// and one at (1, 2, bit 4) fill the bitmap; the left spare column takes
// column 7, bit 0.  Then (2, 2, bit 2), (3, 2, bit 2) and (4, 3, bit 3) fill
// it again with the left half out of columns and faulty rows 2 and 3 in
// that half: N_FR = 2 = N_ASR, so rows 2 and 3 get the spare rows.  In
// Phase-2 the right spare column takes column 3, bit 3 (equal groups, the
// lower entry wins) and (1, 2, bit 4) is left over: unrepairable.
// Every analysis must release the BIST within 39 clocks.
module tb_bira_fsm;
  import bira_pkg::*;
  localparam int unsigned E = 4, RB = 3, CB = 3, W = 6, R = 2, CH = 1;
  localparam int unsigned IMG_W = remap_image_w(R, CH, RB, CB, W);

  logic clk = 0, rst, bira_en, fail_h, test_done;
  logic [RB-1:0] in_ra, f_ra, bm_row, alloc_row_addr;
  logic [CB-1:0] in_ca, f_ca, gmc_col;
  logic [W-1:0]  in_hs, f_hs, col_mask;
  logic [2:0]    bmf_bit;
  logic hold_l, shift_en, unrepairable, tdo;
  bm_op_e bm_op;
  logic [E-1:0]  vf, hit_both, row_hit, col_hit, gmc_mask;
  logic [RB-1:0] rar [E];
  logic [CB-1:0] car [E];
  logic [W-1:0]  hsr [E];
  logic bm_full, bm_empty, bmf_found, alloc_row, alloc_col, shift_start, shift, row_repaired;
  logic [1:0] half_en, n_asr;
  logic [0:0] ln_asc, rn_asc;
  logic [IMG_W-1:0] image;

  bira_fsm #(.ENTRIES(E), .ROW_BITS(RB), .COL_BITS(CB), .WORD_W(W), .SPARE_ROWS(R),
             .SPARE_COLS_HALF(CH)) dut (.*);
  local_bitmap #(.ENTRIES(E), .ROW_BITS(RB), .COL_BITS(CB), .WORD_W(W)) u_bm (
    .clk, .rst, .op(bm_op), .cmp_ra(f_ra), .cmp_ca(f_ca), .wr_hs(f_hs), .op_row(bm_row),
    .op_col(gmc_col), .op_bit(bmf_bit), .vf, .rar, .car, .hsr, .hit_both, .row_hit, .col_hit,
    .full(bm_full), .empty(bm_empty));
  bmf_detector #(.ENTRIES(E), .COL_BITS(CB), .WORD_W(W)) u_bmf (.*);
  remap_register #(.SPARE_ROWS(R), .SPARE_COLS_HALF(CH), .ROW_BITS(RB), .COL_BITS(CB),
                   .WORD_W(W)) u_rr (.*, .chk_ra(in_ra), .chk_ca(in_ca),
                   .alloc_col_addr(gmc_col), .alloc_bit(bmf_bit));

  assign half_en = {rn_asc != '0, ln_asc != '0};

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Allocation log, recorded from the controller's commands.
  string alloc_log;
  always @(posedge clk) begin
    if (alloc_row) alloc_log = {alloc_log, $sformatf("R%0d ", alloc_row_addr)};
    if (alloc_col) alloc_log = {alloc_log, $sformatf("C%0d.%0d ", gmc_col, bmf_bit)};
  end

  task automatic start();
    rst = 1; bira_en = 0; fail_h = 0; test_done = 0; in_ra = 0; in_ca = 0; in_hs = 0;
    alloc_log = "";
    repeat (2) @(posedge clk);
    #1 rst = 0; bira_en = 1;
    @(posedge clk); #1;
    check("hold_l idle", hold_l, 1);
  endtask

  // One fault report; returns the clocks the BIST was held.
  task automatic report(int ra, int ca, logic [W-1:0] hs);
    int held = 0;
    fail_h = 1; in_ra = RB'(ra); in_ca = CB'(ca); in_hs = hs;
    @(posedge clk); #1;
    fail_h = 0;
    check("hold_l low after fail_h", hold_l, 0);
    while (!hold_l && held < 200) begin
      @(posedge clk); #1; held++;
    end
    checks++;
    if (held > CAT_CYCLES) begin
      failures++;
      $display("FAIL analysis took %0d clocks", held);
    end
  endtask

  // test_done, then wait for the verdict; collect the serial image.
  task automatic finish(output bit unrep, output logic [IMG_W-1:0] img);
    int t = 0, k = 0;
    test_done = 1;
    @(posedge clk); #1;
    test_done = 0;
    img = '0;
    while (!unrepairable && !(k > 0 && !shift_en) && t < 500) begin
      if (shift_en) begin img[k] = tdo; k++; end
      @(posedge clk); #1; t++;
    end
    unrep = unrepairable;
    if (!unrep) check("shift length", k, IMG_W);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit unrep;
    logic [IMG_W-1:0] img;

    // Scenario A.
    start();
    report(1, 2, 6'b000101);
    report(2, 2, 6'b000010);
    report(3, 2, 6'b001000);
    check("A: nothing allocated in Phase-1", alloc_log.len(), 0);
    finish(unrep, img);
    check("A: repairable", unrep, 0);
    checks++;
    if (alloc_log != "C2.0 R1 R2 C2.3 ") begin
      failures++; $display("FAIL A: allocations '%s'", alloc_log);
    end
    // rows {addr,v} x2, left {pos,col,v}, right {pos,col,v}
    check("A: image", img, {2'd0, 3'd2, 1'b1, 2'd0, 3'd2, 1'b1, 3'd2, 1'b1, 3'd1, 1'b1});

    // Scenario B.
    start();
    report(1, 2, 6'b000101);
    report(2, 2, 6'b000010);
    report(3, 2, 6'b001000);
    report(4, 3, 6'b001000);
    checks++;
    if (alloc_log != "C2.0 R1 R2 ") begin
      failures++; $display("FAIL B: Phase-1 allocations '%s'", alloc_log);
    end
    check("B: bitmap after Phase-1", vf, 4'b1100);
    finish(unrep, img);
    check("B: unrepairable", unrep, 1);
    checks++;
    if (alloc_log != "C2.0 R1 R2 C2.3 ") begin
      failures++; $display("FAIL B: allocations '%s'", alloc_log);
    end

    // Scenario C.
    start();
    report(5, 1, 6'b000001);
    report(5, 1, 6'b000100);          // same word again: merged
    check("C: merged", hsr[0], 6'b000101);
    report(5, 6, 6'b010000);          // same row, new column address: spare row
    checks++;
    if (alloc_log != "R5 ") begin failures++; $display("FAIL C: '%s'", alloc_log); end
    check("C: row entries freed", vf, 4'b0000);
    report(5, 3, 6'b000001);          // repaired row: ignored
    check("C: repaired row ignored", vf, 4'b0000);
    report(6, 4, 6'b100001);
    report(7, 4, 6'b100000);
    finish(unrep, img);               // Phase-2: col 4 bit 5 -> right, then col 4 bit 0 -> left
    check("C: repairable", unrep, 0);
    checks++;
    if (alloc_log != "R5 C4.5 C4.0 ") begin failures++; $display("FAIL C: '%s'", alloc_log); end

    // Scenario D.
    start();
    report(7, 7, 6'b000001);
    report(6, 7, 6'b000001);
    report(5, 7, 6'b000001);
    report(1, 2, 6'b010000);
    checks++;
    if (alloc_log != "C7.0 ") begin failures++; $display("FAIL D: '%s'", alloc_log); end
    check("D: left columns used", ln_asc, 0);
    check("D: one entry left", vf, 4'b1000);
    report(2, 2, 6'b000100);
    report(3, 2, 6'b000100);
    report(4, 3, 6'b001000);
    checks++;
    if (alloc_log != "C7.0 R2 R3 ") begin failures++; $display("FAIL D: '%s'", alloc_log); end
    check("D: rows 2 and 3 freed", vf, 4'b1100);
    check("D: spare rows used", n_asr, 0);
    finish(unrep, img);
    check("D: unrepairable", unrep, 1);
    checks++;
    if (alloc_log != "C7.0 R2 R3 C3.3 ") begin failures++; $display("FAIL D: '%s'", alloc_log); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
