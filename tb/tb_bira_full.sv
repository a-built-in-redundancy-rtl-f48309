// tb_bira_full: one complete analysis at the default size.
//
// The analyzer is instantiated with its defaults: 8192 x 64-bit RAM
// (128 rows x 64 column addresses), 1 spare row, 1 spare column per half,
// a 4-entry bitmap.  A BIST stand-in reads every word twice (two passes) and
// reports these faults:
//   row 10, col 5, bit 3 and row 10, col 7, bit 40  -> second word of a
//       stored row at a new column address: the spare row takes row 10;
//   rows 20 and 21, col 9, bit 3 (column twin-bit)   -> left spare column;
//   row 30, col 1, bit 50                            -> right spare column.
// In the second pass the row-10 faults are ignored and the rest merge into
// their entries.  After test_done the Phase-2 Subroutine places the two
// spare columns, the memory is repairable, and the 32-bit repair image on
// tdo is checked against the values worked out above.  Every analysis must
// release the BIST within 39 clocks; the total analysis time is printed.
module tb_bira_full;
  localparam int unsigned NROW = 128, NCOL = 64, W = 64, IMG_W = 32;

  logic clk = 0, rst, bira_en, fail_h, test_done;
  logic [7+6+64-1:0] syndrome;
  logic hold_l, shift_en, unrepairable, tdo;

  bira_top dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic logic [W-1:0] fault_at(int r, int c);
    logic [W-1:0] f = '0;
    if (r == 10 && c == 5) f[3] = 1'b1;
    if (r == 10 && c == 7) f[40] = 1'b1;
    if ((r == 20 || r == 21) && c == 9) f[3] = 1'b1;
    if (r == 30 && c == 1) f[50] = 1'b1;
    return f;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tat = 0, held, k, nfail = 0;
    logic [IMG_W-1:0] img;
    rst = 1; bira_en = 0; fail_h = 0; test_done = 0; syndrome = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0; bira_en = 1;
    @(posedge clk); #1;
    for (int p = 0; p < 2; p++)
      for (int r = 0; r < NROW; r++)
        for (int c = 0; c < NCOL; c++) begin
          logic [W-1:0] f;
          f = fault_at(r, c);
          if (f != 0) begin
            fail_h = 1;
            syndrome = {7'(r), 6'(c), f};
            nfail++;
          end
          @(posedge clk); #1;
          if (fail_h) begin
            fail_h = 0;
            held = 0;
            while (!hold_l && held < 100) begin @(posedge clk); #1; held++; end
            tat += held + 1;
            checks++;
            if (held > 39) begin failures++; $display("FAIL held %0d clocks", held); end
          end
        end
    check("faults reported", nfail, 10);
    check("not unrepairable during test", unrepairable, 0);
    test_done = 1;
    @(posedge clk); #1;
    test_done = 0;
    img = '0; k = 0;
    while (!unrepairable && !(k > 0 && !shift_en) && held < 1000) begin
      if (shift_en) begin img[k] = tdo; k++; end
      @(posedge clk); #1; held++;
    end
    check("repairable", unrepairable, 0);
    check("shift length", k, IMG_W);
    // right col {pos 18, col 1, v}, left col {pos 3, col 9, v}, row {10, v}
    check("repair image", img, {5'd18, 6'd1, 1'b1, 5'd3, 6'd9, 1'b1, 7'd10, 1'b1});
    $display("analysis clocks during the test: %0d for %0d fault reports", tat, nfail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
