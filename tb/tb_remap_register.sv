// tb_remap_register: self-checking test of the Remapping Data Register.
//
// Two spare rows and two spare columns per half, 3-bit row and column
// addresses, 6-bit word.  Allocates rows and columns (also past the supply,
// which must be ignored), checks the free-spare counts, the repaired-row and
// repaired-column lookups, and shifts the whole image out on tdo, comparing
// it with the record layout worked out here.
module tb_remap_register;
  localparam int unsigned R = 2, CH = 2, RB = 3, CB = 3, W = 6;
  localparam int unsigned POS_W = 2, IMG_W = R * (1 + RB) + 2 * CH * (1 + CB + POS_W);

  logic          clk = 0, rst;
  logic          alloc_row, alloc_col, shift_start, shift;
  logic [RB-1:0] alloc_row_addr, chk_ra;
  logic [CB-1:0] alloc_col_addr, chk_ca;
  logic [2:0]    alloc_bit;
  logic [1:0]    n_asr, ln_asc, rn_asc;
  logic          row_repaired, tdo;
  logic [W-1:0]  col_mask;
  logic [IMG_W-1:0] image;

  remap_register #(.SPARE_ROWS(R), .SPARE_COLS_HALF(CH), .ROW_BITS(RB), .COL_BITS(CB), .WORD_W(W)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic do_row(int a);
    alloc_row = 1; alloc_row_addr = RB'(a);
    @(posedge clk); #1; alloc_row = 0;
  endtask

  task automatic do_col(int a, int b);
    alloc_col = 1; alloc_col_addr = CB'(a); alloc_bit = 3'(b);
    @(posedge clk); #1; alloc_col = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [IMG_W-1:0] exp_img, got_img;
    rst = 1; alloc_row = 0; alloc_col = 0; shift_start = 0; shift = 0;
    alloc_row_addr = 0; alloc_col_addr = 0; alloc_bit = 0; chk_ra = 0; chk_ca = 0;
    @(posedge clk); #1; rst = 0;
    check("n_asr reset", n_asr, 2);
    check("ln_asc reset", ln_asc, 2);
    check("rn_asc reset", rn_asc, 2);
    chk_ra = 0; #1;
    check("no row repaired", row_repaired, 0);

    do_row(5);
    check("n_asr 1", n_asr, 1);
    do_row(2);
    do_row(7);                      // no spare left: ignored
    check("n_asr 0", n_asr, 0);
    chk_ra = 5; #1; check("row 5 repaired", row_repaired, 1);
    chk_ra = 2; #1; check("row 2 repaired", row_repaired, 1);
    chk_ra = 7; #1; check("row 7 not repaired", row_repaired, 0);

    do_col(3, 1);                   // left, position 1
    check("ln_asc 1", ln_asc, 1);
    check("rn_asc 2", rn_asc, 2);
    do_col(3, 4);                   // right, position 1
    do_col(6, 5);                   // right, position 2
    do_col(1, 3);                   // right: none left, ignored
    check("rn_asc 0", rn_asc, 0);
    check("ln_asc still 1", ln_asc, 1);
    do_col(0, 0);                   // left, position 0
    check("ln_asc 0", ln_asc, 0);
    chk_ca = 3; #1; check("mask col 3", col_mask, 6'b010010);
    chk_ca = 6; #1; check("mask col 6", col_mask, 6'b100000);
    chk_ca = 1; #1; check("mask col 1", col_mask, 6'b000000);
    chk_ca = 0; #1; check("mask col 0", col_mask, 6'b000001);

    // Expected image: rows {addr,valid}, left cols, right cols {pos,col,valid}.
    exp_img = {2'd2, 3'd6, 1'b1,  2'd1, 3'd3, 1'b1,   // right slots 1, 0
               2'd0, 3'd0, 1'b1,  2'd1, 3'd3, 1'b1,   // left slots 1, 0
               3'd2, 1'b1,  3'd5, 1'b1};              // row slots 1, 0
    check("image", image, exp_img);

    shift_start = 1; @(posedge clk); #1; shift_start = 0;
    got_img = '0;
    for (int k = 0; k < IMG_W; k++) begin
      got_img[k] = tdo;
      shift = 1; @(posedge clk); #1;
    end
    shift = 0;
    check("serial image", got_img, exp_img);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
