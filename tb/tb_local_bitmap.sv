// tb_local_bitmap: self-checking test of the 1D local bitmap.
//
// Loads the bitmap of the first worked example (rows 1-4, columns 2,2,2,3),
// checks the parallel compare outputs, then applies random operations
// (merge, store, delete row, clear column bit, clear) and compares every
// field and flag after each clock with a model kept in plain arrays.
module tb_local_bitmap;
  import bira_pkg::*;
  localparam int unsigned E = 4, RB = 3, CB = 3, W = 6;

  logic          clk = 0, rst;
  bm_op_e        op;
  logic [RB-1:0] cmp_ra, op_row;
  logic [CB-1:0] cmp_ca, op_col;
  logic [W-1:0]  wr_hs;
  logic [2:0]    op_bit;
  logic [E-1:0]  vf, hit_both, row_hit, col_hit;
  logic [RB-1:0] rar [E];
  logic [CB-1:0] car [E];
  logic [W-1:0]  hsr [E];
  logic          full, empty;

  local_bitmap #(.ENTRIES(E), .ROW_BITS(RB), .COL_BITS(CB), .WORD_W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bit            m_v [E];
  logic [RB-1:0] m_r [E];
  logic [CB-1:0] m_c [E];
  logic [W-1:0]  m_h [E];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Model of one operation.
  task automatic model_op();
    int slot = -1;
    case (op)
      BM_MERGE:   for (int i = 0; i < E; i++)
                    if (m_v[i] && m_r[i] == cmp_ra && m_c[i] == cmp_ca) m_h[i] |= wr_hs;
      BM_STORE:   begin
                    for (int i = E - 1; i >= 0; i--) if (!m_v[i]) slot = i;
                    if (slot >= 0) begin
                      m_v[slot] = 1; m_r[slot] = cmp_ra; m_c[slot] = cmp_ca; m_h[slot] = wr_hs;
                    end
                  end
      BM_DEL_ROW: for (int i = 0; i < E; i++) if (m_v[i] && m_r[i] == op_row) m_v[i] = 0;
      BM_CLR_COL: for (int i = 0; i < E; i++)
                    if (m_v[i] && m_c[i] == op_col) begin
                      m_h[i][op_bit] = 1'b0;
                      if (m_h[i] == 0) m_v[i] = 0;
                    end
      BM_CLEAR:   for (int i = 0; i < E; i++) m_v[i] = 0;
      default: ;
    endcase
  endtask

  task automatic compare();
    int nv = 0;
    for (int i = 0; i < E; i++) begin
      check($sformatf("vf[%0d]", i), vf[i], m_v[i]);
      if (m_v[i]) begin
        check($sformatf("rar[%0d]", i), rar[i], m_r[i]);
        check($sformatf("car[%0d]", i), car[i], m_c[i]);
        check($sformatf("hsr[%0d]", i), hsr[i], m_h[i]);
        nv++;
      end
      check("row_hit", row_hit[i], m_v[i] && m_r[i] == cmp_ra);
      check("col_hit", col_hit[i], m_v[i] && m_c[i] == cmp_ca);
      check("hit_both", hit_both[i], m_v[i] && m_r[i] == cmp_ra && m_c[i] == cmp_ca);
    end
    check("full", full, nv == E);
    check("empty", empty, nv == 0);
  endtask

  task automatic apply();
    model_op();
    @(posedge clk);
    #1;
    compare();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rows[4] = '{1, 2, 3, 4};
    int cols[4] = '{2, 2, 2, 3};
    int bits[4] = '{1, 2, 1, 3};
    rst = 1; op = BM_NOP; cmp_ra = 0; cmp_ca = 0; wr_hs = 0; op_row = 0; op_col = 0; op_bit = 0;
    for (int i = 0; i < E; i++) m_v[i] = 0;
    @(posedge clk); #1;
    rst = 0;
    compare();

    // Worked example bitmap.
    for (int i = 0; i < 4; i++) begin
      op = BM_STORE; cmp_ra = RB'(rows[i]); cmp_ca = CB'(cols[i]); wr_hs = W'(1) << bits[i];
      apply();
    end
    check("example full", full, 1);
    op = BM_NOP; cmp_ra = 3'd2; cmp_ca = 3'd2; #1;
    check("example hit_both", hit_both, 4'b0010);
    check("example col_hit", col_hit, 4'b0111);
    cmp_ra = 3'd2; cmp_ca = 3'd5; #1;
    check("example row_hit", row_hit, 4'b0010);
    check("example no col_hit", col_hit, 4'b0000);
    // Clearing bit 1 of column 2 frees entries 0 and 2.
    op = BM_CLR_COL; op_col = 3'd2; op_bit = 3'd1;
    apply();
    check("after clear", vf, 4'b1010);

    // Random operations on a small address space so that hits are common.
    repeat (4000) begin
      op     = bm_op_e'($urandom_range(0, 9) < 9 ? $urandom_range(1, 4) : $urandom_range(0, 5));
      cmp_ra = RB'($urandom_range(0, 3));
      cmp_ca = CB'($urandom_range(0, 3));
      wr_hs  = W'($urandom_range(1, 63));
      op_row = RB'($urandom_range(0, 3));
      op_col = CB'($urandom_range(0, 3));
      op_bit = 3'($urandom_range(0, 5));
      apply();
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
