// tb_gdi_multipliers_top: end-to-end test of the three multipliers at their
// default 4x4 size (no parameter overrides).
// First the three published example products are applied (3 x 5 to the Braun
// multiplier, 4 x 3 to the row-bypassing one, 8 x 2 to the column-bypassing one),
// then all 256 operand pairs are applied to all three at once. Every product is
// compared with a*b computed here. Inside the two bypassing multipliers the test
// also checks that every row (column) whose multiplier (multiplicand) bit is 0
// has all its adder inputs held at 0. It counts the two bypass mechanisms (an
// adder row skipped for a zero multiplier bit, an adder column skipped for a
// zero multiplicand bit) and the products formed with nothing skipped, and
// counts a failure for any of them that never happened.
`timescale 1ns/1ps
module tb_gdi_multipliers_top;
  logic [3:0] braun_a, braun_b, row_a, row_b, col_a, col_b;
  logic [7:0] braun_p, row_p, col_p;
  logic [2:0] row_quiet, col_quiet;
  int checks = 0, failures = 0;
  int row_bypasses = 0, col_bypasses = 0, row_full = 0, col_full = 0;

  gdi_multipliers_top dut (
    .braun_a(braun_a), .braun_b(braun_b), .braun_p(braun_p),
    .row_a(row_a), .row_b(row_b), .row_p(row_p),
    .col_a(col_a), .col_b(col_b), .col_p(col_p));

  // OR of all full-adder inputs of row j of the row-bypassing multiplier
  `define ROW_FA_IN(j) (|{dut.u_row.g_row[j].g_cell[0].u_ac.u_fa.a, dut.u_row.g_row[j].g_cell[0].u_ac.u_fa.b, dut.u_row.g_row[j].g_cell[0].u_ac.u_fa.cin, \
                          dut.u_row.g_row[j].g_cell[1].u_ac.u_fa.a, dut.u_row.g_row[j].g_cell[1].u_ac.u_fa.b, dut.u_row.g_row[j].g_cell[1].u_ac.u_fa.cin, \
                          dut.u_row.g_row[j].g_cell[2].u_ac.u_fa.a, dut.u_row.g_row[j].g_cell[2].u_ac.u_fa.b, dut.u_row.g_row[j].g_cell[2].u_ac.u_fa.cin, \
                          dut.u_row.g_row[j].g_cell[3].u_ac.u_fa.a, dut.u_row.g_row[j].g_cell[3].u_ac.u_fa.b, dut.u_row.g_row[j].g_cell[3].u_ac.u_fa.cin})
  // OR of all adder inputs of column i of the column-bypassing multiplier
  `define COL_FA_IN(i) (|{dut.u_col.g_row[1].g_cell[i].pp_g, dut.u_col.g_row[1].g_cell[i].s_in_g, \
                          dut.u_col.g_row[2].g_cell[i].pp_g, dut.u_col.g_row[2].g_cell[i].s_in_g, dut.u_col.g_row[2].g_cell[i].g_fa.c_in_g, \
                          dut.u_col.g_row[3].g_cell[i].pp_g, dut.u_col.g_row[3].g_cell[i].s_in_g, dut.u_col.g_row[3].g_cell[i].g_fa.c_in_g})
  assign row_quiet = {`ROW_FA_IN(3) == 1'b0, `ROW_FA_IN(2) == 1'b0, `ROW_FA_IN(1) == 1'b0};
  assign col_quiet = {`COL_FA_IN(2) == 1'b0, `COL_FA_IN(1) == 1'b0, `COL_FA_IN(0) == 1'b0};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    braun_a = 4'b0011; braun_b = 4'b0101;
    row_a   = 4'b0100; row_b   = 4'b0011;
    col_a   = 4'b1000; col_b   = 4'b0010;
    #1;
    expect_eq(braun_p, 8'b00001111, "Braun 0011 x 0101");
    expect_eq(row_p,   8'b00001100, "row bypass 0100 x 0011");
    expect_eq(col_p,   8'b00010000, "column bypass 1000 x 0010");

    for (int i = 0; i < 256; i++) begin
      {braun_a, braun_b} = 8'(i);
      // the other two see different operand orders so the three differ each step
      {row_b, row_a}     = 8'(i);
      {col_a, col_b}     = 8'(255 - i);
      #1;
      expect_eq(braun_p, 8'(braun_a * braun_b), "Braun product");
      expect_eq(row_p,   8'(row_a * row_b),     "row bypass product");
      expect_eq(col_p,   8'(col_a * col_b),     "column bypass product");
      expect_eq(8'(3'(row_quiet & ~row_b[3:1])), 8'(3'(~row_b[3:1])), "rows with b_j = 0 are quiet");
      expect_eq(8'(3'(col_quiet & ~col_a[2:0])), 8'(3'(~col_a[2:0])), "columns with a_i = 0 are quiet");
      row_bypasses += $countones(row_quiet & ~row_b[3:1]);
      col_bypasses += $countones(col_quiet & ~col_a[2:0]);
      if (&row_b[3:1]) row_full++;
      if (&col_a[2:0]) col_full++;
    end

    $display("row bypasses %0d, products with all rows %0d; column bypasses %0d, products with all columns %0d",
             row_bypasses, row_full, col_bypasses, col_full);
    checks++;
    if (row_bypasses == 0 || col_bypasses == 0 || row_full == 0 || col_full == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
