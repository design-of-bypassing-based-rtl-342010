// gdi_multipliers_top: the three GDI array multipliers side by side.
//
// The Braun multiplier is the plain array; the row-bypassing multiplier disables
// the adder row of every zero multiplier bit; the column-bypassing multiplier
// disables the adder column of every zero multiplicand bit. They are alternative
// designs of the same N x N unsigned product, so each keeps its own operand and
// product ports and nothing is shared between them.
//
// Interface: {braun,row,col}_a, _b in (N bits); {braun,row,col}_p out (2N bits).
// Purely combinational.
module gdi_multipliers_top #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   braun_a,
  input  logic [N-1:0]   braun_b,
  output logic [2*N-1:0] braun_p,
  input  logic [N-1:0]   row_a,
  input  logic [N-1:0]   row_b,
  output logic [2*N-1:0] row_p,
  input  logic [N-1:0]   col_a,
  input  logic [N-1:0]   col_b,
  output logic [2*N-1:0] col_p
);
  braun_multiplier #(.N(N)) u_braun (.a(braun_a), .b(braun_b), .p(braun_p));

  row_bypass_multiplier #(.N(N)) u_row (
    .a(row_a), .b(row_b), .p(row_p));

  column_bypass_multiplier #(.N(N)) u_col (
    .a(col_a), .b(col_b), .p(col_p));
endmodule
