// gdi_xor: two-input XOR from two GDI cells.
//
// The first cell is a GDI inverter on B (P tied high, N tied low). The second cell
// is gated by A: with A low it passes B (its P input), with A high it passes the
// inverted B (its N input), so y = A xor B. Four transistors in total.
//
// Interface: a, b in; y out. Purely combinational.
// The two-cell structure is the standard GDI XOR.
module gdi_xor (
  input  logic a,
  input  logic b,
  output logic y
);
  logic b_n;

  gdi_cell u_inv (.g(b), .p(1'b1), .n(1'b0), .d(b_n));
  gdi_cell u_sel (.g(a), .p(b),    .n(b_n),  .d(y));
endmodule
