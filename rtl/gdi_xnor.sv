// gdi_xnor: two-input XNOR from two GDI cells.
//
// Same structure as the XOR cell with the diffusion inputs of the second cell
// swapped: a GDI inverter on B, then a cell gated by A that passes the inverted B
// when A is low and B itself when A is high, so y = A xnor B.
//
// Interface: a, b in; y out. Purely combinational.
// The two-cell structure is the standard GDI XNOR.
module gdi_xnor (
  input  logic a,
  input  logic b,
  output logic y
);
  logic b_n;

  gdi_cell u_inv (.g(b), .p(1'b1), .n(1'b0), .d(b_n));
  gdi_cell u_sel (.g(a), .p(b_n),  .n(b),    .d(y));
endmodule
