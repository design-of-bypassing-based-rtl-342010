// gdi_mux: 2:1 multiplexer from a single GDI cell.
//
// The select EN drives the common gate; y = EN*A + EN'*B. Because a GDI cell passes
// its N diffusion when the gate is high, A is wired to N and B to P. Two transistors.
//
// Interface: en, a, b in; y out. Purely combinational.
// The function EN*A + EN'*B is the specified one; placing A on the NMOS side to
// obtain it is this design's choice.
module gdi_mux (
  input  logic en,
  input  logic a,
  input  logic b,
  output logic y
);
  gdi_cell u_sel (.g(en), .p(b), .n(a), .d(y));
endmodule
