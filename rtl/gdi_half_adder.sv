// gdi_half_adder: one-bit half adder from GDI cells.
//
// sum is a GDI XOR of a and b. cout is a single GDI cell in its AND configuration
// (gate a, N diffusion b, P diffusion tied low), so cout = a & b.
//
// Interface: a, b in; sum, cout out. Purely combinational.
// XOR for the sum and a single AND-configured cell for the carry follow the GDI
// half-adder schematic.
module gdi_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  gdi_xor  u_sum (.a(a), .b(b), .y(sum));
  gdi_cell u_and (.g(a), .p(1'b0), .n(b), .d(cout));
endmodule
