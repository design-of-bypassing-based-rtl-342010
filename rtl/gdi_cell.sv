// gdi_cell: Gate-Diffusion-Input (GDI) basic cell, modelled by its Boolean function.
//
// A GDI cell is one PMOS and one NMOS transistor sharing a gate input G. The PMOS
// diffusion is driven by input P and the NMOS diffusion by input N; their common
// drain is the output D. With G low the PMOS conducts and D follows P; with G high
// the NMOS conducts and D follows N, so the cell is a 2:1 selector D = G ? N : P.
// Tying P and N to constants or signals gives the cell's function table, e.g.
//   N=0, P=B, G=A -> A'B      N=B, P=1, G=A -> A'+B     N=1, P=B, G=A -> A+B
//   N=B, P=0, G=A -> AB       N=C, P=B, G=A -> A'B+AC   N=0, P=1, G=A -> A' (inverter)
// Every other cell of the multipliers is composed of instances of this module.
//
// Interface: g, p, n in; d out. Purely combinational, no timing.
// The selector function and the table follow the GDI method; the electrical side
// (threshold drop on a passed level, bulk ties, twin-well process) is not modelled.
module gdi_cell (
  input  logic g,
  input  logic p,
  input  logic n,
  output logic d
);
  always_comb d = g ? n : p;
endmodule
