// adding_cell: the bypassable adder cell of the row-bypassing multiplier.
//
// The cell belongs to the adder row enabled by multiplier bit x. Its three inputs
// (partial product pp, previous sum s_prev, previous carry c_prev) reach a full
// adder only through input gates enabled by x; two multiplexers, also selected by
// x, then choose the present sum and carry:
//   x = 1: s, c = full-adder sum and carry of pp + s_prev + c_prev
//   x = 0: s = s_prev, c = c_prev, and the adder's inputs are held at 0
// In a circuit the input gates are three-state buffers, so a disabled adder sees no
// transitions. Two-state logic has no high-impedance level, so here they are GDI
// AND cells (operand isolation), which likewise keep a bypassed adder still; this
// substitution is this design's choice. Input gates, multiplexers and the adder
// follow the cell of the row-bypassing scheme.
//
// Interface: x, pp, s_prev, c_prev in; s, c out. Purely combinational.
module adding_cell (
  input  logic x,
  input  logic pp,
  input  logic s_prev,
  input  logic c_prev,
  output logic s,
  output logic c
);
  logic pp_g, s_g, c_g;
  logic fa_s, fa_c;

  gdi_cell u_gate_pp (.g(x), .p(1'b0), .n(pp),     .d(pp_g));
  gdi_cell u_gate_s  (.g(x), .p(1'b0), .n(s_prev), .d(s_g));
  gdi_cell u_gate_c  (.g(x), .p(1'b0), .n(c_prev), .d(c_g));

  gdi_full_adder u_fa (.a(pp_g), .b(s_g), .cin(c_g), .sum(fa_s), .cout(fa_c));

  gdi_mux u_mux_s (.en(x), .a(fa_s), .b(s_prev), .y(s));
  gdi_mux u_mux_c (.en(x), .a(fa_c), .b(c_prev), .y(c));
endmodule
