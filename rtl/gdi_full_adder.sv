// gdi_full_adder: one-bit full adder from GDI cells.
//
//   sum  = a xor (b xor cin)
//   cout = a.b + cin.(a xor b)
// A GDI XNOR stage forms xn = a xnor b and a GDI inverter turns it into x = a xor b,
// so both polarities exist. The sum cell is gated by cin and passes x when cin is
// low and xn when cin is high, which is x xor cin. The carry is a GDI multiplexer
// gated by x: when a and b differ the carry is cin, when they agree it is a (= b).
// The equations are the standard ones; the choice of forming XNOR first and using
// a multiplexer for the carry is this design's reading of the GDI adder schematic.
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
module gdi_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic xn, x;

  gdi_xnor u_xnor (.a(a), .b(b), .y(xn));
  gdi_cell u_inv  (.g(xn), .p(1'b1), .n(1'b0), .d(x));
  gdi_cell u_sum  (.g(cin), .p(x), .n(xn), .d(sum));
  gdi_mux  u_cout (.en(x), .a(cin), .b(a), .y(cout));
endmodule
