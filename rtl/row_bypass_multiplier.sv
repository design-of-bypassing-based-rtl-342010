// row_bypass_multiplier: N x N unsigned multiplier whose adder rows are bypassed
// when their multiplier bit is 0.
//
// The partial products of b[0] (a & b[0], GDI AND cells) start the running sum;
// p[0] is its lowest bit. Each further multiplier bit b[j], j = 1..N-1, owns one
// row of N adding cells. Cell i of row j adds a[i]&b[j] to bit i of the running sum
// (the running sum is kept aligned to weight j) and to the carry of cell i-1 of the
// same row; cell 0 gets a constant 0 carry. The row's sums, shifted down one place,
// with the carry of its last cell on top, form the running sum for row j+1, and
// its cell 0 sum is product bit p[j]. After row N-1 the remaining sums and carry
// are p[2N-1:N].
//
// When b[j] = 0 every partial product of the row is zero, so its adding cells pass
// the previous sum on and pass the previous carry along the row. Because the row's
// carry chain starts at 0, the bypassed row's carries are all 0 and the product is
// unchanged. The adders of a bypassed row see constant inputs and do not switch.
//
// The row-per-multiplier-bit structure and the adding cell follow the
// row-bypassing scheme; carrying each row's carries along the row (rather than to
// the next row) is this design's choice, made so that bypassing needs no extra
// correction adders.
//
// Interface: a (multiplicand), b (multiplier) in; p = a*b out, 2N bits.
// Timing: purely combinational.
module row_bypass_multiplier #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N-1:0] pp0;
  // running sum entering row j (index j = 1..N), aligned to weight j
  logic [N-1:0] run [1:N];
  logic [N-1:0] s_row [1:N-1];
  logic [N-1:0] c_row [1:N-1];

  for (genvar i = 0; i < N; i++) begin : g_pp0
    gdi_cell u_and (.g(a[i]), .p(1'b0), .n(b[0]), .d(pp0[i]));
  end
  assign p[0]   = pp0[0];
  assign run[1] = {1'b0, pp0[N-1:1]};

  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_cell
      logic pp, c_in;
      gdi_cell u_and (.g(a[i]), .p(1'b0), .n(b[j]), .d(pp));
      if (i == 0) begin : g_first
        assign c_in = 1'b0;
      end else begin : g_next
        assign c_in = c_row[j][i-1];
      end
      adding_cell u_ac (.x(b[j]), .pp(pp), .s_prev(run[j][i]), .c_prev(c_in),
                        .s(s_row[j][i]), .c(c_row[j][i]));
    end
    assign p[j]       = s_row[j][0];
    assign run[j+1]   = {c_row[j][N-1], s_row[j][N-1:1]};
  end

  assign p[2*N-1:N] = run[N];
endmodule
