// braun_multiplier: N x N unsigned Braun array multiplier built from GDI cells.
//
// Partial products pp[j][i] = a[i] & b[j] are formed by GDI AND cells. Below them
// sit N-1 rows of carry-save adders, row j adding the partial products of b[j].
// Cell i of row j (weight i+j) takes pp[j][i], the sum of cell i+1 of the row above
// (or, for the leftmost cell, the partial product a[N-1]&b[j-1]) and the carry of
// cell i of the row above. The first row has no carries to absorb, so its cells are
// half adders. Cell 0 of row j delivers product bit p[j]. A final N-1 bit
// ripple-carry row adds the last row's carries to its sums (plus a[N-1]&b[N-1]) and
// produces p[2N-1:N]. Every adder switches on every input change, whatever the bits.
//
// Interface: a (multiplicand), b (multiplier) in; p = a*b out, 2N bits.
// Timing: purely combinational; the longest path runs down the array and along the
// final ripple row. The cell arrangement follows the Braun array of the GDI
// multiplier design; the parameter N defaults to that design's 4x4 size.
module braun_multiplier #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  // pp[j][i] = a[i] & b[j]
  logic [N-1:0] pp [N];
  // carry-save rows 1..N-1, cells 0..N-2
  logic [N-2:0] s_row [1:N-1];
  logic [N-2:0] c_row [1:N-1];
  // final ripple row, cells 0..N-2
  logic [N-2:0] r_sum;
  logic [N-2:0] r_cry;

  for (genvar j = 0; j < N; j++) begin : g_pp_row
    for (genvar i = 0; i < N; i++) begin : g_pp
      gdi_cell u_and (.g(a[i]), .p(1'b0), .n(b[j]), .d(pp[j][i]));
    end
  end

  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar i = 0; i < N - 1; i++) begin : g_cell
      logic s_in;
      if (i == N - 2) begin : g_left
        assign s_in = pp[j-1][N-1];
      end else begin : g_inner
        assign s_in = (j == 1) ? pp[0][i+1] : s_row[j-1][i+1];
      end
      if (j == 1) begin : g_ha
        gdi_half_adder u_ha (.a(pp[j][i]), .b(s_in), .sum(s_row[j][i]), .cout(c_row[j][i]));
      end else begin : g_fa
        gdi_full_adder u_fa (.a(pp[j][i]), .b(s_in), .cin(c_row[j-1][i]),
                             .sum(s_row[j][i]), .cout(c_row[j][i]));
      end
    end
    assign p[j] = s_row[j][0];
  end

  for (genvar k = 0; k < N - 1; k++) begin : g_final
    logic y;
    if (k == N - 2) begin : g_top
      assign y = pp[N-1][N-1];
    end else begin : g_mid
      assign y = s_row[N-1][k+1];
    end
    if (k == 0) begin : g_ha
      gdi_half_adder u_ha (.a(c_row[N-1][k]), .b(y), .sum(r_sum[k]), .cout(r_cry[k]));
    end else begin : g_fa
      gdi_full_adder u_fa (.a(c_row[N-1][k]), .b(y), .cin(r_cry[k-1]),
                           .sum(r_sum[k]), .cout(r_cry[k]));
    end
  end

  assign p[0]         = pp[0][0];
  assign p[2*N-2:N]   = r_sum;
  assign p[2*N-1]     = r_cry[N-2];
endmodule
