// column_bypass_multiplier: N x N unsigned Braun-style multiplier whose adder
// columns are bypassed when their multiplicand bit is 0.
//
// The array is the Braun array: partial products a[i]&b[j] (GDI AND cells), N-1
// carry-save rows (half adders in the first) and a final ripple-carry row. Adder
// cell i of every carry-save row handles the partial product a[i]&b[j], so the
// cells with the same i form a column that is idle whenever a[i] = 0: all its
// partial products are then 0 and its carries stay 0. Each such cell therefore
// has
//   - input gates (GDI AND cells with a[i]) that hold the adder's inputs at 0
//     when the column is disabled,
//   - a GDI multiplexer selected by a[i] that outputs the adder's sum when
//     a[i] = 1 and the incoming sum (from the row above) when a[i] = 0,
// and the carry a column hands to the final ripple row passes an AND gate with
// a[i]. The multiplicand column a[N-1] has no adder cells and is never bypassed.
//
// Multiplexers on the sums and AND gates on the column carries follow the
// column-bypassing scheme; gating the adders' inputs with a[i] stands in for the
// undescribed means of keeping a disabled adder still and is this design's choice.
//
// Interface: a (multiplicand), b (multiplier) in; p = a*b out, 2N bits.
// Timing: purely combinational.
module column_bypass_multiplier #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N-1:0] pp [N];
  logic [N-2:0] s_row [1:N-1];
  logic [N-2:0] c_row [1:N-1];
  logic [N-2:0] c_last;
  logic [N-2:0] r_sum;
  logic [N-2:0] r_cry;

  for (genvar j = 0; j < N; j++) begin : g_pp_row
    for (genvar i = 0; i < N; i++) begin : g_pp
      gdi_cell u_and (.g(a[i]), .p(1'b0), .n(b[j]), .d(pp[j][i]));
    end
  end

  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar i = 0; i < N - 1; i++) begin : g_cell
      logic s_in, s_in_g, pp_g, fa_s;
      if (i == N - 2) begin : g_left
        assign s_in = pp[j-1][N-1];
      end else begin : g_inner
        assign s_in = (j == 1) ? pp[0][i+1] : s_row[j-1][i+1];
      end
      gdi_cell u_gate_pp (.g(a[i]), .p(1'b0), .n(pp[j][i]), .d(pp_g));
      gdi_cell u_gate_s  (.g(a[i]), .p(1'b0), .n(s_in),     .d(s_in_g));
      if (j == 1) begin : g_ha
        gdi_half_adder u_ha (.a(pp_g), .b(s_in_g), .sum(fa_s), .cout(c_row[j][i]));
      end else begin : g_fa
        logic c_in_g;
        gdi_cell u_gate_c (.g(a[i]), .p(1'b0), .n(c_row[j-1][i]), .d(c_in_g));
        gdi_full_adder u_fa (.a(pp_g), .b(s_in_g), .cin(c_in_g),
                             .sum(fa_s), .cout(c_row[j][i]));
      end
      gdi_mux u_mux (.en(a[i]), .a(fa_s), .b(s_in), .y(s_row[j][i]));
    end
    assign p[j] = s_row[j][0];
  end

  for (genvar i = 0; i < N - 1; i++) begin : g_cgate
    gdi_cell u_and (.g(a[i]), .p(1'b0), .n(c_row[N-1][i]), .d(c_last[i]));
  end

  for (genvar k = 0; k < N - 1; k++) begin : g_final
    logic y;
    if (k == N - 2) begin : g_top
      assign y = pp[N-1][N-1];
    end else begin : g_mid
      assign y = s_row[N-1][k+1];
    end
    if (k == 0) begin : g_ha
      gdi_half_adder u_ha (.a(c_last[k]), .b(y), .sum(r_sum[k]), .cout(r_cry[k]));
    end else begin : g_fa
      gdi_full_adder u_fa (.a(c_last[k]), .b(y), .cin(r_cry[k-1]),
                           .sum(r_sum[k]), .cout(r_cry[k]));
    end
  end

  assign p[0]       = pp[0][0];
  assign p[2*N-2:N] = r_sum;
  assign p[2*N-1]   = r_cry[N-2];
endmodule
