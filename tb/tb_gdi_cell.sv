// tb_gdi_cell: exhaustive check of the GDI basic cell.
// Drives all eight (g, p, n) combinations and compares d with the cell's selector
// function, then checks the six standard input configurations of the cell
// (A'B, A'+B, A+B, AB, A'B+AC, A') for every value of A, B and C.
`timescale 1ns/1ps
module tb_gdi_cell;
  logic g, p, n, d;
  int checks = 0, failures = 0;

  gdi_cell dut (.g(g), .p(p), .n(n), .d(d));

  task automatic check(input logic exp, input string what);
    checks++;
    if (d !== exp) begin
      failures++;
      $display("FAIL %s: g=%b p=%b n=%b d=%b expected %b", what, g, p, n, d, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {g, p, n} = 3'(v);
      #1 check(g ? n : p, "selector");
    end
    for (int v = 0; v < 8; v++) begin
      logic A, B, C;
      {A, B, C} = 3'(v);
      g = A;
      n = 1'b0; p = B;    #1 check(!A && B,          "N=0 P=B -> A'B");
      n = B;    p = 1'b1; #1 check(!A || B,          "N=B P=1 -> A'+B");
      n = 1'b1; p = B;    #1 check(A || B,           "N=1 P=B -> A+B");
      n = B;    p = 1'b0; #1 check(A && B,           "N=B P=0 -> AB");
      n = C;    p = B;    #1 check((!A && B) || (A && C), "N=C P=B -> A'B+AC");
      n = 1'b0; p = 1'b1; #1 check(!A,               "N=0 P=1 -> A'");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
