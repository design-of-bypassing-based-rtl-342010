// tb_gdi_xnor: exhaustive check of the GDI XNOR gate.
// Applies all four input combinations and compares y with (a == b).
`timescale 1ns/1ps
module tb_gdi_xnor;
  logic a, b, y;
  int checks = 0, failures = 0;

  gdi_xnor dut (.a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== ((a == b))) begin
        failures++;
        $display("FAIL a=%b b=%b y=%b", a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
