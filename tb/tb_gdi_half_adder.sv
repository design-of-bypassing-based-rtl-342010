// tb_gdi_half_adder: exhaustive check of the GDI half adder.
// For all four input pairs, {cout, sum} must equal the arithmetic sum a + b.
`timescale 1ns/1ps
module tb_gdi_half_adder;
  logic a, b, sum, cout;
  int checks = 0, failures = 0;

  gdi_half_adder dut (.a(a), .b(b), .sum(sum), .cout(cout));

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
      if ({cout, sum} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%b b=%b cout=%b sum=%b", a, b, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
