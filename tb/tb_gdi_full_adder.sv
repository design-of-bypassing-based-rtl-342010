// tb_gdi_full_adder: exhaustive check of the GDI full adder.
// For all eight input triples, {cout, sum} must equal a + b + cin; sum and cout
// are also compared separately with the adder equations
// sum = a ^ (b ^ cin) and cout = a.b + cin.(a ^ b).
`timescale 1ns/1ps
module tb_gdi_full_adder;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  gdi_full_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v);
      #1;
      checks++;
      if ({cout, sum} !== 2'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        $display("FAIL a=%b b=%b cin=%b cout=%b sum=%b", a, b, cin, cout, sum);
      end
      checks++;
      if (sum !== (a ^ (b ^ cin)) || cout !== ((a & b) | (cin & (a ^ b)))) begin
        failures++;
        $display("FAIL equations a=%b b=%b cin=%b", a, b, cin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
