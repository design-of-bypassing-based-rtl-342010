// tb_gdi_mux: exhaustive check of the GDI 2:1 multiplexer.
// Applies all eight (en, a, b) combinations; y must be a when en=1 and b when en=0.
`timescale 1ns/1ps
module tb_gdi_mux;
  logic en, a, b, y;
  int checks = 0, failures = 0;

  gdi_mux dut (.en(en), .a(a), .b(b), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {en, a, b} = 3'(v);
      #1;
      checks++;
      if (y !== ((en && a) || (!en && b))) begin
        failures++;
        $display("FAIL en=%b a=%b b=%b y=%b", en, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
