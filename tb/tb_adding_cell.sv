// tb_adding_cell: exhaustive check of the row-bypassing adding cell.
// For all 16 combinations of (x, pp, s_prev, c_prev):
//   x = 1: {c, s} must equal pp + s_prev + c_prev;
//   x = 0: s must equal s_prev and c must equal c_prev, and the cell's internal
//          full adder must see all-zero inputs (its input gates are closed).
`timescale 1ns/1ps
module tb_adding_cell;
  logic x, pp, s_prev, c_prev, s, c;
  int checks = 0, failures = 0, bypassed = 0;

  adding_cell dut (.x(x), .pp(pp), .s_prev(s_prev), .c_prev(c_prev), .s(s), .c(c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {x, pp, s_prev, c_prev} = 4'(v);
      #1;
      checks++;
      if (x) begin
        if ({c, s} !== 2'(int'(pp) + int'(s_prev) + int'(c_prev))) begin
          failures++;
          $display("FAIL add pp=%b s_prev=%b c_prev=%b -> c=%b s=%b", pp, s_prev, c_prev, c, s);
        end
      end else begin
        bypassed++;
        if (s !== s_prev || c !== c_prev) begin
          failures++;
          $display("FAIL bypass s_prev=%b c_prev=%b -> c=%b s=%b", s_prev, c_prev, c, s);
        end
        checks++;
        if ({dut.u_fa.a, dut.u_fa.b, dut.u_fa.cin} !== 3'b000) begin
          failures++;
          $display("FAIL bypassed adder inputs not isolated (pp=%b s_prev=%b c_prev=%b)",
                   pp, s_prev, c_prev);
        end
      end
    end
    checks++;
    if (bypassed != 8) begin
      failures++;
      $display("FAIL bypass case count %0d", bypassed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
