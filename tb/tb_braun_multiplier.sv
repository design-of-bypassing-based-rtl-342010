// tb_braun_multiplier: self-checking test of the Braun array multiplier.
// Three instances are tested: the default 4x4 one exhaustively (all 256 operand
// pairs) plus the fixed example vectors, an 8x8 one exhaustively (65536 pairs) and
// a 16x16 one with random operands and the all-ones / all-zeros corner cases.
// Every product is compared with the arithmetic product a*b computed here.
`timescale 1ns/1ps
module tb_braun_multiplier;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int checks = 0, failures = 0;
  int bypassed = 0, full_active = 0;

  braun_multiplier dut (.a(a4), .b(b4), .p(p4));
  braun_multiplier #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  braun_multiplier #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check4(input string what);
    checks++;
    if (p4 !== 8'(a4 * b4)) begin
      failures++;
      $display("FAIL %s: %0d x %0d = %0d (expected %0d)", what, a4, b4, p4, 8'(a4 * b4));
    end
  endtask

  initial begin
    a4 = 4'b0011; b4 = 4'b0101; #1 check4("simulation vector 3 x 5");
    checks++;
    if (p4 !== 8'b00001111) begin failures++; $display("FAIL simulation vector 3 x 5: p=%b", p4); end
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1 check4("4x4 exhaustive");
    end
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      checks++;
      if (p8 !== 16'(a8 * b8)) begin
        failures++;
        $display("FAIL 8x8: %0d x %0d = %0d", a8, b8, p8);
      end
    end
    for (int i = 0; i < 4000; i++) begin
      case (i)
        0: begin a16 = 16'hFFFF; b16 = 16'hFFFF; end
        1: begin a16 = 16'hFFFF; b16 = 16'h0000; end
        2: begin a16 = 16'h0000; b16 = 16'hFFFF; end
        3: begin a16 = 16'hAAAA; b16 = 16'h5555; end
        default: begin a16 = 16'($urandom); b16 = 16'($urandom); end
      endcase
      #1;
      checks++;
      if (p16 !== 32'(a16 * b16)) begin
        failures++;
        $display("FAIL 16x16: %0d x %0d = %0d", a16, b16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
