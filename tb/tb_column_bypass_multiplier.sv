// tb_column_bypass_multiplier: self-checking test of the column-bypassing multiplier.
// Three instances are tested: the default 4x4 one exhaustively (all 256 operand
// pairs) plus the fixed example vectors, an 8x8 one exhaustively (65536 pairs) and
// a 16x16 one with random operands and the all-ones / all-zeros corner cases.
// Every product is compared with the arithmetic product a*b computed here.
// In the 4x4 instance, every column whose enabling bit (a[N-2:0]) is 0 must have
// all its adder inputs at 0 (the column is bypassed and its adders are still).
// The test counts the bypassed columns and the products formed with no column
// bypassed, and fails if either never happened.
`timescale 1ns/1ps
module tb_column_bypass_multiplier;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  int checks = 0, failures = 0;
  int bypassed = 0, full_active = 0;

  column_bypass_multiplier dut (.a(a4), .b(b4), .p(p4));
  column_bypass_multiplier #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  column_bypass_multiplier #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // inputs of the adders of 4x4 column i (all rows) ORed: 0 when the column is quiet
  `define COL_FA_IN(i) (|{dut.g_row[1].g_cell[i].pp_g, dut.g_row[1].g_cell[i].s_in_g, \
                          dut.g_row[2].g_cell[i].pp_g, dut.g_row[2].g_cell[i].s_in_g, dut.g_row[2].g_cell[i].g_fa.c_in_g, \
                          dut.g_row[3].g_cell[i].pp_g, dut.g_row[3].g_cell[i].s_in_g, dut.g_row[3].g_cell[i].g_fa.c_in_g})
  function automatic logic [2:0] quiet_units();
    return {`COL_FA_IN(2) == 1'b0, `COL_FA_IN(1) == 1'b0, `COL_FA_IN(0) == 1'b0};
  endfunction

  task automatic check4(input string what);
    checks++;
    if (p4 !== 8'(a4 * b4)) begin
      failures++;
      $display("FAIL %s: %0d x %0d = %0d (expected %0d)", what, a4, b4, p4, 8'(a4 * b4));
    end
    // a unit whose enabling bit is 0 must have quiet adders; one whose bit is 1
    // is allowed either way (its inputs may happen to be 0)
    checks++;
    if ((quiet_units() & ~a4[2:0]) !== ~a4[2:0]) begin
      failures++;
      $display("FAIL %s: bypassed units not quiet, enables=%b quiet=%b", what, a4[2:0], quiet_units());
    end
    bypassed += $countones(~a4[2:0] & quiet_units());
    if (&a4[2:0]) full_active++;
  endtask

  initial begin
    a4 = 4'b1000; b4 = 4'b0010; #1 check4("simulation vector 8 x 2");
    checks++;
    if (p4 !== 8'b00010000) begin failures++; $display("FAIL simulation vector 8 x 2: p=%b", p4); end
    a4 = 4'b1010; b4 = 4'b1000; #1 check4("1010 x 1000, columns 0 and 2 bypassed");
    checks++;
    if (p4 !== 8'd80) begin failures++; $display("FAIL 1010 x 1000, columns 0 and 2 bypassed: p=%b", p4); end
    a4 = 4'b1111; b4 = 4'b1000; #1 check4("1111 x 1000, no column bypassed");
    checks++;
    if (p4 !== 8'd120) begin failures++; $display("FAIL 1111 x 1000, no column bypassed: p=%b", p4); end
    // 1111 x 1000: all columns enabled
    checks++;
    if (quiet_units() !== 3'b000) begin failures++; $display("FAIL columns not all active"); end
    // 1010 x 1111: columns 0 and 2 bypassed, their adders' inputs are held at zero
    a4 = 4'b1010; b4 = 4'b1111; #1 check4("columns 0 and 2 bypassed");
    checks++;
    if (quiet_units() !== 3'b101) begin
      failures++; $display("FAIL columns 0 and 2 not bypassed / not isolated");
    end
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
    checks++;
    if (bypassed == 0 || full_active == 0) begin
      failures++;
      $display("FAIL bypass coverage: bypassed=%0d full_active=%0d", bypassed, full_active);
    end
    $display("bypass events (4x4): %0d, products with nothing bypassed: %0d", bypassed, full_active);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
