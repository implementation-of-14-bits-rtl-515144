// tb_fp14_to_fixed: exhaustive self-checking test of fp14_to_fixed.
//
// All 16,384 encodings are converted and compared with the exact value of the
// operand divided by the grid step 2^-22, as a signed 40-bit integer. The
// conversion is combinational and is checked within the cycle its input is
// applied.
module tb_fp14_to_fixed;
  import fp14_pkg::*;
  import fp14_ref_pkg::*;

  logic                    clk = 1'b0;
  fp14_t                   x;
  logic signed [FIX_W-1:0] fix;
  int checks = 0, failures = 0;
  int n_neg = 0;

  fp14_to_fixed dut (.x(x), .fix(fix));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint expected;
    x = '0;
    for (int i = 0; i < 16384; i++) begin
      @(posedge clk);
      x = fp14_t'(i);
      #8;
      expected = longint'(to_real(x) * pow2(22));
      checks++;
      if (longint'(fix) != expected) begin
        failures++;
        if (failures < 10) $display("FAIL %h: got %0d expected %0d", x, fix, expected);
      end
      if (expected < 0) n_neg++;
    end
    if (n_neg == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
