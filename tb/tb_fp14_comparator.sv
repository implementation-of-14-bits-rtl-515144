// tb_fp14_comparator: self-checking test of fp14_comparator.
//
// Random operand pairs, many of them equal or one mantissa step apart (so the
// difference is far below the smallest normal number), with zeros of both
// signs and the largest exponents. lt, ge and max are compared with a real-
// number comparison of the decoded operands; max must be b when a < b and a
// otherwise. Combinational: checked within the cycle the operands are applied.
module tb_fp14_comparator;
  import fp14_pkg::*;
  import fp14_ref_pkg::*;

  logic  clk = 1'b0;
  fp14_t a, b, mx;
  logic  lt, ge;
  int    checks = 0, failures = 0;
  int    n_lt = 0, n_ge = 0, n_eq = 0, n_tiny = 0;

  fp14_comparator dut (.a(a), .b(b), .lt(lt), .ge(ge), .max(mx));

  always #5 clk = ~clk;

  task automatic apply(fp14_t x, fp14_t y);
    logic  e_lt;
    fp14_t e_mx;
    real   d;
    @(posedge clk);
    a = x;
    b = y;
    #8;
    e_lt = to_real(x) < to_real(y);
    e_mx = e_lt ? y : x;
    checks++;
    if (lt !== e_lt || ge !== !e_lt || mx !== e_mx) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h ? %h: got lt=%0b ge=%0b max=%h, expected lt=%0b max=%h",
                 x, y, lt, ge, mx, e_lt, e_mx);
    end
    d = to_real(x) - to_real(y);
    if (e_lt) n_lt++; else n_ge++;
    if (d == 0.0) n_eq++;
    if (d != 0.0 && d < pow2(-14) && d > -pow2(-14)) n_tiny++;
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp14_t x;
    a = '0;
    b = '0;
    apply(14'h0000, 14'h2000);   // +0 vs -0
    apply(14'h2000, 14'h0000);
    apply(14'h0100, 14'h0101);   // smallest normals, one step apart
    apply(14'h0101, 14'h0100);
    apply(14'h2100, 14'h2101);
    apply(14'h1FFF, 14'h3FFF);
    apply(14'h3FFF, 14'h1FFF);
    for (int i = 0; i < 100000; i++) begin
      x = rand_fp14();
      apply(x, rand_near(x));
    end
    if (n_lt == 0 || n_ge == 0 || n_eq == 0 || n_tiny == 0) failures++;
    $display("lt=%0d ge=%0d equal=%0d sub-normal differences=%0d", n_lt, n_ge, n_eq, n_tiny);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
