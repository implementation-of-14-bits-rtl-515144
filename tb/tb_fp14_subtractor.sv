// tb_fp14_subtractor: self-checking test of fp14_subtractor, d = a - b.
//
// Random operand pairs, many of them close to each other (equal exponents,
// neighbouring mantissas, opposite signs) so that cancellation is common, and
// directed corner cases: zeros, exponent 31 on both sides (saturation), and
// the smallest normal numbers (results flushed to a signed zero). Results and
// flags are compared with the real-number reference in fp14_ref_pkg. The unit
// is combinational: each result is checked within the cycle its operands are
// applied.
module tb_fp14_subtractor;
  import fp14_pkg::*;
  import fp14_ref_pkg::*;

  logic  clk = 1'b0;
  fp14_t a, b, r;
  logic  uf, of;
  int    checks = 0, failures = 0;
  int    n_uf = 0, n_of = 0, n_cancel = 0, n_neg = 0;

  fp14_subtractor dut (.a(a), .b(b), .d(r), .underflow(uf), .overflow(of));

  always #5 clk = ~clk;

  task automatic apply(fp14_t x, fp14_t y);
    enc_t e;
    @(posedge clk);
    a = x;
    b = y;
    #8;
    e = ref_sub(x, y);
    checks++;
    if (r !== e.y || uf !== e.uf || of !== e.of) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h, %h: got %h uf=%0b of=%0b, expected %h uf=%0b of=%0b",
                 x, y, r, uf, of, e.y, e.uf, e.of);
    end
    if (e.uf) n_uf++;
    if (e.of) n_of++;
    if (e.y.sign) n_neg++;
    if (!e.uf && e.y.exp != 0 && e.y.exp + 1 < x.exp && e.y.exp + 1 < y.exp) n_cancel++;
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
    apply(14'h0F00, 14'h0F00);
    apply(14'h0F00, 14'h2F00);
    apply(14'h1FFF, 14'h1FFF);
    apply(14'h3FFF, 14'h3FFF);
    apply(14'h1FFF, 14'h3FFF);
    apply(14'h0101, 14'h2100);
    apply(14'h2101, 14'h0100);
    apply(14'h0000, 14'h2000);
    apply(14'h0123, 14'h0000);
    for (int i = 0; i < 100000; i++) begin
      x = rand_fp14();
      apply(x, rand_near(x));
    end
    if (n_uf == 0 || n_of == 0 || n_cancel == 0 || n_neg == 0) failures++;
    $display("underflows=%0d overflows=%0d cancellations=%0d negative=%0d",
             n_uf, n_of, n_cancel, n_neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
