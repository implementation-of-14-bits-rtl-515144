// tb_fp14_multiplier: self-checking test of fp14_multiplier.
//
// Every mantissa pair is tried with random exponents and signs (65,536
// products), followed by random operand pairs and directed corner cases:
// zero operands, the smallest and largest exponents, underflow to zero and
// exponent overflow (which keeps the low five exponent bits). Results and flags
// are compared with the real-number reference in fp14_ref_pkg. The unit is
// combinational: inputs change just after a rising clock edge and the result
// is checked one cycle later, before the next edge, i.e. within one cycle.
// A second instance runs the variant with infinity handling (HANDLE_INF = 1)
// on the same operands and is checked against its own reference.
module tb_fp14_multiplier;
  import fp14_pkg::*;
  import fp14_ref_pkg::*;

  logic  clk = 1'b0;
  fp14_t a, b, p, p_inf;
  logic  uf, of, uf_inf, of_inf;
  int    checks = 0, failures = 0;
  int    n_shift = 0, n_uf = 0, n_of = 0, n_zero = 0, n_inf = 0;

  fp14_multiplier dut (.a(a), .b(b), .p(p), .underflow(uf), .overflow(of));
  fp14_multiplier #(.HANDLE_INF(1'b1)) dut_inf (
    .a(a), .b(b), .p(p_inf), .underflow(uf_inf), .overflow(of_inf)
  );

  always #5 clk = ~clk;

  task automatic apply(fp14_t x, fp14_t y);
    enc_t r, ri;
    @(posedge clk);
    a = x;
    b = y;
    #8;  // still inside the same clock cycle
    r = ref_mul(x, y);
    checks++;
    if (p !== r.y || uf !== r.uf || of !== r.of) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h * %h: got %h uf=%0b of=%0b, expected %h uf=%0b of=%0b",
                 x, y, p, uf, of, r.y, r.uf, r.of);
    end
    ri = ref_mul_inf(x, y);
    checks++;
    if (p_inf !== ri.y || uf_inf !== ri.uf || of_inf !== ri.of) begin
      failures++;
      if (failures < 10)
        $display("FAIL inf variant %h * %h: got %h uf=%0b of=%0b, expected %h uf=%0b of=%0b",
                 x, y, p_inf, uf_inf, of_inf, ri.y, ri.uf, ri.of);
    end
    if (ri.y.exp == 5'h1f) n_inf++;
    if (r.shifted && !r.uf && x.exp != 0 && y.exp != 0) n_shift++;
    if (r.uf) n_uf++;
    if (r.of) n_of++;
    if (x.exp == 0 || y.exp == 0) n_zero++;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp14_t x, y;
    a = '0;
    b = '0;
    // Directed corner cases.
    apply(14'h0F00, 14'h0F00);                    // 1.0 * 1.0
    apply(14'h0F80, 14'h1080);                    // 1.5 * 3.0 = 4.5
    apply(14'h2F00, 14'h0000);                    // -1.0 * 0
    apply(14'h0100, 14'h0100);                    // tiny * tiny -> underflow
    apply(14'h1FFF, 14'h1FFF);                    // max * max -> wrap
    apply(14'h0E00, 14'h0100);                    // exponent sum exactly 0
    apply(14'h0E80, 14'h0180);                    // sum -1, then +1 by normalisation
    // All mantissa pairs with random exponents and signs.
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        x = rand_fp14(); y = rand_fp14();
        x.man = 8'(i); y.man = 8'(j);
        apply(x, y);
      end
    // Random pairs.
    for (int i = 0; i < 50000; i++) begin
      x = rand_fp14();
      apply(x, rand_near(x));
    end
    if (n_shift == 0 || n_uf == 0 || n_of == 0 || n_zero == 0 || n_inf == 0) begin
      failures++;
      $display("coverage hole: shift=%0d uf=%0d of=%0d zero=%0d", n_shift, n_uf, n_of, n_zero);
    end
    $display("normalisation shifts=%0d underflows=%0d overflows=%0d zero operands=%0d infinities=%0d",
             n_shift, n_uf, n_of, n_zero, n_inf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
