// tb_fp14_units: end-to-end test of fp14_units at its default (and only) size.
//
// Part 1 applies random and near-equal operand pairs and checks all of the
// top's results (product, sum, difference, lt, ge, max and the range flags)
// against the real-number reference in fp14_ref_pkg.
// Part 2 uses the units the way a network does: a neuron computes a 16-term
// dot product by alternately multiplying a weight by an input and adding the
// product to a running sum fed back through the top's operands, and a 2x2
// max-pooling step reduces four values with three comparisons. Each step is
// checked against the reference model stepping through the same sequence.
// Every mechanism of the units must occur at least once, or a failure is
// counted: multiplier normalisation shift, multiplier underflow and exponent
// wrap, zero operands, adder cancellation, adder underflow and saturation, a
// negative difference, and both comparator outcomes.
// The units are combinational: each result is checked within the cycle its
// operands are applied.
module tb_fp14_units;
  import fp14_pkg::*;
  import fp14_ref_pkg::*;

  logic  clk = 1'b0;
  fp14_t a, b, prod, sum, diff, mx;
  logic  prod_uf, prod_of, sum_uf, sum_of, diff_uf, diff_of, lt, ge;
  int    checks = 0, failures = 0;

  typedef enum int {
    M_MUL_SHIFT, M_MUL_UF, M_MUL_WRAP, M_ZERO, M_CANCEL, M_ADD_UF, M_ADD_SAT,
    M_SUB_NEG, M_LT, M_GE, M_COUNT
  } mech_e;
  int seen[M_COUNT];

  fp14_units dut (
    .a(a), .b(b),
    .prod(prod), .prod_uf(prod_uf), .prod_of(prod_of),
    .sum(sum), .sum_uf(sum_uf), .sum_of(sum_of),
    .diff(diff), .diff_uf(diff_uf), .diff_of(diff_of),
    .lt(lt), .ge(ge), .max(mx)
  );

  always #5 clk = ~clk;

  task automatic check(string what, logic [15:0] exp, logic [15:0] got, fp14_t x, fp14_t y);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s (%h, %h): got %h expected %h", what, x, y, got, exp);
    end
  endtask

  // Apply one operand pair and check every output against the reference.
  task automatic apply(fp14_t x, fp14_t y);
    enc_t  m, s, d;
    logic  e_lt;
    @(posedge clk);
    a = x;
    b = y;
    #8;
    m = ref_mul(x, y);
    s = ref_add(x, y);
    d = ref_sub(x, y);
    e_lt = to_real(x) < to_real(y);
    check("mul", {m.uf, m.of, m.y}, {prod_uf, prod_of, prod}, x, y);
    check("add", {s.uf, s.of, s.y}, {sum_uf, sum_of, sum}, x, y);
    check("sub", {d.uf, d.of, d.y}, {diff_uf, diff_of, diff}, x, y);
    check("cmp", {e_lt, !e_lt, e_lt ? y : x}, {lt, ge, mx}, x, y);
    if (m.shifted && !m.uf && x.exp != 0 && y.exp != 0) seen[M_MUL_SHIFT]++;
    if (m.uf) seen[M_MUL_UF]++;
    if (m.of) seen[M_MUL_WRAP]++;
    if (x.exp == 0 || y.exp == 0) seen[M_ZERO]++;
    if (!s.uf && s.y.exp != 0 && s.y.exp + 1 < x.exp && s.y.exp + 1 < y.exp) seen[M_CANCEL]++;
    if (s.uf) seen[M_ADD_UF]++;
    if (s.of) seen[M_ADD_SAT]++;
    if (d.y.sign) seen[M_SUB_NEG]++;
    if (e_lt) seen[M_LT]++; else seen[M_GE]++;
  endtask

  // Small weights and activations around 1 keep the dot products in range.
  function automatic fp14_t rand_small();
    fp14_t v = rand_fp14();
    v.exp = 5'($urandom_range(17, 11));
    return v;
  endfunction

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fp14_t x, acc, acc_ref, pool_ref, pool, w[16], v[16], win[4];
    int    neurons, pools;
    a = '0;
    b = '0;

    neurons = 0;
    pools   = 0;

    // Part 1: operand pairs.
    apply(14'h1FFF, 14'h1FFF);
    apply(14'h0100, 14'h0101);
    for (int i = 0; i < 40000; i++) begin
      x = rand_fp14();
      apply(x, rand_near(x));
    end

    // Part 2a: neurons, 16-term dot products accumulated through the top.
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < 16; k++) begin
        w[k] = rand_small();
        v[k] = rand_small();
      end
      acc     = fp14_t'(0);
      acc_ref = fp14_t'(0);
      for (int k = 0; k < 16; k++) begin
        apply(w[k], v[k]);
        x = prod;
        apply(acc, x);
        acc     = sum;
        acc_ref = ref_add(acc_ref, ref_mul(w[k], v[k]).y).y;
      end
      check("neuron", 16'(acc_ref), 16'(acc), w[0], v[0]);
      neurons++;
    end

    // Part 2b: 2x2 max pooling through the comparator.
    for (int n = 0; n < 500; n++) begin
      for (int k = 0; k < 4; k++) win[k] = rand_near(rand_small());
      pool     = win[0];
      pool_ref = win[0];
      for (int k = 1; k < 4; k++) begin
        apply(pool, win[k]);
        pool = mx;
        if (to_real(win[k]) > to_real(pool_ref)) pool_ref = win[k];
      end
      check("pool", 16'(pool_ref), 16'(pool), win[0], win[1]);
      pools++;
    end

    for (int i = 0; i < M_COUNT; i++) begin
      if (seen[i] == 0) begin
        failures++;
        $display("mechanism %s never happened", mech_e'(i));
      end
    end
    $display("mul shift=%0d mul underflow=%0d mul wrap=%0d zero operand=%0d",
             seen[M_MUL_SHIFT], seen[M_MUL_UF], seen[M_MUL_WRAP], seen[M_ZERO]);
    $display("add cancel=%0d add underflow=%0d add saturate=%0d sub negative=%0d lt=%0d ge=%0d",
             seen[M_CANCEL], seen[M_ADD_UF], seen[M_ADD_SAT], seen[M_SUB_NEG], seen[M_LT], seen[M_GE]);
    $display("neurons=%0d pooling windows=%0d", neurons, pools);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
