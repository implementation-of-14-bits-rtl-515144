// tb_fixed_to_fp14: self-checking test of fixed_to_fp14.
//
// Signed 41-bit inputs are drawn with a random leading-one position, so every
// exponent, the underflow region below bit 8 and the saturating top bit are
// all reached, plus directed values (0, +-1, +-2^8, the extremes). The result
// is compared with the reference encoder applied to the input's exact value
// (input times 2^-22). Combinational: checked within the cycle.
module tb_fixed_to_fp14;
  import fp14_pkg::*;
  import fp14_ref_pkg::*;

  logic                    clk = 1'b0;
  logic signed [SUM_W-1:0] fix;
  fp14_t                   y;
  logic                    uf, of;
  int checks = 0, failures = 0;
  int n_uf = 0, n_of = 0, n_norm = 0;

  fixed_to_fp14 dut (.fix(fix), .y(y), .underflow(uf), .overflow(of));

  always #5 clk = ~clk;

  task automatic apply(logic signed [SUM_W-1:0] v);
    enc_t   r;
    real    rv;
    @(posedge clk);
    fix = v;
    #8;
    rv = real'(longint'(v)) / pow2(22);
    r  = encode(rv < 0.0, rv < 0.0 ? -rv : rv, 1'b0);
    checks++;
    if (y !== r.y || uf !== r.uf || of !== r.of) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0d: got %h uf=%0b of=%0b expected %h uf=%0b of=%0b",
                 v, y, uf, of, r.y, r.uf, r.of);
    end
    if (r.uf) n_uf++;
    else if (r.of) n_of++;
    else if (v != 0) n_norm++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [SUM_W-1:0] m;
    int               pos;
    fix = '0;
    apply('0);
    apply(41'sd1);
    apply(-41'sd1);
    apply(41'sd256);
    apply(-41'sd256);
    apply(41'sd255);
    apply({2'b01, {39{1'b0}}});
    apply({2'b00, {39{1'b1}}});
    apply({2'b10, {38{1'b0}}, 1'b1});
    for (int i = 0; i < 50000; i++) begin
      pos = $urandom_range(39, 0);
      m   = {$urandom(), $urandom()};
      m   = m & ((41'd1 << pos) - 41'd1);
      m   = m | (41'd1 << pos);
      apply($urandom_range(1, 0) != 0 ? -$signed(m) : $signed(m));
    end
    if (n_uf == 0 || n_of == 0 || n_norm == 0) failures++;
    $display("underflows=%0d overflows=%0d normal=%0d", n_uf, n_of, n_norm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
