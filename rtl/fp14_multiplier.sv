// fp14_multiplier: combinational product of two 14-bit floating-point numbers.
//
// How it works, following the multiplier scheme of the source design:
//   * sign: XOR of the operand signs;
//   * exponent: exp_a - 15 + exp_b, computed 7 bits wide so that bit 6 is the
//     sign of the biased sum; a second adder forms the same sum plus one;
//   * significand: one 9x9 multiplication of {1, man_a} by {1, man_b} giving an
//     18-bit product in [1, 4) with 16 fraction bits;
//   * normalisation: product bit 17 selects between the two. When it is set
//     the product is in [2, 4): exponent sum + 1 and mantissa = product[16:9].
//     Otherwise exponent sum and mantissa = product[15:8]. Dropped bits are
//     truncated;
//   * underflow: when the normalised exponent is 0 or negative, exponent and
//     mantissa are replaced by zeros.
// Overflow is not handled in the default configuration, as in the source
// design's main multiplier: an exponent above 31 keeps only its five low bits.
// The source design also reports a variant that handles infinity; HANDLE_INF = 1
// selects it. Then exponent field 31 means infinity: an infinite operand, or a
// normalised exponent of 31 or more, gives a signed infinity (exponent 31,
// mantissa 0). A zero operand still gives zero, as NaN is not represented;
// these rules of the variant are this design's choice. This design's own additions are the zero operand
// test (exponent field 0 means zero, which the source scheme does not
// detect) and flushing a normalised exponent of exactly 0, which the source
// scheme lets through as a subnormal-looking value. The source scheme prints
// product[17:10] as the mantissa for the unshifted case; that choice would keep
// the hidden one, so product[15:8] is used instead.
//
// Interface: parameter HANDLE_INF (default 0); a, b operands; p product;
// underflow and overflow flag the two exponent range exits (with HANDLE_INF,
// overflow marks a result exponent of 31 or more from finite operands).
// Timing: purely combinational, no clock.
module fp14_multiplier
  import fp14_pkg::*;
#(
  parameter bit HANDLE_INF = 1'b0
)
(
  input  fp14_t a,
  input  fp14_t b,
  output fp14_t p,
  output logic  underflow,
  output logic  overflow
);

  logic [SIG_W-1:0]   sig_a, sig_b;
  logic [2*SIG_W-1:0] prod;
  logic signed [6:0]  exp_sum, exp_inc, exp_norm;
  logic               zero_in, inf_in;

  always_comb begin
    sig_a   = {1'b1, a.man};
    sig_b   = {1'b1, b.man};
    prod    = sig_a * sig_b;

    exp_sum  = $signed({2'b00, a.exp}) - $signed(7'(BIAS)) + $signed({2'b00, b.exp});
    exp_inc  = exp_sum + 7'sd1;
    exp_norm = prod[2*SIG_W-1] ? exp_inc : exp_sum;

    zero_in   = (a.exp == '0) || (b.exp == '0);
    inf_in    = HANDLE_INF && ((a.exp == EXP_W'(EXP_MAX)) || (b.exp == EXP_W'(EXP_MAX)));
    underflow = !zero_in && !inf_in && (exp_norm <= 7'sd0);
    overflow  = !zero_in && !inf_in &&
                (HANDLE_INF ? (exp_norm >= 7'sd31) : (exp_norm > 7'sd31));

    p.sign = a.sign ^ b.sign;
    if (zero_in || underflow) begin
      p.exp = '0;
      p.man = '0;
    end else if (HANDLE_INF && (inf_in || overflow)) begin
      p.exp = '1;
      p.man = '0;
    end else begin
      p.exp = exp_norm[EXP_W-1:0];
      p.man = prod[2*SIG_W-1] ? prod[2*SIG_W-2 -: MAN_W] : prod[2*SIG_W-3 -: MAN_W];
    end
  end

endmodule
