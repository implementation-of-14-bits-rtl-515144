// fp14_to_fixed: input conversion of the floating-point adder.
//
// Brings a 14-bit floating-point number to a common scale so that two numbers
// can be added as integers. The 9-bit significand {1, man} is shifted left by
// (exp - 1) places, which puts every representable value on one grid whose
// least significant bit weighs 2^-22; the largest exponent, 31, reaches bit 38.
// A negative number is then turned into its two's complement, giving a signed
// 40-bit fixed-point value. Exponent field 0 gives 0.
// The 40-bit width and the two's complement step follow the source design;
// the shift by (exp - 1) and the zero encoding are this design's reading of it.
//
// Interface: x in, fix out (signed, FIX_W = 40 bits). Combinational.
module fp14_to_fixed
  import fp14_pkg::*;
(
  input  fp14_t                   x,
  output logic signed [FIX_W-1:0] fix
);

  logic [FIX_W-1:0] mag;

  always_comb begin
    if (x.exp == '0) begin
      mag = '0;
    end else begin
      mag = {{(FIX_W-SIG_W){1'b0}}, 1'b1, x.man} << (x.exp - 5'd1);
    end
    fix = x.sign ? -$signed(mag) : $signed(mag);
  end

endmodule
