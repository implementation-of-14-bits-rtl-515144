// fixed_to_fp14: output conversion of the floating-point adder.
//
// Turns the signed 41-bit fixed-point sum (least significant bit 2^-22) back
// into a 14-bit floating-point number. The sign is the sum's top bit; a
// negative sum is negated to its magnitude. A priority search finds the
// leading one at position pos; the exponent is pos - 7 and the mantissa is
// the eight bits below the leading one, lower bits being truncated.
// A magnitude whose leading one lies below bit 8 is smaller than the smallest
// normal number and becomes a zero that keeps the sign of the sum, so a
// difference too small to represent still tells which operand was larger.
// A leading one at bit 39 (only reachable by adding two numbers of exponent 31
// with the same sign) saturates to the largest magnitude, exponent 31 and
// mantissa FF. The source design names only the fixed-point width and a
// "circuit of multiplexers"; the search, the signed zero and the saturation
// are this design's choices.
//
// Interface: fix in (signed, SUM_W = 41 bits); y out; underflow and overflow
// flag the two range exits. Combinational.
module fixed_to_fp14
  import fp14_pkg::*;
(
  input  logic signed [SUM_W-1:0] fix,
  output fp14_t                   y,
  output logic                    underflow,
  output logic                    overflow
);

  logic [SUM_W-1:0] mag;
  logic [5:0]       pos;
  logic             found;
  logic [SUM_W-1:0] aligned;

  always_comb begin
    mag   = fix[SUM_W-1] ? -fix : fix;
    pos   = '0;
    found = 1'b0;
    for (int i = SUM_W - 1; i >= 0; i--) begin
      if (!found && mag[i]) begin
        pos   = 6'(i);
        found = 1'b1;
      end
    end

    // Move the leading one to the top so the mantissa is a fixed slice.
    aligned = mag << (6'(SUM_W - 1) - pos);

    y.sign    = fix[SUM_W-1];
    underflow = found && (pos < 6'd8);
    overflow  = found && (pos > 6'(EXP_MAX + 7));
    if (!found || underflow) begin
      y.exp = '0;
      y.man = '0;
    end else if (overflow) begin
      y.exp = '1;
      y.man = '1;
    end else begin
      y.exp = 5'(pos - 6'd7);
      y.man = aligned[SUM_W-2 -: MAN_W];
    end
  end

endmodule
