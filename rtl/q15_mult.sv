// q15_mult -- signed Q15 x Q15 multiplier with the built-in one-bit shifter.
//
// The full 2W-bit product of two Q15 words is a Q30 number with two sign
// bits. Shifting it left by one bit and keeping the upper W bits gives the
// Q15 product, truncated toward minus infinity. Folding the shift into the
// multiplier follows the architecture; truncation (rather than rounding) and
// letting the single overflow case (-1) x (-1) wrap to -1 are choices of this
// implementation.
//
// Interface: a, b (W-bit signed Q15) in, p (W-bit signed Q15) out.
// Timing: purely combinational.
module q15_mult #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] p
);

  logic signed [2*W-1:0] full;

  // Bit 2W-1 is the redundant second sign bit; dropping it is the left shift.
  always_comb begin
    full = a * b;
    p    = full[2*W-2 -: W];
  end

endmodule
