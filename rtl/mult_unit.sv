// mult_unit -- one tap multiplier of the reconfigurable FIR filter.
//
// Multiplies a Q1.15 sample by a Q1.15 coefficient and returns the product
// quantized to 16 bits (Q1.15). The Russian Peasant Multiplier works on
// unsigned numbers, so the operands are taken as sign and magnitude: the
// magnitudes (at most 2^15, which fits in 16 bits) are multiplied by a 16 x 16
// rpm_mult and the 32-bit result is negated when the signs differ. The Q2.30
// product is shifted right by 15 (arithmetic, rounding toward minus
// infinity); the only value that does not fit, (-1)*(-1) = +1, saturates to
// 0x7FFF.
//
// When `off` (phi in the filter figure) is 1 the multiplier is switched off:
// both operands are forced to zero, so the array sees no switching and the
// product is zero.
//
// Interface: a, b, off in; p out. Combinational.
// The 16-bit operands, 16-bit quantized product and the switch-off input
// follow the document; sign-magnitude handling, truncation and saturation are
// this design's choices.
module mult_unit #(
  parameter int unsigned W      = fir_pkg::DATA_W,
  parameter int unsigned FRAC_W = fir_pkg::FRAC_W
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                off,
  output logic signed [W-1:0] p
);
  logic signed [W-1:0] ag, bg;        // operands after switch-off gating
  logic        [W-1:0] mag_a, mag_b;  // magnitudes
  logic        [2*W-1:0] mag_p;       // unsigned product
  logic signed [2*W-1:0] prod;        // signed product, Q2.30 for W = 16
  logic signed [2*W-1:0] shifted;
  logic                  neg;

  assign ag = off ? '0 : a;
  assign bg = off ? '0 : b;

  always_comb begin
    mag_a = ag[W-1] ? W'(-ag) : W'(ag);
    mag_b = bg[W-1] ? W'(-bg) : W'(bg);
  end

  rpm_mult #(.W(W)) u_rpm (
    .a(mag_a),
    .b(mag_b),
    .p(mag_p)
  );

  always_comb begin
    neg     = ag[W-1] ^ bg[W-1];
    prod    = neg ? -$signed(mag_p) : $signed(mag_p);
    shifted = prod >>> FRAC_W;
    // Saturate if the shifted product is outside the W-bit signed range.
    if (shifted > $signed((2*W)'({1'b0, {(W-1){1'b1}}})))
      p = {1'b0, {(W-1){1'b1}}};
    else if (shifted < -$signed((2*W)'({1'b1, {(W-1){1'b0}}})))
      p = {1'b1, {(W-1){1'b0}}};
    else
      p = shifted[W-1:0];
  end
endmodule
