// roba_sign_detector -- first block of the rounding-based approximate (ROBA)
// multiplier.  It turns the two operands into magnitudes and works out the
// sign the product will carry.
//
// In signed mode each operand is an N-bit two's-complement number; its
// magnitude is returned as an N-bit unsigned value, so the most negative
// input -2^(N-1) maps to 2^(N-1) without overflow.  The product sign is the
// XOR of the operand signs.  In unsigned mode the operands pass unchanged and
// the sign is always positive.
//
// Purely combinational.  The block, its place in front of the rounding stage
// and its outputs |a| and |b| follow the multiplier's block diagram; the
// SIGNED switch that lets one design serve both the signed and the unsigned
// variant is a choice of this implementation.
module roba_sign_detector #(
  parameter int unsigned N      = 8,     // operand width
  parameter bit          SIGNED = 1'b1   // 1: two's-complement operands
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] mag_a,   // |a|
  output logic [N-1:0] mag_b,   // |b|
  output logic         neg      // product is negative
);
  logic sa, sb;

  always_comb begin
    sa    = SIGNED && a[N-1];
    sb    = SIGNED && b[N-1];
    mag_a = sa ? (~a + 1'b1) : a;
    mag_b = sb ? (~b + 1'b1) : b;
    neg   = sa ^ sb;
  end
endmodule
