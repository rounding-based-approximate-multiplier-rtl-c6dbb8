// roba_sign_set -- last block of the ROBA multiplier: gives the unsigned
// approximate product the sign found by the sign detector.
//
// The WO-bit magnitude is replaced by its two's complement when `neg` is
// set; in unsigned mode it passes unchanged.  The caller hands over only
// the low 2N bits of its 2N+1-bit internal sum: for N-bit operands the
// approximate product never exceeds 2N bits (the callers assert this on
// valid data).  Combinational.
//
// The block and its place at the output follow the multiplier's block
// diagram; the conditional two's-complement circuit is the obvious one.
module roba_sign_set #(
  parameter int unsigned WO     = 16,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [WO-1:0] mag,
  input  logic          neg,
  output logic [WO-1:0] p
);
  always_comb
    p = (SIGNED && neg) ? (~mag + 1'b1) : mag;
endmodule
