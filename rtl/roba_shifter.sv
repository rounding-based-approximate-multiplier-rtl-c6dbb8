// roba_shifter -- logarithmic barrel shifter that multiplies an operand by a
// power of two.
//
// ROBA forms each of its three partial products (ar*b, br*a, ar*br) by
// shifting one value left by the exponent of a rounded operand, so no
// multiplier array is needed.  The shift is built from ceil(log2) stages,
// stage k shifting by 2^k when bit k of the shift amount is set.  When the
// rounded operand is zero the product is forced to zero through the `kill`
// input.  Combinational.
//
// That the partial products come from shifters is the multiplier's own
// structure; the logarithmic stage arrangement and the kill input are the
// choices of this implementation.
module roba_shifter #(
  parameter int unsigned IW = 9,    // input width
  parameter int unsigned OW = 17,   // output width
  parameter int unsigned SW = 4     // shift-amount width
) (
  input  logic [IW-1:0] d,
  input  logic [SW-1:0] sh,
  input  logic          kill,     // force the result to zero
  output logic [OW-1:0] q
);
  logic [OW-1:0] stage [SW+1];

  always_comb begin
    stage[0] = OW'(d);
    for (int unsigned k = 0; k < SW; k++)
      stage[k+1] = sh[k] ? (stage[k] << (1 << k)) : stage[k];
    q = kill ? '0 : stage[SW];
  end
endmodule
