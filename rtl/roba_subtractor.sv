// roba_subtractor -- W-bit subtractor computing a - b.
//
// The difference is formed as a + ~b + 1 on a Kogge-Stone adder, the same
// prefix adder that performs the multiplier's addition.  `no_borrow` is the
// adder's carry-out: it is 1 when a >= b.  Combinational.
//
// In the multiplier this block removes the rounded-times-rounded term
// ar*br from (ar*b + br*a).  Reusing the Kogge-Stone adder for it is this
// implementation's choice.
module roba_subtractor #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] diff,
  output logic         no_borrow
);
  kogge_stone_adder #(.W(W)) u_ks (
    .a   (a),
    .b   (~b),
    .cin (1'b1),
    .sum (diff),
    .cout(no_borrow)
  );
endmodule
