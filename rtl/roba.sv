// roba -- rounding-based approximate multiplier (ROBA), combinational form.
//
// Idea: round each operand to its nearest power of two, ar and br.  Then
//     a*b = ar*b + br*a - ar*br + (a - ar)*(b - br)
// and dropping the last, small term leaves three products that each have a
// power-of-two factor, so they are plain shifts.  The result is
//     p ~= ar*b + br*a - ar*br
// computed with three barrel shifters, one adder and one subtractor.
//
// Datapath (the multiplier's block diagram):
//   sign detector -> |a|, |b|, product sign
//   rounding      -> ar, br (one-hot, plus exponents)
//   shifters      -> |b| << log2(ar), |a| << log2(br), ar << log2(br)
//   Kogge-Stone adder  (ar*b + br*a)
//   subtractor         (... - ar*br)
//   sign set           -> p
// All internal sums are 2N+1 bits wide; the result always fits in 2N bits.
//
// Ports: x, y are N-bit operands (two's complement when SIGNED, else
// unsigned); p is the 2N-bit approximate product.  With the defaults it is
// the 8 x 8 -> 16-bit block x[7:0], y[7:0], p[15:0].  No clock: the
// registered version is roba_pipe.
//
// The structure and the port names follow the document; the SIGNED switch
// (one design for the signed and the unsigned variant) and the internal
// widths are this implementation's.
module roba #(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);
  localparam int unsigned EW = $clog2(N + 1);
  localparam int unsigned PW = 2 * N + 1;

  logic [N-1:0]  mag_a, mag_b;
  logic          neg;
  logic [N:0]    ar, br;
  logic [EW-1:0] ea, eb;
  logic [PW-1:0] ar_b, br_a, ar_br, sum, mag;
  logic          sum_c, no_borrow;

  roba_sign_detector #(.N(N), .SIGNED(SIGNED)) u_sign (
    .a(x), .b(y), .mag_a(mag_a), .mag_b(mag_b), .neg(neg));

  roba_rounding #(.N(N)) u_rnd_a (.mag(mag_a), .rnd(ar), .rexp(ea));
  roba_rounding #(.N(N)) u_rnd_b (.mag(mag_b), .rnd(br), .rexp(eb));

  // ar*b : |b| shifted by log2(ar)
  roba_shifter #(.IW(N), .OW(PW), .SW(EW)) u_sh_arb (
    .d(mag_b), .sh(ea), .kill(ar == '0), .q(ar_b));
  // br*a : |a| shifted by log2(br)
  roba_shifter #(.IW(N), .OW(PW), .SW(EW)) u_sh_bra (
    .d(mag_a), .sh(eb), .kill(br == '0), .q(br_a));
  // ar*br : ar shifted by log2(br)
  roba_shifter #(.IW(N+1), .OW(PW), .SW(EW)) u_sh_arbr (
    .d(ar), .sh(eb), .kill(br == '0), .q(ar_br));

  kogge_stone_adder #(.W(PW)) u_add (
    .a(ar_b), .b(br_a), .cin(1'b0), .sum(sum), .cout(sum_c));

  roba_subtractor #(.W(PW)) u_sub (
    .a(sum), .b(ar_br), .diff(mag), .no_borrow(no_borrow));

  roba_sign_set #(.WO(2*N), .SIGNED(SIGNED)) u_sset (
    .mag(mag[2*N-1:0]), .neg(neg), .p(p));

  // The sum of two 2N-bit shifted terms fits in PW bits, and the
  // approximation never goes below zero.
  always_comb begin
    assert (!sum_c)     else $error("roba: adder overflow");
    assert (no_borrow)  else $error("roba: negative approximate product");
    assert (!mag[2*N])  else $error("roba: product wider than 2N bits");
  end
endmodule
