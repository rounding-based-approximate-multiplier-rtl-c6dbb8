// roba_rounding -- rounds an unsigned magnitude to the nearest power of two.
//
// The position p of the leading one is found first.  If the bit just below
// it is also set, the value is at least 1.5 * 2^p and rounds up to 2^(p+1);
// otherwise it rounds down to 2^p.  A value exactly halfway between two
// powers (3 * 2^(p-1)) therefore rounds up.  Zero rounds to zero (rnd = 0),
// which the shifters use to force their products to zero.
//
// The rounded value is returned one-hot (N+1 bits, since an unsigned N-bit
// value such as 255 can round up to 2^N) together with its exponent, which
// drives the shift amount of the barrel shifters.  Combinational.
//
// Rounding to the nearest power of two is the idea the multiplier is built
// on.  The leading-one search and the halfway rule (round up) are this
// implementation's; they agree with every rounded value shown in the
// multiplier's simulation waveforms (for example 86 -> 64, 27 -> 32,
// 105 -> 128, 81 -> 64).
module roba_rounding #(
  parameter int unsigned N  = 8,                 // magnitude width
  parameter int unsigned EW = $clog2(N + 1)      // exponent width
) (
  input  logic [N-1:0]  mag,
  output logic [N:0]    rnd,    // 2^rexp, or 0 when mag == 0
  output logic [EW-1:0] rexp    // exponent of the rounded value
);
  logic [EW-1:0] lead;   // leading-one position
  logic          below;  // bit under the leading one

  always_comb begin
    lead  = '0;
    below = 1'b0;
    for (int unsigned i = 0; i < N; i++) begin
      if (mag[i]) begin
        lead  = EW'(i);
        below = (i > 0) ? mag[i-1] : 1'b0;
      end
    end
    rexp = lead + EW'(below);
    rnd  = (mag == '0) ? '0 : ((N+1)'(1) << rexp);
  end
endmodule
