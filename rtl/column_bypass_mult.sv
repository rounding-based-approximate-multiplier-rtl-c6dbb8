// column_bypass_mult -- N x N unsigned carry-save array multiplier with
// column bypassing.
//
// Array: cell (j, i), row j = 1..N-1, column i = 0..N-1, is a full adder
// of weight 2^(i+j) adding the partial product a_i & b_j, the sum from
// cell (j-1, i+1) and the carry from cell (j-1, i).  Row 0 holds only the
// partial products a_i & b_0.  Product bit j is the sum of cell (j, 0); the
// upper N bits come from a final ripple-carry adder over the last row's sums
// and carries.
//
// Bypassing: every cell of column i uses multiplicand bit a_i, and its
// carry-in comes from the cell above in the same column.  When a_i = 0 the
// partial product is 0 and, by induction down the column, so is every
// carry-in, so the cell's sum equals its sum-in.  Each cell therefore has
// its adder inputs gated by a_i and a multiplexer that, when a_i = 0, takes
// the sum-in straight through and drives the carry-out to 0.  A zero bit of
// the multiplicand thus leaves a whole column of adders idle, which saves
// switching power; the product stays exact.
//
// Ports a, b (N bits), c (2N bits); combinational.  Defaults are the
// 16 x 16 multiplier of the document's schematic and simulation, whose
// ports are a[15:0], b[15:0], c[31:0].  The gating-plus-multiplexer cell
// follows the document's description of column skipping; the exact array
// wiring and the ripple-carry final row are this implementation's.
module column_bypass_mult #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] c
);
  logic [N-1:0] s  [N];   // sum out of row j, column i
  logic [N-1:0] cy [N];   // carry out of row j, column i
  logic [N:0]   rc;       // final ripple carries
  logic [N-1:0] fs;       // sum inputs of the final row

  for (genvar i = 0; i < N; i++) begin : g_row0
    assign s[0][i]  = a[i] & b[0];
    assign cy[0][i] = 1'b0;
  end

  for (genvar j = 1; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_cell
      logic sin, fa_a, fa_b, fa_c, fa_s, fa_co;
      assign sin = (i + 1 < N) ? s[j-1][(i+1)%N] : 1'b0;
      // Gated full-adder inputs: idle when the column is bypassed.
      assign fa_a  = a[i] & b[j];
      assign fa_b  = a[i] & sin;
      assign fa_c  = a[i] & cy[j-1][i];
      assign fa_s  = fa_a ^ fa_b ^ fa_c;
      assign fa_co = (fa_a & fa_b) | (fa_a & fa_c) | (fa_b & fa_c);
      // Bypass multiplexer.
      assign s[j][i]  = a[i] ? fa_s  : sin;
      assign cy[j][i] = a[i] ? fa_co : 1'b0;
    end
  end

  // Lower half: one product bit per row.
  for (genvar j = 0; j < N; j++) begin : g_low
    assign c[j] = s[j][0];
  end

  // Upper half: ripple-carry addition of the last row's sums and carries.
  assign fs    = {1'b0, s[N-1][N-1:1]};
  assign rc[0] = 1'b0;
  for (genvar i = 0; i < N; i++) begin : g_final
    assign c[N+i]  = fs[i] ^ cy[N-1][i] ^ rc[i];
    assign rc[i+1] = (fs[i] & cy[N-1][i]) | (fs[i] & rc[i]) | (cy[N-1][i] & rc[i]);
  end

  // Two N-bit rows never carry out of the 2N-bit product.
  always_comb
    assert (!rc[N]) else $error("column_bypass_mult: final adder overflow");
endmodule
