// kogge_stone_adder -- W-bit parallel-prefix adder with the Kogge-Stone
// prefix network.
//
// Bit generate g = a & b and propagate p = a ^ b are combined over
// ceil(log2 W) levels; at level k every position i >= 2^k merges its
// (G, P) pair with the one 2^k positions below it, so every position sees
// all lower bits after log2 W levels with a fan-out of two per node.  The
// carry-in is folded in as a generate into position -1, i.e. it is merged
// into bit 0's generate before the tree.  Sum bit i is p_i ^ carry_i.
// Combinational.
//
// The multiplier uses a Kogge-Stone adder for its final addition; the
// network itself is the standard textbook one.
module kogge_stone_adder #(
  parameter int unsigned W = 17
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned L = (W > 1) ? $clog2(W) : 1;

  logic [W-1:0] g [L+1];
  logic [W-1:0] p [L+1];
  logic [W-1:0] prop;
  logic [W:0]   carry;

  always_comb begin
    prop = a ^ b;
    g[0] = a & b;
    p[0] = prop;
    // Fold the carry-in into bit 0: G0 = g0 | p0 & cin.
    g[0][0] = (a[0] & b[0]) | (prop[0] & cin);
    for (int unsigned k = 0; k < L; k++) begin
      for (int unsigned i = 0; i < W; i++) begin
        if (i >= (1 << k)) begin
          g[k+1][i] = g[k][i] | (p[k][i] & g[k][i-(1<<k)]);
          p[k+1][i] = p[k][i] & p[k][i-(1<<k)];
        end else begin
          g[k+1][i] = g[k][i];
          p[k+1][i] = p[k][i];
        end
      end
    end
    carry[0] = cin;
    for (int unsigned i = 0; i < W; i++)
      carry[i+1] = g[L][i];
    sum  = prop ^ carry[W-1:0];
    cout = carry[W];
  end
endmodule
