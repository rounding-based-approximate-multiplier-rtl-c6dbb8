// wallace_mult -- N x N unsigned Wallace tree multiplier.
//
// The N*N partial products a_i & b_j are placed in 2N columns by weight.
// Each reduction layer then walks every column: groups of three bits go
// through a full adder (sum stays in the column, carry moves one column
// up), a remaining pair goes through a half adder, and a single bit passes
// on.  Layers repeat until no column holds more than two bits; the two
// remaining rows are added by a Kogge-Stone carry-propagate adder.
// Column heights per layer are worked out at elaboration by constant
// functions, so the tree is plain wiring of full and half adders.  In layer
// l+1, column k holds first the sums of its own adders, then its own
// pass-through bit, then the carries of column k-1's adders.  For
// N = 16 the reduction takes six layers (16, 11, 8, 6, 4, 3, 2 bits per
// column at most).
//
// Ports a, b (N bits), c (2N bits); combinational.  The default is the
// 16 x 16 multiplier of the document, whose simulation shows a[15:0],
// b[15:0], c[31:0].  The reduction scheme (half and full adders down to two
// rows, then a fast adder) is the document's; the use of a Kogge-Stone
// adder for the final row is this implementation's choice.
module wallace_mult #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] c
);
  localparam int unsigned CW   = 2 * N;    // columns
  localparam int unsigned MAXH = N;        // no column ever exceeds N bits

  // Height of column k after l reduction layers.
  function automatic int unsigned col_height(int unsigned l, int unsigned k);
    int unsigned hc [CW];
    int unsigned hn [CW];
    for (int unsigned c0 = 0; c0 < CW; c0++)
      hc[c0] = (c0 < N) ? c0 + 1 : ((c0 < CW - 1) ? CW - 1 - c0 : 0);
    for (int unsigned r = 0; r < l; r++) begin
      for (int unsigned c0 = 0; c0 < CW; c0++) begin
        hn[c0] = hc[c0] / 3 + ((hc[c0] % 3 != 0) ? 1 : 0);
        if (c0 > 0)
          hn[c0] += hc[c0-1] / 3 + ((hc[c0-1] % 3 == 2) ? 1 : 0);
      end
      hc = hn;
    end
    for (int unsigned c0 = 0; c0 < CW; c0++)
      if (c0 == k) return hc[c0];
    return 0;
  endfunction

  // Number of layers until every column holds at most two bits.
  function automatic int unsigned num_layers();
    int unsigned l = 0;
    bit          tall = 1'b1;
    while (tall) begin
      tall = 1'b0;
      for (int unsigned c0 = 0; c0 < CW; c0++)
        if (col_height(l, c0) > 2) tall = 1'b1;
      if (tall) l++;
    end
    return l;
  endfunction

  localparam int unsigned NL = num_layers();

  logic [MAXH-1:0] pp  [CW];   // partial products by column
  logic [MAXH-1:0] fin [CW];   // columns after the last layer
  logic [CW-1:0]   row0, row1, sum;
  logic            cout;

  // Partial products, placed in their columns row by row.
  for (genvar k = 0; k < CW; k++) begin : g_pp
    for (genvar r = 0; r < MAXH; r++) begin : g_bit
      // Bit r of column k is a_i & b_j with j = r + max(0, k-N+1), i = k-j.
      localparam int J = r + ((k >= N) ? k - N + 1 : 0);
      if (r < col_height(0, k)) begin : g_on
        assign pp[k][r] = a[(k-J) % N] & b[J % N];
      end else begin : g_off
        assign pp[k][r] = 1'b0;
      end
    end
  end

  for (genvar l = 0; l < NL; l++) begin : g_layer
    logic [MAXH-1:0] cur [CW];   // columns before this layer
    logic [MAXH-1:0] nxt [CW];   // columns after this layer
    if (l == 0) begin : g_first
      assign cur = pp;
    end else begin : g_chain
      assign cur = g_layer[l-1].nxt;
    end
    for (genvar k = 0; k < CW; k++) begin : g_col
      localparam int unsigned H    = col_height(l, k);
      localparam int unsigned NFA  = H / 3;
      localparam int unsigned NHA  = (H % 3 == 2) ? 1 : 0;
      localparam int unsigned NPS  = (H % 3 == 1) ? 1 : 0;
      localparam int unsigned OWN  = NFA + NHA + NPS;
      localparam int unsigned HP   = (k > 0) ? col_height(l, k - 1) : 0;
      localparam int unsigned PFA  = HP / 3;
      localparam int unsigned PHA  = (HP % 3 == 2) ? 1 : 0;
      localparam int unsigned KP   = (k > 0) ? k - 1 : 0;
      localparam int unsigned HNXT = OWN + PFA + PHA;

      for (genvar g = 0; g < NFA; g++) begin : g_fa_sum
        assign nxt[k][g] = cur[k][3*g] ^ cur[k][3*g+1] ^ cur[k][3*g+2];
      end
      if (NHA == 1) begin : g_ha_sum
        assign nxt[k][NFA] = cur[k][3*NFA] ^ cur[k][3*NFA+1];
      end
      if (NPS == 1) begin : g_pass
        assign nxt[k][NFA] = cur[k][3*NFA];
      end
      for (genvar g = 0; g < PFA; g++) begin : g_fa_carry
        assign nxt[k][OWN+g] =
            (cur[KP][3*g]   & cur[KP][3*g+1]) |
            (cur[KP][3*g]   & cur[KP][3*g+2]) |
            (cur[KP][3*g+1] & cur[KP][3*g+2]);
      end
      if (PHA == 1) begin : g_ha_carry
        assign nxt[k][OWN+PFA] = cur[KP][3*PFA] & cur[KP][3*PFA+1];
      end
      for (genvar r = HNXT; r < MAXH; r++) begin : g_off
        assign nxt[k][r] = 1'b0;
      end
    end
  end

  if (NL == 0) begin : g_no_layers
    assign fin = pp;
  end else begin : g_last
    assign fin = g_layer[NL-1].nxt;
  end

  for (genvar k = 0; k < CW; k++) begin : g_rows
    assign row0[k] = fin[k][0];
    assign row1[k] = fin[k][1];
  end

  kogge_stone_adder #(.W(CW)) u_cpa (
    .a(row0), .b(row1), .cin(1'b0), .sum(sum), .cout(cout));

  assign c = sum;

  // Two rows of a 2N-bit product cannot carry out of 2N bits.
  always_comb
    assert (!cout) else $error("wallace_mult: final adder overflow");
endmodule
