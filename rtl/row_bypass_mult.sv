// row_bypass_mult -- N x N unsigned array multiplier with row bypassing.
//
// Array: row j (j = 1..N-1) is an N-bit ripple-carry adder that adds the
// multiplicand gated by multiplier bit b_j (a & b_j) to the upper N bits of
// the previous row's result.  Each row hands its lowest bit down as product
// bit j and its other N bits (with its carry-out on top) to the next row;
// row 0 is simply a & b_0.  The last row's upper N bits are the upper half
// of the product.
//
// Bypassing: when b_j = 0 the row would only add zero.  Its adder inputs
// are then blocked (gated to 0, standing in for the tri-state input gates)
// and a row of multiplexers passes the previous row's bits straight on with
// a zero carry-out, so the row's adders do not switch.  The product stays
// exact; only switching activity is saved.
//
// Ports a, b (N bits), p (2N bits); combinational.  The default N = 4 is the
// 4 x 4 multiplier whose simulation shows a[3:0], b[3:0], p[7:0]; one
// caption calls the row multiplier 16 x 16, which N = 16 builds.  Gating
// plus multiplexers follows the document; tri-state gates are replaced by
// AND gating, and the ripple-carry row adders are this implementation's.
module row_bypass_mult #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N:0] acc [N];   // row results: {carry, N sum bits}

  assign acc[0] = {1'b0, a & {N{b[0]}}};

  for (genvar j = 1; j < N; j++) begin : g_row
    logic [N-1:0] hi, ga, gh, rs;
    logic [N:0]   rc;
    assign hi = acc[j-1][N:1];
    // Blocked adder inputs when the row is bypassed.
    assign ga = a  & {N{b[j]}};
    assign gh = hi & {N{b[j]}};
    assign rc[0] = 1'b0;
    for (genvar i = 0; i < N; i++) begin : g_fa
      assign rs[i]   = ga[i] ^ gh[i] ^ rc[i];
      assign rc[i+1] = (ga[i] & gh[i]) | (ga[i] & rc[i]) | (gh[i] & rc[i]);
    end
    // Bypass multiplexers.
    assign acc[j] = b[j] ? {rc[N], rs} : {1'b0, hi};
  end

  for (genvar j = 0; j < N; j++) begin : g_low
    assign p[j] = acc[j][0];
  end
  assign p[2*N-1:N] = acc[N-1][N:1];
endmodule
