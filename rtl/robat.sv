// robat -- top level: the rounding-based approximate multiplier (ROBA) and
// the exact array multipliers shown next to it, side by side.
//
//   * ROBA multiply-accumulate unit (roba_mac around roba_pipe, signed):
//     the main design.  8-bit two's-complement A and B enter with `start`;
//     the 16-bit approximate product Y appears four clock edges later with
//     `op_en`, and is added into the 32-bit accumulator `acc` one edge
//     after that (`acc_valid`).  `clear` with a pair starts a new sum.
//   * ROBA, unsigned, combinational (roba with SIGNED = 0): the unsigned
//     variant, 8 x 8 -> 16 bits, ports ux, uy, up.
//   * Column-bypassing array multiplier, 16 x 16 -> 32 bits (ca, cb, cc).
//   * Row-bypassing array multiplier, 4 x 4 -> 8 bits (ra, rb, rp).
//   * Wallace tree multiplier, 16 x 16 -> 32 bits (wa, wb, wc).
//
// The array and Wallace multipliers are exact; they share no signals with
// ROBA.  The aging-aware control that would choose between one- and
// two-cycle operation around the bypassing multipliers (aging indicator,
// adaptive hold logic) is not part of this RTL, so the multipliers' inputs
// and outputs are brought out as ports where it would connect.
//
// Only the MAC is clocked (clk, synchronous active-high rst); the other
// four multipliers are combinational.  The name of the top follows the multiplier's power
// report; the grouping of the five multipliers in one top is this
// implementation's.
module robat #(
  parameter int unsigned N_ROBA = 8,    // ROBA operand width
  parameter int unsigned ACC_W  = 32,   // MAC accumulator width
  parameter int unsigned N_COL  = 16,   // column-bypassing multiplier width
  parameter int unsigned N_ROW  = 4,    // row-bypassing multiplier width
  parameter int unsigned N_WAL  = 16    // Wallace multiplier width
) (
  input  logic                  clk,
  input  logic                  rst,
  // signed pipelined ROBA
  input  logic                  start,
  input  logic                  clear,
  input  logic [N_ROBA-1:0]     A,
  input  logic [N_ROBA-1:0]     B,
  output logic [2*N_ROBA-1:0]   Y,
  output logic                  op_en,
  output logic signed [ACC_W-1:0] acc,
  output logic                  acc_valid,
  // unsigned combinational ROBA
  input  logic [N_ROBA-1:0]     ux,
  input  logic [N_ROBA-1:0]     uy,
  output logic [2*N_ROBA-1:0]   up,
  // column-bypassing multiplier
  input  logic [N_COL-1:0]      ca,
  input  logic [N_COL-1:0]      cb,
  output logic [2*N_COL-1:0]    cc,
  // row-bypassing multiplier
  input  logic [N_ROW-1:0]      ra,
  input  logic [N_ROW-1:0]      rb,
  output logic [2*N_ROW-1:0]    rp,
  // Wallace tree multiplier
  input  logic [N_WAL-1:0]      wa,
  input  logic [N_WAL-1:0]      wb,
  output logic [2*N_WAL-1:0]    wc
);
  roba_mac #(.N(N_ROBA), .ACC_W(ACC_W)) u_mac (
    .clk(clk), .rst(rst), .start(start), .clear(clear), .A(A), .B(B),
    .Y(Y), .op_en(op_en), .acc(acc), .acc_valid(acc_valid));

  roba #(.N(N_ROBA), .SIGNED(1'b0)) u_roba_u (.x(ux), .y(uy), .p(up));

  column_bypass_mult #(.N(N_COL)) u_col (.a(ca), .b(cb), .c(cc));

  row_bypass_mult #(.N(N_ROW)) u_row (.a(ra), .b(rb), .p(rp));

  wallace_mult #(.N(N_WAL)) u_wal (.a(wa), .b(wb), .c(wc));
endmodule
