// roba_pipe -- ROBA multiplier as a four-stage pipeline (step1..step4).
//
// Same arithmetic as the combinational `roba` (p ~= ar*b + br*a - ar*br,
// with ar, br the operands rounded to the nearest power of two), split into
// four registered stages, one per group of blocks:
//   step1  sign detector      -> |A|, |B|, product sign
//   step2  rounding           -> ar, br and their exponents
//   step3  three shifters     -> ar*b, br*a, ar*br
//   step4  adder, subtractor, sign set -> Y
// Stage names are those of the multiplier's timing report.
//
// Interface: `start` marks a valid operand pair A, B on a rising clock edge.
// Exactly four edges later Y holds the product and `op_en` is high for one
// cycle.  A new pair may be given every cycle.  Y keeps its value until the
// next result.  `rst` is synchronous and active high; it clears every
// stage, so Y reads 0 and op_en is low after reset.
//
// Port names (clk, rst, start, A, B, Y, op_en) follow the multiplier's
// simulation; the four-stage split follows the stage names of its timing
// report.  Which blocks sit in which stage, the one-cycle op_en pulse and
// the synchronous reset are this implementation's choices.
module roba_pipe #(
  parameter int unsigned N      = 8,
  parameter bit          SIGNED = 1'b1
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic [N-1:0]   A,
  input  logic [N-1:0]   B,
  output logic [2*N-1:0] Y,
  output logic           op_en
);
  localparam int unsigned EW = $clog2(N + 1);
  localparam int unsigned PW = 2 * N + 1;

  typedef struct packed {
    logic         v;
    logic         neg;
    logic [N-1:0] ma, mb;
  } step1_t;

  typedef struct packed {
    logic          v;
    logic          neg;
    logic [N-1:0]  ma, mb;
    logic [N:0]    ar, br;
    logic [EW-1:0] ea, eb;
  } step2_t;

  typedef struct packed {
    logic          v;
    logic          neg;
    logic [PW-1:0] ar_b, br_a, ar_br;
  } step3_t;

  step1_t s1, s1_d;
  step2_t s2, s2_d;
  step3_t s3, s3_d;
  logic [PW-1:0]  sum, mag;
  logic [2*N-1:0] y_d;
  logic           sum_c, no_borrow;

  // step1: sign detector
  roba_sign_detector #(.N(N), .SIGNED(SIGNED)) u_sign (
    .a(A), .b(B), .mag_a(s1_d.ma), .mag_b(s1_d.mb), .neg(s1_d.neg));
  assign s1_d.v = start;

  // step2: rounding
  roba_rounding #(.N(N)) u_rnd_a (
    .mag(s1.ma), .rnd(s2_d.ar), .rexp(s2_d.ea));
  roba_rounding #(.N(N)) u_rnd_b (
    .mag(s1.mb), .rnd(s2_d.br), .rexp(s2_d.eb));
  assign s2_d.v   = s1.v;
  assign s2_d.neg = s1.neg;
  assign s2_d.ma  = s1.ma;
  assign s2_d.mb  = s1.mb;

  // step3: shifters
  roba_shifter #(.IW(N), .OW(PW), .SW(EW)) u_sh_arb (
    .d(s2.mb), .sh(s2.ea), .kill(s2.ar == '0), .q(s3_d.ar_b));
  roba_shifter #(.IW(N), .OW(PW), .SW(EW)) u_sh_bra (
    .d(s2.ma), .sh(s2.eb), .kill(s2.br == '0), .q(s3_d.br_a));
  roba_shifter #(.IW(N+1), .OW(PW), .SW(EW)) u_sh_arbr (
    .d(s2.ar), .sh(s2.eb), .kill(s2.br == '0), .q(s3_d.ar_br));
  assign s3_d.v   = s2.v;
  assign s3_d.neg = s2.neg;

  // step4: adder, subtractor, sign set
  kogge_stone_adder #(.W(PW)) u_add (
    .a(s3.ar_b), .b(s3.br_a), .cin(1'b0), .sum(sum), .cout(sum_c));
  roba_subtractor #(.W(PW)) u_sub (
    .a(sum), .b(s3.ar_br), .diff(mag), .no_borrow(no_borrow));
  roba_sign_set #(.WO(2*N), .SIGNED(SIGNED)) u_sset (
    .mag(mag[2*N-1:0]), .neg(s3.neg), .p(y_d));

  always_ff @(posedge clk) begin
    if (rst) begin
      s1    <= '0;
      s2    <= '0;
      s3    <= '0;
      Y     <= '0;
      op_en <= 1'b0;
    end else begin
      s1    <= s1_d;
      s2    <= s2_d;
      s3    <= s3_d;
      op_en <= s3.v;
      if (s3.v)
        Y <= y_d;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst && s3.v) begin
      assert (!sum_c)    else $error("roba_pipe: adder overflow");
      assert (no_borrow) else $error("roba_pipe: negative approximate product");
      assert (!mag[2*N]) else $error("roba_pipe: product wider than 2N bits");
    end
  end
endmodule
