// roba_mac -- multiply-accumulate unit built on the pipelined ROBA
// multiplier.
//
// Each operand pair given with `start` is multiplied approximately by
// roba_pipe; when its product leaves the pipeline (four clock edges later,
// with op_en) it is added to a signed accumulator.  An operand pair given
// with `clear` high starts a new sum: its product replaces the accumulator
// instead of being added.  `clear` is delayed alongside the pipeline so that
// it acts on exactly that pair's product.  The accumulator wraps modulo
// 2^ACC_W.  With SIGNED = 0 the operands are unsigned (0..2^N-1), as for
// pixel values, and products are zero-extended before they are added.
//
// Ports: clk, rst (synchronous, active high), start, clear, A, B as for
// roba_pipe; Y and op_en are the multiplier's product and valid flag, passed
// out unchanged; acc is the running sum.  A pair's product is taken into
// acc on the edge after the one that raised op_en, five edges after start,
// and acc_valid is high for the cycle in which that new sum first shows.
//
// A MAC unit around the ROBA multiplier is what the design is evaluated as;
// its accumulator width (16 guard bits above the product, ACC_W = 32), the
// clear-with-operand control, the wrap-around and the unsigned option are
// this implementation's choices, since none of them is specified.
module roba_mac #(
  parameter int unsigned N      = 8,
  parameter int unsigned ACC_W  = 32,
  parameter bit          SIGNED = 1'b1   // 0: unsigned operands (e.g. pixels)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic                    clear,
  input  logic [N-1:0]            A,
  input  logic [N-1:0]            B,
  output logic [2*N-1:0]          Y,
  output logic                    op_en,
  output logic signed [ACC_W-1:0] acc,
  output logic                    acc_valid
);
  localparam int unsigned LAT = 4;   // roba_pipe latency

  logic [LAT-1:0]          clr_dly;  // clear flag travelling with the pair
  logic signed [ACC_W-1:0] prod;

  roba_pipe #(.N(N), .SIGNED(SIGNED)) u_mul (
    .clk(clk), .rst(rst), .start(start), .A(A), .B(B), .Y(Y), .op_en(op_en));

  // Sign- or zero-extend the product to the accumulator width.
  assign prod = SIGNED ? ACC_W'($signed(Y)) : $signed(ACC_W'(Y));

  always_ff @(posedge clk) begin
    if (rst) begin
      clr_dly   <= '0;
      acc       <= '0;
      acc_valid <= 1'b0;
    end else begin
      clr_dly   <= {clr_dly[LAT-2:0], start & clear};
      acc_valid <= op_en;
      if (op_en)
        acc <= clr_dly[LAT-1] ? prod : acc + prod;
    end
  end
endmodule
