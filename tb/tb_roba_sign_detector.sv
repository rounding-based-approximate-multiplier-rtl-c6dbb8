// tb_roba_sign_detector -- checks the sign detector of the ROBA multiplier,
// 8 bits wide, in signed and unsigned mode, over every operand value.
// Expected magnitudes come from integer arithmetic on the operands.
module tb_roba_sign_detector;
  logic [7:0] a, b;
  logic [7:0] sma, smb, uma, umb;
  logic       sneg, uneg;
  int         checks = 0, failures = 0;

  roba_sign_detector #(.N(8), .SIGNED(1'b1)) dut_s (
    .a(a), .b(b), .mag_a(sma), .mag_b(smb), .neg(sneg));
  roba_sign_detector #(.N(8), .SIGNED(1'b0)) dut_u (
    .a(a), .b(b), .mag_a(uma), .mag_b(umb), .neg(uneg));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sa, sb, ea, eb;
    for (int i = 0; i < 256; i++) begin
      for (int k = 0; k < 4; k++) begin
        a = 8'(i);
        b = 8'($urandom);
        #1;
        sa = int'($signed(a));
        sb = int'($signed(b));
        ea = (sa < 0) ? -sa : sa;
        eb = (sb < 0) ? -sb : sb;
        checks++;
        if (int'(sma) != ea || int'(smb) != eb || sneg != ((sa < 0) != (sb < 0))) begin
          failures++;
          $display("FAIL signed a=%0d b=%0d -> %0d %0d %b", sa, sb, sma, smb, sneg);
        end
        checks++;
        if (uma != a || umb != b || uneg) begin
          failures++;
          $display("FAIL unsigned a=%0d b=%0d", a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
