// tb_roba_sign_set -- checks that the sign set negates a product magnitude
// when the sign is negative (signed mode) and never in unsigned mode.
module tb_roba_sign_set;
  logic [15:0] mag;
  logic        neg;
  logic [15:0] ps, pu;
  int          checks = 0, failures = 0;

  roba_sign_set #(.WO(16), .SIGNED(1'b1)) dut_s (.mag(mag), .neg(neg), .p(ps));
  roba_sign_set #(.WO(16), .SIGNED(1'b0)) dut_u (.mag(mag), .neg(neg), .p(pu));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    for (int k = 0; k < 10000; k++) begin
      m   = (k < 3) ? k : int'($urandom_range(0, 32768));
      mag = 16'(m);
      neg = 1'($urandom);
      #1;
      checks++;
      if (int'($signed(ps)) != (neg ? -m : m)) begin
        failures++;
        $display("FAIL signed mag=%0d neg=%b p=%0d", m, neg, $signed(ps));
      end
      checks++;
      if (int'(pu) != m) begin
        failures++;
        $display("FAIL unsigned mag=%0d p=%0d", m, pu);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
