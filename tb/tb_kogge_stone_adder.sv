// tb_kogge_stone_adder -- checks the Kogge-Stone adder at 17 bits (random
// and corner operands) and at 5 bits (every operand pair and carry-in)
// against integer addition.
module tb_kogge_stone_adder;
  logic [16:0] a, b, s;
  logic        ci, co;
  logic [4:0]  a5, b5, s5;
  logic        ci5, co5;
  int          checks = 0, failures = 0;

  kogge_stone_adder #(.W(17)) dut   (.a(a),  .b(b),  .cin(ci),  .sum(s),  .cout(co));
  kogge_stone_adder #(.W(5))  dut5  (.a(a5), .b(b5), .cin(ci5), .sum(s5), .cout(co5));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int k = 0; k < 20000; k++) begin
      case (k % 8)
        0: begin a = '1; b = 17'(k); end
        1: begin a = 17'h0AAAA; b = 17'h15555; end
        default: begin a = 17'($urandom); b = 17'($urandom); end
      endcase
      ci = 1'($urandom);
      #1;
      e = longint'(a) + longint'(b) + longint'(ci);
      checks++;
      if ({co, s} != 18'(e)) begin
        failures++;
        $display("FAIL %0d + %0d + %0d = %0d", a, b, ci, {co, s});
      end
    end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++)
        for (int c = 0; c < 2; c++) begin
          a5 = 5'(i); b5 = 5'(j); ci5 = 1'(c);
          #1;
          checks++;
          if (int'({co5, s5}) != i + j + c) begin
            failures++;
            $display("FAIL5 %0d + %0d + %0d = %0d", i, j, c, {co5, s5});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
