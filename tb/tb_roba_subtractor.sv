// tb_roba_subtractor -- checks a - b and the no-borrow flag at 17 bits
// against integer subtraction.
module tb_roba_subtractor;
  logic [16:0] a, b, d;
  logic        nb;
  int          checks = 0, failures = 0;

  roba_subtractor #(.W(17)) dut (.a(a), .b(b), .diff(d), .no_borrow(nb));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int k = 0; k < 20000; k++) begin
      a = 17'($urandom);
      b = (k % 4 == 0) ? a : 17'($urandom);
      if (k % 7 == 0) b = a - 17'(k % 3);
      #1;
      e = int'(a) - int'(b);
      checks++;
      if (d != 17'(e) || nb != (e >= 0)) begin
        failures++;
        $display("FAIL %0d - %0d = %0d nb=%b", a, b, d, nb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
