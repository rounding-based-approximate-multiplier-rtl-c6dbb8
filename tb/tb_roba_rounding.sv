// tb_roba_rounding -- checks rounding to the nearest power of two for every
// 8-bit magnitude.  The reference doubles a power of two while it still
// fits, then rounds up when the value is at least 1.5 times that power.
module tb_roba_rounding;
  logic [7:0] mag;
  logic [8:0] rnd;
  logic [3:0] rexp;
  int         checks = 0, failures = 0;

  roba_rounding #(.N(8)) dut (.mag(mag), .rnd(rnd), .rexp(rexp));

  function automatic int ref_round(int m);
    int r = 1;
    if (m == 0) return 0;
    while (2 * r <= m) r = 2 * r;
    if (2 * m >= 3 * r) r = 2 * r;
    return r;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int m = 0; m < 256; m++) begin
      mag = 8'(m);
      #1;
      e = ref_round(m);
      checks++;
      if (int'(rnd) != e || (e != 0 && (1 << rexp) != e)) begin
        failures++;
        $display("FAIL mag=%0d rnd=%0d rexp=%0d expected %0d", m, rnd, rexp, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
