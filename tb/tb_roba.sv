// tb_roba -- checks the combinational ROBA multiplier, signed and unsigned,
// 8 x 8 bits, for every operand pair.  The reference rounds each magnitude
// to the nearest power of two in integer arithmetic, forms
// ar*|b| + br*|a| - ar*br and applies the product sign.  The operand pairs
// shown in the multiplier's simulation waveforms are checked by value too.
// Finally the mean relative error of the unsigned products over all
// non-zero operand pairs is measured and must round to 2.9 %, the error
// rate the design is reported with (it comes to about 2.86 %).
module tb_roba;
  logic [7:0]  x, y;
  logic [15:0] ps, pu;
  int          checks = 0, failures = 0;

  roba #(.N(8), .SIGNED(1'b1)) dut_s (.x(x), .y(y), .p(ps));
  roba #(.N(8), .SIGNED(1'b0)) dut_u (.x(x), .y(y), .p(pu));

  function automatic int ref_round(int m);
    int r = 1;
    if (m == 0) return 0;
    while (2 * r <= m) r = 2 * r;
    if (2 * m >= 3 * r) r = 2 * r;
    return r;
  endfunction

  function automatic int ref_roba(int a, int b);
    int ma = (a < 0) ? -a : a;
    int mb = (b < 0) ? -b : b;
    int ra = ref_round(ma);
    int rb = ref_round(mb);
    int m  = ra * mb + rb * ma - ra * rb;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  task automatic check_value(int a, int b, int expected);
    x = 8'(a);
    y = 8'(b);
    #1;
    checks++;
    if (int'($signed(ps)) != expected) begin
      failures++;
      $display("FAIL example %0d * %0d = %0d, expected %0d", a, b, $signed(ps), expected);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int  e, worst_rel_x1000;
    real rel_sum, mean_rel;
    worst_rel_x1000 = 0;
    rel_sum = 0.0;
    // Products read off the simulation waveforms.
    check_value(  86,  -27, -2432);
    check_value( 126,   26,  3264);
    check_value(-105,  -81,  8896);
    check_value(  37,   -5,  -180);
    check_value( -61,   15,  -912);
    check_value( -67,  -86,  5696);
    check_value(   0,  -99,     0);
    check_value(-128, -128, 16384);
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        x = 8'(i);
        y = 8'(j);
        #1;
        e = ref_roba(int'($signed(x)), int'($signed(y)));
        checks++;
        if (int'($signed(ps)) != e) begin
          failures++;
          if (failures < 10)
            $display("FAIL signed %0d * %0d = %0d, expected %0d",
                     $signed(x), $signed(y), $signed(ps), e);
        end
        e = ref_roba(i, j);
        checks++;
        if (int'(pu) != e) begin
          failures++;
          if (failures < 10)
            $display("FAIL unsigned %0d * %0d = %0d, expected %0d", i, j, pu, e);
        end
        if (i * j != 0 && 1000 * (i * j - e) / (i * j) > worst_rel_x1000)
          worst_rel_x1000 = 1000 * (i * j - e) / (i * j);
        if (i * j != 0)
          rel_sum += ((int'(pu) > i * j) ? real'(int'(pu) - i * j) : real'(i * j - int'(pu)))
                     / real'(i * j);
      end
    end
    $display("largest relative error below the exact product: %0d.%0d %%",
             worst_rel_x1000 / 10, worst_rel_x1000 % 10);
    mean_rel = 100.0 * rel_sum / real'(255 * 255);
    $display("mean relative error, unsigned, non-zero operands: %f %%", mean_rel);
    checks++;
    if (mean_rel < 2.85 || mean_rel >= 2.95) begin
      failures++;
      $display("FAIL mean relative error %f %% does not round to 2.9 %%", mean_rel);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
