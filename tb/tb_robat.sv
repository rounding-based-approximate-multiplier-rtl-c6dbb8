// tb_robat -- end-to-end test of the top level at its default sizes.
//
// Drives all five multipliers at once for a few thousand clock cycles:
//   * signed ROBA MAC: random and hand-picked operand pairs, issued back to
//     back and with bubbles, one in ten starting a new sum with `clear`,
//     plus a reset with results in flight; products, the four-cycle
//     start-to-op_en latency and the accumulator one edge later are checked;
//   * unsigned ROBA: random and corner operands, every result checked;
//   * column-bypassing, row-bypassing and Wallace multipliers: exact
//     products checked against integer multiplication.
// It counts how often each mechanism of the design was exercised -- rounding
// up, rounding down, a zero operand, a power-of-two operand (exact result),
// rounding up to 2^N in unsigned mode, negative products, back-to-back
// issue, pipeline bubbles, reset flush, bypassed columns, bypassed rows,
// MAC clears and accumulations --
// and counts a failure for any that never happened.
module tb_robat;
  localparam int LAT = 4;

  logic        clk = 1'b0;
  logic        rst;
  logic        start;
  logic [7:0]  A, B, ux, uy;
  logic [15:0] Y, up;
  logic        op_en, clear, acc_valid;
  logic signed [31:0] acc;
  logic [15:0] ca, cb;
  logic [31:0] cc;
  logic [3:0]  ra, rb;
  logic [7:0]  rp;
  logic [15:0] wa, wb;
  logic [31:0] wc;

  int checks = 0, failures = 0;
  int cycle  = 0;

  // mechanism counters
  int n_round_up = 0, n_round_down = 0, n_zero = 0, n_pow2 = 0, n_round_2n = 0;
  int n_negative = 0, n_back_to_back = 0, n_bubble = 0, n_flush = 0;
  int n_col_bypass = 0, n_row_bypass = 0, n_wallace = 0;
  int n_clear = 0, n_accumulate = 0;

  robat dut (
    .clk(clk), .rst(rst),
    .start(start), .clear(clear), .A(A), .B(B), .Y(Y), .op_en(op_en),
    .acc(acc), .acc_valid(acc_valid),
    .ux(ux), .uy(uy), .up(up),
    .ca(ca), .cb(cb), .cc(cc),
    .ra(ra), .rb(rb), .rp(rp),
    .wa(wa), .wb(wb), .wc(wc));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

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
    int ra_ = ref_round(ma);
    int rb_ = ref_round(mb);
    int m   = ra_ * mb + rb_ * ma - ra_ * rb_;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  // Classify one ROBA operand for the mechanism counters.
  function automatic void count_operand(int m);
    int r = ref_round(m);
    if (m == 0) n_zero++;
    else if (r == m) n_pow2++;
    else if (r > m) n_round_up++;
    else n_round_down++;
  endfunction

  int exp_val [int];
  int exp_acc [int];
  int last_y = 0;
  int run_sum = 0;
  bit prev_issue = 1'b0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard of the ROBA pipeline, just after each rising edge.
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      checks++;
      if (op_en != exp_val.exists(cycle)) begin
        failures++;
        $display("FAIL cycle %0d: op_en=%b", cycle, op_en);
      end
      checks++;
      if (exp_val.exists(cycle)) begin
        if (int'($signed(Y)) != exp_val[cycle]) begin
          failures++;
          $display("FAIL cycle %0d: Y=%0d expected %0d", cycle, $signed(Y), exp_val[cycle]);
        end
        last_y = exp_val[cycle];
        exp_val.delete(cycle);
      end else if (int'($signed(Y)) != last_y) begin
        failures++;
        $display("FAIL cycle %0d: Y changed without op_en", cycle);
      end
      checks++;
      if (acc_valid != exp_acc.exists(cycle)) begin
        failures++;
        $display("FAIL cycle %0d: acc_valid=%b", cycle, acc_valid);
      end else if (exp_acc.exists(cycle)) begin
        if (acc != exp_acc[cycle]) begin
          failures++;
          $display("FAIL cycle %0d: acc=%0d expected %0d", cycle, acc, exp_acc[cycle]);
        end
        exp_acc.delete(cycle);
      end
    end
  end

  // Combinational multipliers: new operands every falling edge, checked
  // before the next one.
  task automatic comb_step();
    longint e;
    logic [7:0] x, y;
    x  = 8'($urandom);
    y  = 8'($urandom);
    if ($urandom_range(0, 7) == 0) x = 8'($urandom_range(192, 255));
    if ($urandom_range(0, 15) == 0) y = '0;
    ux = x;
    uy = y;
    ca = 16'($urandom) & 16'($urandom);
    cb = 16'($urandom);
    ra = 4'($urandom);
    rb = 4'($urandom) & 4'($urandom);
    wa = 16'($urandom);
    wb = 16'($urandom);
    #1;
    checks++;
    if (int'(up) != ref_roba(int'(x), int'(y))) begin
      failures++;
      $display("FAIL unsigned ROBA %0d * %0d = %0d", x, y, up);
    end
    if (x >= 8'd192) n_round_2n++;
    e = longint'(ca) * longint'(cb);
    checks++;
    if (longint'(cc) != e) begin
      failures++;
      $display("FAIL column %0d * %0d = %0d", ca, cb, cc);
    end
    for (int i = 0; i < 16; i++) if (!ca[i]) n_col_bypass++;
    checks++;
    if (int'(rp) != int'(ra) * int'(rb)) begin
      failures++;
      $display("FAIL row %0d * %0d = %0d", ra, rb, rp);
    end
    for (int j = 1; j < 4; j++) if (!rb[j]) n_row_bypass++;
    e = longint'(wa) * longint'(wb);
    checks++;
    if (longint'(wc) != e) begin
      failures++;
      $display("FAIL wallace %0d * %0d = %0d", wa, wb, wc);
    end
    n_wallace++;
  endtask

  task automatic issue(int a, int b);
    A     = 8'(a);
    B     = 8'(b);
    start = 1'b1;
    clear = ($urandom_range(0, 9) == 0);
    exp_val[cycle + LAT] = ref_roba(a, b);
    if (clear) begin
      run_sum = 0;
      n_clear++;
    end else n_accumulate++;
    run_sum += ref_roba(a, b);
    exp_acc[cycle + LAT + 1] = run_sum;
    count_operand((a < 0) ? -a : a);
    count_operand((b < 0) ? -b : b);
    if (ref_roba(a, b) < 0) n_negative++;
    if (prev_issue) n_back_to_back++;
    prev_issue = 1'b1;
    comb_step();
    @(negedge clk);
    start = 1'b0;
    clear = 1'b0;
  endtask

  task automatic bubble();
    if (prev_issue) n_bubble++;
    prev_issue = 1'b0;
    comb_step();
    @(negedge clk);
  endtask

  initial begin
    rst   = 1'b1;
    start = 1'b0;
    clear = 1'b0;
    A = '0; B = '0; ux = '0; uy = '0;
    ca = '0; cb = '0; ra = '0; rb = '0; wa = '0; wb = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    issue(  37,  -5);
    issue( -61,  15);
    issue( -67, -86);
    issue(   0,  64);
    bubble();
    for (int k = 0; k < 4000; k++) begin
      if ($urandom_range(0, 4) != 0)
        issue(int'($signed(8'($urandom))), int'($signed(8'($urandom))));
      else
        bubble();
    end
    repeat (LAT + 2) bubble();
    // Reset with two results in flight.
    issue(100, 100);
    issue(-3, 7);
    rst = 1'b1;
    exp_val.delete();
    exp_acc.delete();
    last_y  = 0;
    run_sum = 0;
    @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    checks++;
    if (Y != '0 || op_en) begin
      failures++;
      $display("FAIL flush: Y=%0d op_en=%b", $signed(Y), op_en);
    end else n_flush++;
    issue(-128, -128);
    repeat (LAT + 2) bubble();
    checks++;
    if (exp_val.num() != 0 || exp_acc.num() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", exp_val.num() + exp_acc.num());
    end

    $display("mechanism counts: round_up=%0d round_down=%0d zero=%0d pow2=%0d round_to_2N=%0d",
             n_round_up, n_round_down, n_zero, n_pow2, n_round_2n);
    $display("mechanism counts: negative=%0d back_to_back=%0d bubble=%0d flush=%0d",
             n_negative, n_back_to_back, n_bubble, n_flush);
    $display("mechanism counts: column_bypass=%0d row_bypass=%0d wallace=%0d",
             n_col_bypass, n_row_bypass, n_wallace);
    $display("mechanism counts: mac_clear=%0d mac_accumulate=%0d", n_clear, n_accumulate);
    begin
      int counts [14];
      counts = '{n_round_up, n_round_down, n_zero, n_pow2, n_round_2n, n_negative,
                 n_back_to_back, n_bubble, n_flush, n_col_bypass, n_row_bypass,
                 n_wallace, n_clear, n_accumulate};
      for (int i = 0; i < 14; i++) begin
        checks++;
        if (counts[i] == 0) begin
          failures++;
          $display("FAIL mechanism %0d never exercised", i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
