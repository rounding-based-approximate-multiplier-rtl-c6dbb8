// tb_roba_mac -- checks the ROBA multiply-accumulate unit: dot products of
// random signed operand vectors of random length (each started with
// `clear`), issued back to back and with bubbles.  The expected sum adds
// the integer-reference ROBA products; the accumulator must show it, with
// acc_valid, five clock edges after the last pair of the vector.
module tb_roba_mac;
  logic        clk = 1'b0;
  logic        rst, start, clear;
  logic [7:0]  A, B;
  logic [15:0] Y;
  logic        op_en, acc_valid;
  logic signed [31:0] acc;
  int          checks = 0, failures = 0;
  int          cycle = 0;

  roba_mac #(.N(8), .ACC_W(32)) dut (
    .clk(clk), .rst(rst), .start(start), .clear(clear), .A(A), .B(B),
    .Y(Y), .op_en(op_en), .acc(acc), .acc_valid(acc_valid));

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
    int ra = ref_round(ma);
    int rb = ref_round(mb);
    int m  = ra * mb + rb * ma - ra * rb;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  // Expected accumulator value per cycle in which acc_valid must be high.
  int exp_acc [int];

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      checks++;
      if (acc_valid != exp_acc.exists(cycle)) begin
        failures++;
        $display("FAIL cycle %0d: acc_valid=%b", cycle, acc_valid);
      end
      if (exp_acc.exists(cycle)) begin
        checks++;
        if (acc != exp_acc[cycle]) begin
          failures++;
          $display("FAIL cycle %0d: acc=%0d expected %0d", cycle, acc, exp_acc[cycle]);
        end
        exp_acc.delete(cycle);
      end
    end
  end

  initial begin
    int sum, len, a, b;
    rst = 1'b1; start = 1'b0; clear = 1'b0; A = '0; B = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int v = 0; v < 300; v++) begin
      len = $urandom_range(1, 25);
      sum = 0;
      for (int k = 0; k < len; k++) begin
        a = int'($signed(8'($urandom)));
        b = int'($signed(8'($urandom)));
        sum += ref_roba(a, b);
        A = 8'(a); B = 8'(b); start = 1'b1; clear = (k == 0);
        exp_acc[cycle + 5] = sum;   // running sum after this pair
        @(negedge clk);
        start = 1'b0; clear = 1'b0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);
      end
    end
    repeat (8) @(negedge clk);
    checks++;
    if (exp_acc.num() != 0) begin
      failures++;
      $display("FAIL %0d sums never appeared", exp_acc.num());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
