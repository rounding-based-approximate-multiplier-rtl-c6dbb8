// tb_roba_smoothing -- image smoothing on the ROBA multiply-accumulate unit.
//
// A 32 x 32 grey-scale test image (8-bit pixels: a smooth sine pattern plus
// fine texture, generated here) is filtered with the 5 x 5 smoothing mask
//     1 1  1 1 1
//     1 4  4 4 1
//     1 4 12 4 1
//     1 4  4 4 1
//     1 1  1 1 1
// normalised by the sum of its coefficients (60).  Every output pixel is
// 25 back-to-back multiply-accumulate operations on an unsigned roba_mac,
// the first one issued with `clear`.  Checks:
//   * each pixel's accumulated sum equals the sum of the reference ROBA
//     products (integer model of the rounding and of ar*b + br*a - ar*br);
//   * the throughput is one operation per clock and every sum appears five
//     edges after its last operand;
//   * the PSNR of the ROBA-smoothed image against the exactly smoothed one
//     is above 40 dB, the quality level reported for smoothing with ROBA.
module tb_roba_smoothing;
  localparam int W = 32, H = 32, K = 5, NORM = 60;
  localparam int OW = W - K + 1, OH = H - K + 1;

  logic        clk = 1'b0;
  logic        rst, start, clear;
  logic [7:0]  A, B;
  logic [15:0] Y;
  logic        op_en, acc_valid;
  logic signed [31:0] acc;
  int          checks = 0, failures = 0;
  int          cycle = 0;

  roba_mac #(.N(8), .ACC_W(32), .SIGNED(1'b0)) dut (
    .clk(clk), .rst(rst), .start(start), .clear(clear), .A(A), .B(B),
    .Y(Y), .op_en(op_en), .acc(acc), .acc_valid(acc_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  int img  [H][W];
  int mask [K][K];

  function automatic int ref_round(int m);
    int r = 1;
    if (m == 0) return 0;
    while (2 * r <= m) r = 2 * r;
    if (2 * m >= 3 * r) r = 2 * r;
    return r;
  endfunction

  function automatic int ref_roba(int a, int b);
    int ra = ref_round(a);
    int rb = ref_round(b);
    return ra * b + rb * a - ra * rb;
  endfunction

  // Expected accumulator per cycle in which a pixel's sum must appear.
  int  exp_sum [int];
  int  exp_pix [int];   // output pixel index for that cycle
  int  got_sum [OH*OW];
  int  n_sums = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Sample after each edge; only the last tap of a pixel is recorded.
  always @(posedge clk) begin
    #1;
    if (!rst && exp_sum.exists(cycle)) begin
      checks++;
      if (!acc_valid || acc != exp_sum[cycle]) begin
        failures++;
        if (failures < 10)
          $display("FAIL pixel %0d: acc=%0d valid=%b expected %0d",
                   exp_pix[cycle], acc, acc_valid, exp_sum[cycle]);
      end
      got_sum[exp_pix[cycle]] = acc;
      n_sums++;
      exp_sum.delete(cycle);
    end
  end

  initial begin
    int  sum, t0, t1;
    real se, psnr;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y][x] = (128 + int'($rtoi(90.0 * $sin(0.31 * x) * $cos(0.23 * y)))
                     + (x * 37 + y * 91) % 23) & 255;
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        mask[i][j] = (i == 0 || j == 0 || i == K - 1 || j == K - 1) ? 1 :
                     ((i == 2 && j == 2) ? 12 : 4);

    rst = 1'b1; start = 1'b0; clear = 1'b0; A = '0; B = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    t0 = cycle;
    for (int oy = 0; oy < OH; oy++)
      for (int ox = 0; ox < OW; ox++) begin
        sum = 0;
        for (int i = 0; i < K; i++)
          for (int j = 0; j < K; j++) begin
            A     = 8'(img[oy+i][ox+j]);
            B     = 8'(mask[i][j]);
            start = 1'b1;
            clear = (i == 0 && j == 0);
            sum  += ref_roba(img[oy+i][ox+j], mask[i][j]);
            if (i == K - 1 && j == K - 1) begin
              exp_sum[cycle + 5] = sum;
              exp_pix[cycle + 5] = oy * OW + ox;
            end
            @(negedge clk);
          end
      end
    start = 1'b0;
    clear = 1'b0;
    t1 = cycle;
    repeat (8) @(negedge clk);

    checks++;
    if (t1 - t0 != OH * OW * K * K) begin
      failures++;
      $display("FAIL %0d cycles for %0d operations", t1 - t0, OH * OW * K * K);
    end
    checks++;
    if (n_sums != OH * OW) begin
      failures++;
      $display("FAIL %0d of %0d pixel sums seen", n_sums, OH * OW);
    end

    // PSNR of the ROBA result against exact smoothing.
    se = 0.0;
    for (int oy = 0; oy < OH; oy++)
      for (int ox = 0; ox < OW; ox++) begin
        int ex;
        ex = 0;
        for (int i = 0; i < K; i++)
          for (int j = 0; j < K; j++)
            ex += img[oy+i][ox+j] * mask[i][j];
        se += real'((ex / NORM - got_sum[oy*OW+ox] / NORM) ** 2);
      end
    psnr = (se == 0.0) ? 99.0 : 10.0 * $log10(255.0 * 255.0 * real'(OH * OW) / se);
    $display("smoothing: %0d pixels, %0d MAC operations in %0d cycles, PSNR %f dB",
             OH * OW, OH * OW * K * K, t1 - t0, psnr);
    checks++;
    if (psnr <= 40.0) begin
      failures++;
      $display("FAIL PSNR %f dB not above 40 dB", psnr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
