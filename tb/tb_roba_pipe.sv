// tb_roba_pipe -- checks the four-stage ROBA pipeline: results, a latency of
// exactly four clock edges from `start` to `op_en`, back-to-back issue,
// bubbles, Y holding between results, and synchronous reset.  Expected
// products come from the same integer reference as the combinational test.
module tb_roba_pipe;
  localparam int LAT = 4;

  logic        clk = 1'b0;
  logic        rst;
  logic        start;
  logic [7:0]  A, B;
  logic [15:0] Y;
  logic        op_en;
  int          checks = 0, failures = 0;
  int          cycle = 0;

  roba_pipe #(.N(8), .SIGNED(1'b1)) dut (
    .clk(clk), .rst(rst), .start(start), .A(A), .B(B), .Y(Y), .op_en(op_en));

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

  // Expected results, indexed by the cycle in which they must appear.
  int exp_val [int];
  int last_y = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Scoreboard: sample just after each rising edge.
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      checks++;
      if (op_en != exp_val.exists(cycle)) begin
        failures++;
        $display("FAIL cycle %0d: op_en=%b expected %b", cycle, op_en, exp_val.exists(cycle));
      end
      if (exp_val.exists(cycle)) begin
        checks++;
        if (int'($signed(Y)) != exp_val[cycle]) begin
          failures++;
          $display("FAIL cycle %0d: Y=%0d expected %0d", cycle, $signed(Y), exp_val[cycle]);
        end
        last_y = exp_val[cycle];
        exp_val.delete(cycle);
      end else begin
        checks++;
        if (int'($signed(Y)) != last_y) begin
          failures++;
          $display("FAIL cycle %0d: Y changed to %0d without op_en", cycle, $signed(Y));
        end
      end
    end
  end

  // Called at a falling edge: presents one operand pair for the next
  // rising edge, which is edge number cycle+1; its result is due with
  // edge cycle+LAT, when the scoreboard sees cycle == cycle+LAT.
  task automatic issue(int a, int b);
    A     = 8'(a);
    B     = 8'(b);
    start = 1'b1;
    exp_val[cycle + LAT] = ref_roba(a, b);
    @(negedge clk);
    start = 1'b0;
  endtask

  task automatic idle(int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    rst   = 1'b1;
    start = 1'b0;
    A     = '0;
    B     = '0;
    idle(3);
    checks++;
    if (Y != '0 || op_en) begin
      failures++;
      $display("FAIL reset: Y=%0d op_en=%b", Y, op_en);
    end
    rst = 1'b0;
    idle(1);
    // Operand pairs of the simulation waveforms, back to back.
    issue(  37,  -5);
    issue( -61,  15);
    issue( -67, -86);
    issue(  86, -27);
    issue( 126,  26);
    issue(-105, -81);
    idle(6);
    // Random traffic with bubbles.
    for (int k = 0; k < 3000; k++) begin
      if ($urandom_range(0, 3) != 0)
        issue(int'($signed(8'($urandom))), int'($signed(8'($urandom))));
      else
        idle(1);
    end
    idle(LAT + 2);
    // Reset with results in flight: they must be dropped.
    issue(100, 100);
    issue(-3, 7);
    rst = 1'b1;
    exp_val.delete();
    last_y = 0;
    idle(1);
    rst = 1'b0;
    idle(1);
    checks++;
    if (Y != '0 || op_en) begin
      failures++;
      $display("FAIL flush: Y=%0d op_en=%b", Y, op_en);
    end
    idle(LAT + 2);
    issue(-128, 127);
    idle(LAT + 2);
    checks++;
    if (exp_val.num() != 0) begin
      failures++;
      $display("FAIL %0d results never appeared", exp_val.num());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
