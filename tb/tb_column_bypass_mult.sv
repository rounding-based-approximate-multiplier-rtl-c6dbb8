// tb_column_bypass_mult -- checks the column-bypassing array multiplier against integer
// multiplication: every operand pair at 4 x 4 bits, random and corner
// operands (zero, all ones, sparse and dense bit patterns) at 16 x 16 bits,
// and the 16 x 16 operands of the document's simulations (8 * 2, 4 * 2).
module tb_column_bypass_mult;
  logic [3:0]        a4, b4;
  logic [7:0]        p4;
  logic [16-1:0]   a16, b16;
  logic [2*16-1:0] p16;
  int                checks = 0, failures = 0;

  column_bypass_mult #(.N(4))   dut4  (.a(a4),  .b(b4),  .c(p4));
  column_bypass_mult #(.N(16)) dut16 (.a(a16), .b(b16), .c(p16));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(logic [16-1:0] x, logic [16-1:0] y);
    longint e;
    a16 = x;
    b16 = y;
    #1;
    e = longint'(x) * longint'(y);
    checks++;
    if (longint'(p16) != e) begin
      failures++;
      if (failures < 10) $display("FAIL %0d * %0d = %0d, expected %0d", x, y, p16, e);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = 4'(i);
        b4 = 4'(j);
        #1;
        checks++;
        if (int'(p4) != i * j) begin
          failures++;
          $display("FAIL4 %0d * %0d = %0d", i, j, p4);
        end
      end
    check16(8, 2);
    check16(4, 2);
    check16('0, '1);
    check16('1, '1);
    check16('1, '0);
    check16({(16/2){2'b10}}, {(16/2){2'b01}});
    for (int k = 0; k < 20000; k++) begin
      case (k % 3)
        0: check16(16'($urandom), 16'($urandom));
        1: check16(16'($urandom) & 16'($urandom), 16'($urandom) & 16'($urandom));
        default: check16(16'($urandom) | 16'($urandom), 16'($urandom) | 16'($urandom));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
