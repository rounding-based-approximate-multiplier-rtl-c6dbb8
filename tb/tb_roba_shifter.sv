// tb_roba_shifter -- checks the barrel shifter for every shift amount and
// random data, against multiplication by a power of two, and the kill input.
module tb_roba_shifter;
  logic [8:0]  d;
  logic [3:0]  sh;
  logic        kill;
  logic [16:0] q;
  int          checks = 0, failures = 0;

  roba_shifter #(.IW(9), .OW(17), .SW(4)) dut (.d(d), .sh(sh), .kill(kill), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    for (int s = 0; s < 16; s++) begin
      for (int k = 0; k < 200; k++) begin
        d    = 9'($urandom);
        sh   = 4'(s);
        kill = (k % 10 == 0);
        #1;
        e = kill ? 0 : ((longint'(d) * (longint'(1) << s)) % (1 << 17));
        checks++;
        if (longint'(q) != e) begin
          failures++;
          $display("FAIL d=%0d sh=%0d kill=%b q=%0d expected %0d", d, s, kill, q, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
