// Testbench of act_multiples: every activation value in both weight modes,
// compared with A, 2A, 3A / -A and -A computed as integers.
module tb_act_multiples;
  import hdp_pkg::*;
  wmode_e                       wmode;
  logic [NACT-1:0][ACT_W-1:0]   act;
  logic [NACT-1:0][MULT_W-1:0]  m1, m2, msel, mneg;
  int checks = 0, failures = 0;

  act_multiples dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int expv, string what);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%0d exp=%0d", what, got, expv);
    end
  endtask

  initial begin
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < 256; v += 1) begin
        wmode = m ? WMODE_8 : WMODE_2;
        for (int i = 0; i < NACT; i++) act[i] = ACT_W'((v + 37 * i) % 256);
        #1;
        for (int i = 0; i < NACT; i++) begin
          int a;
          a = (v + 37 * i) % 256;
          chk(int'($signed(m1[i])), a, "A");
          chk(int'($signed(m2[i])), 2 * a, "2A");
          chk(int'($signed(msel[i])), m ? 3 * a : -a, "3A/-A");
          chk(int'($signed(mneg[i])), -a, "-A");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
