// Testbench of hybrid_core. 8-bit mode: random 8-bit weights in -64..127,
// encoded into four planes; the four partial results combined as
// 64*DP3 + 16*DP2 + 4*DP1 + DP0 must equal sum A_i*W_i. 2-bit mode: four
// kernels of weights in {-1,0,1}; DP_j must equal sum A_i*W_ji. The mode is
// switched between dot products, and each result must come 5 cycles after
// the last word.
module tb_hybrid_core;
  import hdp_pkg::*;
  localparam int LATENCY = 5;
  logic clk = 0, rst_n = 0;
  wmode_e wmode = WMODE_8;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [WORD_W-1:0] act, wgt;
  logic [NCELL-1:0][ACC_W-1:0] dp;
  logic dp_valid;
  int checks = 0, failures = 0, cycle = 0, n8 = 0, n2 = 0;
  typedef struct { bit m8; int e[4]; int due; } exp_t;
  exp_t exp_q[$];

  hybrid_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && dp_valid) begin
      exp_t x;
      x = exp_q.pop_front();
      checks++;
      if (cycle != x.due) begin
        failures++;
        $display("FAIL latency at %0d due %0d", cycle, x.due);
      end
      if (x.m8) begin
        longint comb;
        comb = 64 * longint'($signed(dp[3])) + 16 * longint'($signed(dp[2]))
             + 4 * longint'($signed(dp[1])) + longint'($signed(dp[0]));
        checks++;
        if (comb != longint'(x.e[0])) begin
          failures++;
          if (failures < 10) $display("FAIL 8-bit got=%0d exp=%0d", comb, x.e[0]);
        end
      end else begin
        for (int j = 0; j < NCELL; j++) begin
          checks++;
          if (int'($signed(dp[j])) != x.e[j]) begin
            failures++;
            if (failures < 10) $display("FAIL 2-bit DP%0d got=%0d exp=%0d", j, $signed(dp[j]), x.e[j]);
          end
        end
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      int len;
      exp_t x;
      x.m8 = (n % 3) != 1;
      len  = $urandom_range(1, 8);
      x.e  = '{0, 0, 0, 0};
      // the mode changes only between dot products, once the pipeline is empty
      @(posedge clk);
      #1 in_valid = 0;
      repeat (LATENCY + 1) @(posedge clk);
      #1 wmode = x.m8 ? WMODE_8 : WMODE_2;
      if (x.m8) n8++; else n2++;
      for (int w = 0; w < len; w++) begin
        if (w > 0) begin
          @(posedge clk);
          #1;
        end
        in_valid = 1;
        in_first = (w == 0);
        in_last  = (w == len - 1);
        for (int i = 0; i < NACT; i++) begin
          int a;
          a = (n < 2) ? 255 : $urandom_range(0, 255);
          act[8*i +: 8] = 8'(a);
          if (x.m8) begin
            int wv;
            logic [3:0][1:0] c;
            wv = (n < 2) ? ((n == 0) ? 127 : -64) : int'($urandom_range(0, 191)) - 64;
            c  = encode_w8(wv);
            for (int j = 0; j < NCELL; j++) wgt[16*j + 2*i +: 2] = c[j];
            x.e[0] += a * wv;
          end else begin
            for (int j = 0; j < NCELL; j++) begin
              int wv;
              wv = int'($urandom_range(0, 2)) - 1;
              wgt[16*j + 2*i +: 2] = encode_w2(wv);
              x.e[j] += a * wv;
            end
          end
        end
        if (w == len - 1) begin
          x.due = cycle + LATENCY;
          exp_q.push_back(x);
        end
      end
    end
    @(posedge clk);
    #1 in_valid = 0;
    repeat (10) @(posedge clk);
    checks += 3;
    if (exp_q.size() != 0) begin failures++; $display("FAIL results missing"); end
    if (n8 == 0) failures++;
    if (n2 == 0) failures++;
    $display("8-bit dot products %0d, 2-bit dot products %0d", n8, n2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
