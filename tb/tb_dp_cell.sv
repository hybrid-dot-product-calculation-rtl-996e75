// Testbench of dp_cell: streams of dot products of random length, with random
// bubbles and back-to-back starts, in both weight modes. Each result is
// compared with sum A_i * value(code_i) computed in the testbench, and must
// arrive exactly 5 cycles after the last input word.
module tb_dp_cell;
  import hdp_pkg::*;
  localparam int LATENCY = 5;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [NACT-1:0][MULT_W-1:0] i2, i1, i0;
  logic [NACT-1:0][1:0]        code;
  logic [ACC_W-1:0]            dp;
  logic                        dp_valid;
  int checks = 0, failures = 0, cycle = 0;
  int exp_q[$], due_q[$];

  dp_cell dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int code_val(logic [1:0] c, bit m8);
    case (c)
      2'b00: return 0;
      2'b11: return 1;
      2'b10: return 2;
      default: return m8 ? 3 : -1;
    endcase
  endfunction

  always @(posedge clk) begin
    if (rst_n && dp_valid) begin
      checks += 2;
      if (exp_q.size() == 0) begin
        failures += 2;
        $display("FAIL unexpected result");
      end else begin
        int e, d;
        e = exp_q.pop_front();
        d = due_q.pop_front();
        if (int'($signed(dp)) != e) begin
          failures++;
          if (failures < 10) $display("FAIL dp=%0d exp=%0d", $signed(dp), e);
        end
        if (cycle != d) begin
          failures++;
          if (failures < 10) $display("FAIL latency: at %0d, due %0d", cycle, d);
        end
      end
    end
  end

  initial begin
    int ndp;
    ndp = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      int len, sum;
      bit m8;
      len = (n < 10) ? 1 : $urandom_range(1, 9);
      m8  = $urandom_range(0, 1);
      sum = 0;
      for (int w = 0; w < len; w++) begin
        @(posedge clk);
        #1;
        // occasional bubble inside or between dot products
        if ($urandom_range(0, 4) == 0) begin
          in_valid = 0;
          i2 = '1; i1 = '1; i0 = '1; code = '1;
          @(posedge clk);
          #1;
        end
        in_valid = 1;
        in_first = (w == 0);
        in_last  = (w == len - 1);
        for (int i = 0; i < NACT; i++) begin
          int a;
          a = (n == 0) ? 255 : $urandom_range(0, 255);
          code[i] = (n == 0) ? 2'b01 : 2'($urandom_range(0, 3));
          i2[i] = MULT_W'(a);
          i1[i] = MULT_W'(2 * a);
          i0[i] = m8 ? MULT_W'(3 * a) : MULT_W'(-a);
          sum += a * code_val(code[i], m8);
        end
        if (w == len - 1) begin
          exp_q.push_back(sum);
          due_q.push_back(cycle + LATENCY);
        end
      end
      ndp++;
    end
    @(posedge clk);
    #1 in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
