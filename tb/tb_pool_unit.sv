// Testbench of pool_unit: interleaved pooling windows of 1, 4 and 9 members
// on different slots; each pooled word must be the per-activation maximum of
// its window's words, produced with the last member.
module tb_pool_unit;
  import hdp_pkg::*;
  localparam int DEPTH = 16;
  logic clk = 0;
  logic in_valid = 0, first = 0, last = 0;
  logic [$clog2(DEPTH)-1:0] slot;
  logic [WORD_W-1:0] in_word, out_word;
  logic out_valid;
  int checks = 0, failures = 0;

  pool_unit #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WORD_W-1:0] ref_max [DEPTH];
    int cnt [DEPTH];
    int size [DEPTH];
    for (int s = 0; s < DEPTH; s++) begin cnt[s] = 0; size[s] = (s % 3 == 0) ? 1 : (s % 3 == 1) ? 4 : 9; end
    @(posedge clk);
    for (int n = 0; n < 3000; n++) begin
      int s;
      #1;
      s = $urandom_range(0, DEPTH - 1);
      slot = s[$clog2(DEPTH)-1:0];
      in_word = {$urandom, $urandom};
      first = (cnt[s] == 0);
      last  = (cnt[s] == size[s] - 1);
      in_valid = 1;
      if (first) ref_max[s] = in_word;
      else for (int i = 0; i < NACT; i++)
        if (in_word[8*i +: 8] > ref_max[s][8*i +: 8]) ref_max[s][8*i +: 8] = in_word[8*i +: 8];
      #1;
      checks++;
      if (out_valid != last) failures++;
      if (last) begin
        checks++;
        if (out_word != ref_max[s]) begin
          failures++;
          if (failures < 10) $display("FAIL slot %0d got %h exp %h", s, out_word, ref_max[s]);
        end
      end
      cnt[s] = last ? 0 : cnt[s] + 1;
      @(posedge clk);
    end
    #1 in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
