// Testbench of result_writeback (NCOL = 8): result sets of random partial
// results arrive in raster order, at random gaps but never more than four
// outstanding (as the address generator's credits guarantee). A memory model
// collects the writes, which are compared with activations, packing,
// addresses and max pooling computed in the testbench. Passes: 8-bit mode
// without pooling, 2-bit mode with 2x2 pooling over a 5x4 map (one column of
// positions outside whole windows), 8-bit mode with 3x3 pooling.
module tb_result_writeback;
  import hdp_pkg::*;
  localparam int NCOL = 8;
  logic clk = 0, rst_n = 0, start = 0, in_valid = 0;
  layer_cfg_t cfg;
  logic [NCOL-1:0][NCELL-1:0][ACC_W-1:0] dp;
  logic we, pop, overflow;
  logic [ADDR_W-1:0] waddr;
  logic [WORD_W-1:0] wdata;
  int checks = 0, failures = 0, outstanding = 0, nwrites = 0;
  logic [WORD_W-1:0] mem_got [int];
  logic [WORD_W-1:0] mem_exp [int];

  result_writeback #(.NCOL(NCOL), .POOL_DEPTH(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && we) begin
      mem_got[int'(waddr)] = wdata;
      nwrites++;
    end
    if (rst_n && pop) outstanding--;
  end

  function automatic int q(longint r, int sh);
    longint s;
    if (r <= 0) return 0;
    s = r / (longint'(1) << sh);
    return (s > 255) ? 255 : int'(s);
  endfunction

  task automatic run(layer_cfg_t c);
    int p, pw, ph, wpg, nact;
    p    = c.pool_en ? int'(c.pool_p) : 1;
    pw   = int'(c.ow) / p;
    ph   = int'(c.oh) / p;
    nact = (c.wmode == WMODE_8) ? NCOL : 4 * NCOL;
    wpg  = nact / 8;
    mem_got.delete();
    mem_exp.delete();
    @(posedge clk);
    #1 cfg = c; start = 1;
    @(posedge clk);
    #1 start = 0;
    for (int oy = 0; oy < int'(c.oh); oy++)
      for (int ox = 0; ox < int'(c.ow); ox++) begin
        int acts [];
        acts = new[nact];
        while (outstanding >= 4) begin @(posedge clk); #1; end
        for (int k = 0; k < NCOL; k++) begin
          longint v[4];
          for (int j = 0; j < NCELL; j++) begin
            v[j] = longint'($urandom_range(0, 3000)) - 1000;
            dp[k][j] = ACC_W'(v[j]);
          end
          if (c.wmode == WMODE_8) acts[k] = q(64 * v[3] + 16 * v[2] + 4 * v[1] + v[0], int'(c.shift));
          else for (int j = 0; j < NCELL; j++) acts[4 * k + j] = q(v[j], int'(c.shift));
        end
        in_valid = 1;
        outstanding++;
        @(posedge clk);
        #1 in_valid = 0;
        repeat ($urandom_range(0, 12)) @(posedge clk);
        #1;
        // expected memory content
        if (!(ox / p < pw && oy / p < ph)) continue;
        for (int w = 0; w < wpg; w++) begin
          int a, first;
          logic [WORD_W-1:0] word;
          for (int i = 0; i < 8; i++) word[8*i +: 8] = 8'(acts[8 * w + i]);
          a = int'(c.out_base) + ((oy / p) * pw + ox / p) * int'(c.ocw) + int'(c.och_word) + w;
          first = (oy % p == 0 && ox % p == 0);
          if (first || !mem_exp.exists(a)) mem_exp[a] = word;
          else for (int i = 0; i < 8; i++)
            if (word[8*i +: 8] > mem_exp[a][8*i +: 8]) mem_exp[a][8*i +: 8] = word[8*i +: 8];
        end
      end
    repeat (3 * NCOL + 5) @(posedge clk);
    checks++;
    if (mem_got.num() != mem_exp.num()) begin
      failures++;
      $display("FAIL %0d words written, %0d expected", mem_got.num(), mem_exp.num());
    end
    foreach (mem_exp[a]) begin
      checks++;
      if (!mem_got.exists(a) || mem_got[a] != mem_exp[a]) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", a, mem_got.exists(a) ? mem_got[a] : 'x, mem_exp[a]);
      end
    end
  endtask

  initial begin
    layer_cfg_t c;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    c = '0; c.wmode = WMODE_8; c.oh = DIM_W'(3); c.ow = DIM_W'(3); c.out_base = 16'd7;
    c.ocw = DIM_W'(3); c.och_word = DIM_W'(1); c.shift = 5'd2;
    run(c);
    c = '0; c.wmode = WMODE_2; c.oh = DIM_W'(4); c.ow = DIM_W'(5); c.out_base = 16'd3;
    c.ocw = DIM_W'(4); c.och_word = DIM_W'(0); c.shift = 5'd1; c.pool_en = 1'b1; c.pool_p = 4'd2;
    run(c);
    c = '0; c.wmode = WMODE_8; c.oh = DIM_W'(6); c.ow = DIM_W'(6); c.out_base = 16'd0;
    c.ocw = DIM_W'(1); c.och_word = DIM_W'(0); c.shift = 5'd3; c.pool_en = 1'b1; c.pool_p = 4'd3;
    run(c);
    checks++;
    if (overflow) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
