// End-to-end testbench of hdp_accel at a reduced size (2 rows x 8 columns of
// hybrid cores, small memories), for a quick build. tb_hdp_accel_full runs
// the same sequence on the accelerator at its default size.
//
// A small network is run through the accelerator, one pass at a time, with
// the feature map memory and the kernel memories loaded and read back through
// the external ports:
//   pass 1, 2: 3x3 convolution, 8-bit weights, 6x6x8 input images, two groups
//              of 16 kernels (32 output channels), 2x2 max pooling;
//   pass 3:    2x2 convolution, stride 2, 2-bit weights (64 kernels);
//   pass 4:    fully connected layer, 8-bit weights, on the pooled output of
//              passes 1-2 (2x2x32 values), so layers chain through the FMM;
//   pass 5:    fully connected layer, 2-bit weights, same input.
// Expected outputs are computed here as integer convolutions followed by
// ReLU, shift and saturation, and pooling. The testbench counts how often
// each mechanism happened (8-bit and 2-bit passes, pooling, credit stalls,
// ReLU clipping, saturation, kernel group offset, layer chaining) and counts
// a failure for any that never did. It also checks the pass time against the
// ideal of one word per cycle per position.
module tb_hdp_accel;
  import hdp_pkg::*;
  localparam int NROW = 2;
  localparam int NCOL = 8;
  localparam int RBW = $clog2(NROW), CBW = $clog2(NCOL);
  localparam int FAW = 10, KAW = 8;

  logic clk = 0, rst_n = 0, start = 0;
  layer_cfg_t cfg;
  logic busy, done;
  logic fmm_ext_en = 0, fmm_ext_we = 0;
  logic [RBW-1:0] fmm_ext_bank;
  logic [FAW-1:0] fmm_ext_addr;
  logic [WORD_W-1:0] fmm_ext_wdata, fmm_ext_rdata;
  logic km_we = 0;
  logic [CBW-1:0] km_col;
  logic [KAW-1:0] km_addr;
  logic [WORD_W-1:0] km_wdata;

  hdp_accel #(
    .NROW       (NROW),
    .NCOL       (NCOL),
    .FMM_DEPTH  (1 << FAW),
    .KMEM_DEPTH (1 << KAW),
    .POOL_DEPTH (64)
  ) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_w8 = 0, n_w2 = 0, n_pool = 0, n_stall = 0, n_clip = 0, n_sat = 0;
  int n_group = 0, n_chain = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && dut.stall) n_stall++;

  // model of the FMM content, per bank
  logic [WORD_W-1:0] fmm [NROW][int];

  function automatic int q(longint r, int sh);
    longint s;
    if (r <= 0) return 0;
    s = r / (longint'(1) << sh);
    return (s > 255) ? 255 : int'(s);
  endfunction

  task automatic fmm_write(int b, int a, logic [WORD_W-1:0] d);
    @(posedge clk);
    #1 fmm_ext_en = 1; fmm_ext_we = 1; fmm_ext_bank = RBW'(b);
    fmm_ext_addr = FAW'(a); fmm_ext_wdata = d;
    @(posedge clk);
    #1 fmm_ext_en = 0; fmm_ext_we = 0;
    fmm[b][a] = d;
  endtask

  task automatic fmm_check(int b, int a, string what);
    @(posedge clk);
    #1 fmm_ext_en = 1; fmm_ext_we = 0; fmm_ext_bank = RBW'(b); fmm_ext_addr = FAW'(a);
    @(posedge clk);
    #1 fmm_ext_en = 0;
    checks++;
    if (fmm_ext_rdata != fmm[b][a]) begin
      failures++;
      if (failures < 12) $display("FAIL %s bank %0d addr %0d got %h exp %h", what, b, a, fmm_ext_rdata, fmm[b][a]);
    end
  endtask

  task automatic km_write(int col, int a, logic [WORD_W-1:0] d);
    @(posedge clk);
    #1 km_we = 1; km_col = CBW'(col); km_addr = KAW'(a); km_wdata = d;
    @(posedge clk);
    #1 km_we = 0;
  endtask

  // Weights of the current layer: wt[k][n] is the weight of kernel k at window element n, where
  // n = (ky*kw + kx)*cw*8 + channel; the pass uses kernels
  // [kbase, kbase + kernels per pass).
  int wt [4 * NCOL][256];

  task automatic run_pass(layer_cfg_t c, int kbase);
    int nk, nwin, t0, t1, ideal, p, pw, ph, wpg;
    logic [WORD_W-1:0] expw [NROW][int];
    nk   = (c.wmode == WMODE_8) ? NCOL : 4 * NCOL;
    nwin = int'(c.kh) * int'(c.kw) * int'(c.cw);
    // load the kernel memories
    for (int col = 0; col < NCOL; col++)
      for (int w = 0; w < nwin; w++) begin
        logic [WORD_W-1:0] d;
        d = '0;
        for (int i = 0; i < 8; i++) begin
          if (c.wmode == WMODE_8) begin
            logic [3:0][1:0] cd;
            cd = encode_w8(wt[kbase + col][8 * w + i]);
            for (int j = 0; j < NCELL; j++) d[16 * j + 2 * i +: 2] = cd[j];
          end else begin
            for (int j = 0; j < NCELL; j++) d[16 * j + 2 * i +: 2] = encode_w2(wt[kbase + 4 * col + j][8 * w + i]);
          end
        end
        km_write(col, w, d);
      end
    // expected outputs
    p   = c.pool_en ? int'(c.pool_p) : 1;
    pw  = int'(c.ow) / p;
    ph  = int'(c.oh) / p;
    wpg = nk / 8;
    for (int b = 0; b < NROW; b++)
      for (int oy = 0; oy < int'(c.oh); oy++)
        for (int ox = 0; ox < int'(c.ow); ox++) begin
          int acts [];
          acts = new[nk];
          for (int k = 0; k < nk; k++) begin
            longint r;
            r = 0;
            for (int ky = 0; ky < int'(c.kh); ky++)
              for (int j = 0; j < int'(c.kw * c.cw); j++) begin
                int a;
                logic [WORD_W-1:0] wd;
                a  = int'(c.in_base) + ((oy * int'(c.stride) + ky) * int'(c.in_w) + ox * int'(c.stride)) * int'(c.cw) + j;
                wd = fmm[b][a];
                for (int i = 0; i < 8; i++)
                  r += longint'(wd[8 * i +: 8]) * longint'(wt[kbase + k][(ky * int'(c.kw * c.cw) + j) * 8 + i]);
              end
            acts[k] = q(r, int'(c.shift));
            if (r < 0) n_clip++;
            else if (acts[k] == 255) n_sat++;
          end
          if (!(ox / p < pw && oy / p < ph)) continue;
          for (int w = 0; w < wpg; w++) begin
            int a;
            logic [WORD_W-1:0] word;
            for (int i = 0; i < 8; i++) word[8 * i +: 8] = 8'(acts[8 * w + i]);
            a = int'(c.out_base) + ((oy / p) * pw + ox / p) * int'(c.ocw) + int'(c.och_word) + w;
            if ((oy % p == 0 && ox % p == 0) || !expw[b].exists(a)) expw[b][a] = word;
            else for (int i = 0; i < 8; i++)
              if (word[8 * i +: 8] > expw[b][a][8 * i +: 8]) expw[b][a][8 * i +: 8] = word[8 * i +: 8];
          end
        end
    // run
    @(posedge clk);
    #1 cfg = c; start = 1;
    t0 = $time;
    @(posedge clk);
    #1 start = 0;
    while (!done) @(posedge clk);
    t1 = $time;
    ideal = int'(c.oh) * int'(c.ow) * nwin;
    checks++;
    if ((t1 - t0) / 10 < ideal || (t1 - t0) / 10 > int'(c.oh) * int'(c.ow) * (nwin + NCOL + 2) + 30) begin
      failures++;
      $display("FAIL pass time %0d cycles, ideal %0d", (t1 - t0) / 10, ideal);
    end
    $display("pass: %0d cycles, %0d words per dot product, %0d positions", (t1 - t0) / 10, nwin, int'(c.oh) * int'(c.ow));
    for (int b = 0; b < NROW; b++) foreach (expw[b][a]) fmm[b][a] = expw[b][a];
    for (int b = 0; b < NROW; b++) foreach (expw[b][a]) fmm_check(b, a, "output");
    if (c.wmode == WMODE_8) n_w8++; else n_w2++;
    if (c.pool_en) n_pool++;
    if (c.och_word != 0) n_group++;
  endtask

  task automatic gen_w8();
    foreach (wt[k, i]) wt[k][i] = int'($urandom_range(0, 120)) - 60;
  endtask

  task automatic gen_w2();
    foreach (wt[k, i]) wt[k][i] = int'($urandom_range(0, 2)) - 1;
  endtask

  initial begin
    layer_cfg_t c;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // input images: 6x6 pixels, 8 channels, one word per pixel, at word 0
    for (int b = 0; b < NROW; b++)
      for (int a = 0; a < 36; a++) fmm_write(b, a, {$urandom, $urandom});

    // passes 1 and 2: conv 3x3, 8-bit weights, 32 kernels in two groups, 2x2 pool
    gen_w8();
    c = '0;
    c.wmode = WMODE_8; c.in_base = 16'd0; c.in_w = DIM_W'(6); c.cw = DIM_W'(1);
    c.kh = DIM_W'(3); c.kw = DIM_W'(3); c.stride = DIM_W'(1); c.oh = DIM_W'(4); c.ow = DIM_W'(4);
    c.out_base = 16'd100; c.ocw = DIM_W'(2 * NCOL / 8); c.och_word = DIM_W'(0); c.shift = 5'd9;
    c.pool_en = 1'b1; c.pool_p = 4'd2;
    run_pass(c, 0);
    c.och_word = DIM_W'(NCOL / 8);
    run_pass(c, NCOL);

    // pass 3: conv 2x2 stride 2, 2-bit weights, 64 kernels, no pooling
    gen_w2();
    c = '0;
    c.wmode = WMODE_2; c.in_base = 16'd0; c.in_w = DIM_W'(6); c.cw = DIM_W'(1);
    c.kh = DIM_W'(2); c.kw = DIM_W'(2); c.stride = DIM_W'(2); c.oh = DIM_W'(3); c.ow = DIM_W'(3);
    c.out_base = 16'd200; c.ocw = DIM_W'(4 * NCOL / 8); c.och_word = DIM_W'(0); c.shift = 5'd1;
    run_pass(c, 0);

    // pass 4: fully connected, 8-bit weights, input = pooled output of passes 1-2
    // (2x2 pixels x 2*NCOL channels = 16 words at word 100)
    gen_w8();
    c = '0;
    c.wmode = WMODE_8; c.in_base = 16'd100; c.in_w = DIM_W'(1); c.cw = DIM_W'(4 * 2 * NCOL / 8);
    c.kh = DIM_W'(1); c.kw = DIM_W'(1); c.stride = DIM_W'(1); c.oh = DIM_W'(1); c.ow = DIM_W'(1);
    c.out_base = 16'd400; c.ocw = DIM_W'(NCOL / 8); c.och_word = DIM_W'(0); c.shift = 5'd8;
    run_pass(c, 0);
    n_chain++;

    // pass 5: fully connected, 2-bit weights, same input
    gen_w2();
    c.wmode = WMODE_2; c.out_base = 16'd500; c.ocw = DIM_W'(4 * NCOL / 8); c.shift = 5'd2;
    run_pass(c, 0);
    n_chain++;

    $display("mechanisms: w8 %0d w2 %0d pool %0d stall %0d clip %0d sat %0d group %0d chain %0d",
             n_w8, n_w2, n_pool, n_stall, n_clip, n_sat, n_group, n_chain);
    checks += 8;
    if (n_w8 == 0) failures++;
    if (n_w2 == 0) failures++;
    if (n_pool == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_clip == 0) failures++;
    if (n_sat == 0) failures++;
    if (n_group == 0) failures++;
    if (n_chain == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
