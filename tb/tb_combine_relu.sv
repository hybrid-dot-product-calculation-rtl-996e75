// Testbench of combine_relu: random partial results (including large and
// negative ones) in both modes and shifts; expected activations are computed
// as clamp((max(r,0)) >> shift, 0, 255) with r = 64*DP3+16*DP2+4*DP1+DP0 in
// 8-bit mode and r = DP_j in 2-bit mode.
module tb_combine_relu;
  import hdp_pkg::*;
  wmode_e wmode;
  logic [4:0] shift;
  logic [NCELL-1:0][ACC_W-1:0] dp;
  logic [NCELL-1:0][ACT_W-1:0] out_act;
  int checks = 0, failures = 0, nclip = 0, nsat = 0;

  combine_relu dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int q(longint r, int sh);
    longint s;
    if (r <= 0) return 0;
    s = r / (longint'(1) << sh);
    return (s > 255) ? 255 : int'(s);
  endfunction

  initial begin
    for (int n = 0; n < 5000; n++) begin
      longint v[4];
      int e[4];
      bit m8;
      m8 = n % 2;
      wmode = m8 ? WMODE_8 : WMODE_2;
      shift = 5'($urandom_range(0, 12));
      for (int j = 0; j < NCELL; j++) begin
        v[j] = longint'($urandom_range(0, 2000000)) - 1000000;
        if (n % 7 == 0) v[j] = v[j] / 1000;
        dp[j] = ACC_W'(v[j]);
      end
      if (m8) begin
        e = '{q(64 * v[3] + 16 * v[2] + 4 * v[1] + v[0], int'(shift)), 0, 0, 0};
        if (64 * v[3] + 16 * v[2] + 4 * v[1] + v[0] < 0) nclip++;
        else if (e[0] == 255) nsat++;
      end else begin
        for (int j = 0; j < NCELL; j++) e[j] = q(v[j], int'(shift));
      end
      #1;
      for (int j = 0; j < NCELL; j++) begin
        checks++;
        if (int'(out_act[j]) != e[j]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d j=%0d got=%0d exp=%0d", n, j, out_act[j], e[j]);
        end
      end
    end
    checks += 2;
    if (nclip == 0) failures++;
    if (nsat == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
