// Result stage in front of a feature-map-memory write port.
//
// Takes the four dot products of one core and produces activations:
//   WMODE_8: r = 64*DP3 + 16*DP2 + 4*DP1 + DP0 (one 8x8 dot product from the
//            four 8x2 partials), one activation in out_act[0];
//   WMODE_2: r_j = DP_j, four activations (four kernels) in out_act[3:0].
// Each result then goes through ReLU, max(r, 0). Combining the partials here,
// after the whole dot product, and applying ReLU follow the document. The
// conversion back to an 8-bit activation (arithmetic right shift by 'shift',
// then saturation at 255) is this design's choice, as the document does not
// say how the wide result is requantized.
//
// Purely combinational; in WMODE_8 out_act[3:1] are 0.
module combine_relu
  import hdp_pkg::*;
#(
  parameter int unsigned ACCW = ACC_W
) (
  input  wmode_e                       wmode,
  input  logic [4:0]                   shift,
  input  logic [NCELL-1:0][ACCW-1:0]   dp,
  output logic [NCELL-1:0][ACT_W-1:0]  out_act
);

  localparam int unsigned RW = ACCW + 8;

  function automatic logic [ACT_W-1:0] relu_q(logic signed [RW-1:0] r, logic [4:0] sh);
    logic signed [RW-1:0] s;
    if (r <= 0) return '0;
    s = r >>> sh;
    if (s > RW'(2**ACT_W - 1)) return '1;
    return s[ACT_W-1:0];
  endfunction

  logic signed [RW-1:0] full;
  logic signed [RW-1:0] part [NCELL];

  always_comb begin
    for (int j = 0; j < NCELL; j++) part[j] = RW'($signed(dp[j]));
    full = (part[3] <<< 6) + (part[2] <<< 4) + (part[1] <<< 2) + part[0];
    out_act = '0;
    if (wmode == WMODE_8) begin
      out_act[0] = relu_q(full, shift);
    end else begin
      for (int j = 0; j < NCELL; j++) out_act[j] = relu_q(part[j], shift);
    end
  end

endmodule
