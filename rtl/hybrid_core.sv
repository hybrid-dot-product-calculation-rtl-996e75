// Hybrid core: eight activations against one 64-bit weight word per cycle.
//
// The core forms the activation multiples once (act_multiples) and feeds four
// dot-product cells. Cell j reads weight plane j (bits [16j+15:16j] of the
// weight word, eight 2-bit codes). Cells 0..2 receive 3A or -A on their i0
// input depending on the layer's weight size; cell 3 always receives -A.
//   WMODE_2: plane j holds eight 2-bit weights of kernel j; the core returns
//            four independent dot products DP0..DP3 (four kernels).
//   WMODE_8: plane j holds digit j of eight 8-bit weights; DP0..DP3 are the
//            partial dot products that the result path combines as
//            64*DP3 + 16*DP2 + 4*DP1 + DP0.
// This organisation follows the document.
//
// Interface: act is one 64-bit activation word (activation i in bits
// [8i+7:8i], unsigned), wgt one 64-bit weight word. in_first / in_last mark
// the first and last word of a dot product. Timing: dp[] and a one-cycle
// dp_valid appear 5 cycles after the in_last word; one word per cycle.
module hybrid_core
  import hdp_pkg::*;
#(
  parameter int unsigned ACCW = ACC_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  wmode_e                      wmode,
  input  logic                        in_valid,
  input  logic                        in_first,
  input  logic                        in_last,
  input  logic [WORD_W-1:0]           act,
  input  logic [WORD_W-1:0]           wgt,
  output logic [NCELL-1:0][ACCW-1:0]  dp,
  output logic                        dp_valid
);

  logic [NACT-1:0][MULT_W-1:0] m1, m2, msel, mneg;
  logic [NCELL-1:0]            cell_valid;

  act_multiples u_mult (
    .wmode (wmode),
    .act   (act),
    .m1    (m1),
    .m2    (m2),
    .msel  (msel),
    .mneg  (mneg)
  );

  for (genvar j = 0; j < NCELL; j++) begin : g_cell
    logic [NACT-1:0][1:0] code;
    assign code = wgt[16*j +: 16];
    dp_cell #(.ACCW(ACCW)) u_cell (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (in_valid),
      .in_first (in_first),
      .in_last  (in_last),
      .i2       (m1),
      .i1       (m2),
      .i0       ((j == NCELL-1) ? mneg : msel),
      .code     (code),
      .dp       (dp[j]),
      .dp_valid (cell_valid[j])
    );
  end

  // All cells run in lockstep; cell 0 speaks for the core.
  assign dp_valid = cell_valid[0];

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    (cell_valid == '0) || (cell_valid == '1));

endmodule
