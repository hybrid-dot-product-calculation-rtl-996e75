// Dot-product cell: one of the four cells of a hybrid core.
//
// Eight MACC units form two chains of four. The upper chain takes activations
// 0..3, the lower chain activations 4..7; each chain starts from 0. Every MACC
// output is registered, so a chain is a four-stage pipeline and the inputs of
// stage k are delayed by k cycles to meet the partial sum (the delay boxes of
// depth 1, 2, 3 in the cell drawing). The two chain sums are added and
// accumulated into DPj = sum over cycles of sum_i A_i * d_ji, where d_ji is the
// value of the 2-bit code in the selected mode. Chain structure, delays, adder
// and accumulator follow the document; the control (first/last flags) and the
// widths are this design's choice.
//
// Interface: each cycle with in_valid the cell takes the three multiples of
// eight activations (i2 = A, i1 = 2A, i0 = 3A/-A, two's complement) and eight
// 2-bit codes. in_first starts a new dot product, in_last ends it.
// Timing: dp and a one-cycle dp_valid appear 5 cycles after the in_last cycle;
// a new dot product may start in the cycle after in_last (throughput one
// input word per cycle).
module dp_cell
  import hdp_pkg::*;
#(
  parameter int unsigned ACCW = ACC_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic                          in_first,
  input  logic                          in_last,
  input  logic [NACT-1:0][MULT_W-1:0]   i2,
  input  logic [NACT-1:0][MULT_W-1:0]   i1,
  input  logic [NACT-1:0][MULT_W-1:0]   i0,
  input  logic [NACT-1:0][1:0]          code,
  output logic [ACCW-1:0]               dp,
  output logic                          dp_valid
);

  localparam int unsigned STAGES = NACT / 2;

  typedef struct packed {
    logic [MULT_W-1:0] m1;
    logic [MULT_W-1:0] m2;
    logic [MULT_W-1:0] m0;
    logic [1:0]        code;
  } operand_t;

  // Operand delay lines: dl[i][d] holds operand i delayed by d+1 cycles.
  operand_t                               op_in  [NACT];
  operand_t                               dl     [NACT][STAGES];
  operand_t                               op_use [NACT];
  // Chain registers: upper chain (chain 0) and lower chain (chain 1).
  logic [CHAIN_W-1:0]                     sum_q  [2][STAGES];
  logic [CHAIN_W-1:0]                     sum_d  [2][STAGES];
  // Control pipeline, one entry per chain stage.
  logic [STAGES-1:0]                      v_q, f_q, l_q;
  logic [ACCW-1:0]                        acc;

  function automatic logic [CHAIN_W-1:0] sx(logic [MULT_W-1:0] v);
    return {{(CHAIN_W-MULT_W){v[MULT_W-1]}}, v};
  endfunction

  always_comb begin
    for (int i = 0; i < NACT; i++) begin
      op_in[i] = '{m1: i2[i], m2: i1[i], m0: i0[i], code: code[i]};
      // Activation i sits at stage (i mod 4) of its chain.
      op_use[i] = op_in[i];
      for (int d = 1; d < STAGES; d++)
        if ((i % STAGES) == d) op_use[i] = dl[i][d-1];
    end
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NACT; i++) begin
      dl[i][0] <= op_in[i];
      for (int d = 1; d < STAGES; d++) dl[i][d] <= dl[i][d-1];
    end
  end

  for (genvar ch = 0; ch < 2; ch++) begin : g_chain
    for (genvar s = 0; s < STAGES; s++) begin : g_stage
      localparam int unsigned IDX = ch * STAGES + s;
      logic [CHAIN_W-1:0] x_in;
      if (s == 0) begin : g_head
        assign x_in = '0;
      end else begin : g_link
        assign x_in = sum_q[ch][s-1];
      end
      macc #(.W(CHAIN_W)) u_macc (
        .x  (x_in),
        .i4 (op_use[IDX].code[1]),
        .i3 (op_use[IDX].code[0]),
        .i2 (sx(op_use[IDX].m1)),
        .i1 (sx(op_use[IDX].m2)),
        .i0 (sx(op_use[IDX].m0)),
        .o  (sum_d[ch][s])
      );
      always_ff @(posedge clk) sum_q[ch][s] <= sum_d[ch][s];
    end
  end

  // Adder and accumulator behind the two chains.
  logic [ACCW-1:0] pair_sum, acc_next;
  always_comb begin
    pair_sum = ACCW'($signed(sum_q[0][STAGES-1])) + ACCW'($signed(sum_q[1][STAGES-1]));
    acc_next = (f_q[STAGES-1] ? '0 : acc) + pair_sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q      <= '0;
      f_q      <= '0;
      l_q      <= '0;
      acc      <= '0;
      dp       <= '0;
      dp_valid <= 1'b0;
    end else begin
      v_q <= {v_q[STAGES-2:0], in_valid};
      f_q <= {f_q[STAGES-2:0], in_valid & in_first};
      l_q <= {l_q[STAGES-2:0], in_valid & in_last};
      dp_valid <= 1'b0;
      if (v_q[STAGES-1]) begin
        acc <= acc_next;
        if (l_q[STAGES-1]) begin
          dp       <= acc_next;
          dp_valid <= 1'b1;
        end
      end
    end
  end

endmodule
