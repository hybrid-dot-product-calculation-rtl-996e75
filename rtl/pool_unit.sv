// Max-pooling unit with a local memory of partial results.
//
// Outputs of a layer followed by pooling arrive one 64-bit word (eight
// activations) at a time. The word belonging to pooling window 'slot' is kept
// in a local memory until the other members of the window have arrived: the
// first member is stored, later members are merged by a per-activation
// unsigned maximum, and the last member produces the pooled word on 'out_word'
// with out_valid in the same cycle. Keeping outputs in a local memory until
// the window is complete follows the document; maximum pooling and the
// slot/first/last interface are this design's choice.
//
// Timing: combinational from input to output; the memory is written at the
// clock edge. A word that is both first and last passes straight through.
module pool_unit
  import hdp_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  localparam int unsigned SW   = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               in_valid,
  input  logic [SW-1:0]      slot,
  input  logic               first,
  input  logic               last,
  input  logic [WORD_W-1:0]  in_word,
  output logic               out_valid,
  output logic [WORD_W-1:0]  out_word
);

  logic [WORD_W-1:0] mem [DEPTH];
  logic [WORD_W-1:0] merged;

  always_comb begin
    for (int i = 0; i < NACT; i++) begin
      logic [ACT_W-1:0] a, b;
      a = in_word[ACT_W*i +: ACT_W];
      b = mem[slot][ACT_W*i +: ACT_W];
      merged[ACT_W*i +: ACT_W] = (first || a > b) ? a : b;
    end
    out_valid = in_valid & last;
    out_word  = merged;
  end

  always_ff @(posedge clk) begin
    if (in_valid && !last) mem[slot] <= merged;
  end

endmodule
