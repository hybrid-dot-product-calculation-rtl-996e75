// Kernel (weights) memory of one column of cores.
//
// Each column of the core array has its own kernel memory and all cores of
// the column read the same 64-bit weight word in the same cycle. A word holds
// eight 8-bit weights of one kernel, or eight 2-bit weights of each of four
// kernels, as four planes of 2-bit codes (see hdp_pkg). One memory per kernel
// column follows the document; the depth and the single write port, filled
// from external memory between kernel groups, are this design's choice.
//
// Timing: one read per cycle, data registered (valid the cycle after rd_en);
// one write per cycle.
module kernel_memory
  import hdp_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               we,
  input  logic [AW-1:0]      waddr,
  input  logic [WORD_W-1:0]  wdata,
  input  logic               rd_en,
  input  logic [AW-1:0]      raddr,
  output logic [WORD_W-1:0]  rdata
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (rd_en) rdata <= mem[raddr];
  end

endmodule
