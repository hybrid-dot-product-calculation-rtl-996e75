// Feature map memory (FMM).
//
// Holds the input image or input feature maps of a layer and receives its
// output activations. It is split into one bank per row of cores, so that
// every row reads its own 64-bit word of eight activations each cycle and
// writes its results back through its own port; in this design each row works
// on a different image of the batch, stored in the row's bank at the same
// addresses. A further port, used by the external-memory side while the
// accelerator is idle, reads and writes any bank. Several ports giving several
// activation words per cycle, with results written back, follow the document;
// the banking and the port details are this design's choice.
//
// Timing: reads are registered (data the cycle after rd_en). If a row write
// and an external write hit the same bank in one cycle, the row write wins.
module feature_map_memory
  import hdp_pkg::*;
#(
  parameter int unsigned NBANK = 6,
  parameter int unsigned DEPTH = 4096,   // words per bank
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned BW   = (NBANK > 1) ? $clog2(NBANK) : 1
) (
  input  logic                           clk,
  // one port per row of cores
  input  logic [NBANK-1:0]               rd_en,
  input  logic [NBANK-1:0][AW-1:0]       raddr,
  output logic [NBANK-1:0][WORD_W-1:0]   rdata,
  input  logic [NBANK-1:0]               we,
  input  logic [NBANK-1:0][AW-1:0]       waddr,
  input  logic [NBANK-1:0][WORD_W-1:0]   wdata,
  // external port
  input  logic                           ext_en,
  input  logic                           ext_we,
  input  logic [BW-1:0]                  ext_bank,
  input  logic [AW-1:0]                  ext_addr,
  input  logic [WORD_W-1:0]              ext_wdata,
  output logic [WORD_W-1:0]              ext_rdata
);

  logic [WORD_W-1:0] mem [NBANK][DEPTH];

  always_ff @(posedge clk) begin
    if (ext_en && ext_we && 32'(ext_bank) < NBANK) mem[ext_bank][ext_addr] <= ext_wdata;
    for (int b = 0; b < NBANK; b++) begin
      if (we[b]) mem[b][waddr[b]] <= wdata[b];
      if (rd_en[b]) rdata[b] <= mem[b][raddr[b]];
    end
    if (ext_en && 32'(ext_bank) < NBANK) ext_rdata <= mem[ext_bank][ext_addr];
  end

endmodule
