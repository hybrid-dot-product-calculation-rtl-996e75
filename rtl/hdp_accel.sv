// Hybrid dot-product CNN layer accelerator (top level).
//
// The accelerator runs one layer at a time as dot products between vectors of
// 8-bit activations and vectors of 8-bit or 2-bit weights. An array of
// NROW x NCOL hybrid cores does the arithmetic. Every row of cores reads one
// 64-bit word (eight activations) per cycle from its bank of the feature map
// memory (FMM) and broadcasts it along the row; every column reads one 64-bit
// weight word per cycle from its own kernel memory and broadcasts it down the
// column. In this design the rows hold different images of a batch (NROW is
// the batch size) and the columns different kernels:
//   WMODE_8: each core computes one 8x8 dot product, NCOL kernels per pass;
//   WMODE_2: each core computes four 8x2 dot products, 4*NCOL kernels.
// At the end of each dot product the results of a row pass through the row's
// result path (64/16/4/1 combination of the four partials in WMODE_8, ReLU,
// requantization, optional max pooling) and are written back into the FMM,
// where they form the input of the next layer. One pass covers one group of
// kernels; the kernel memories are then reloaded and the next group is run.
//
// Defaults follow the document's hybrid configuration: 96 cores, batch 6,
// 32 MACCs per core (4 cells x 8 MACCs). The 6 x 16 arrangement, memory
// depths, address map and flow control are this design's choice. The external
// memory and its interconnect are not part of this module: their side of the
// on-chip memories is brought out as plain ports (FMM load/store, kernel
// memory write), to be used while the accelerator is idle.
//
// Operation: load FMM and kernel memories, present cfg and pulse start while
// busy is low; busy stays high until the pass is written back, then done
// pulses for one cycle. Throughput: one word per cycle per core while result
// buffers are free; a dot product of K words takes K cycles, plus a stall
// when the row result path (NCOL cycles per position) is slower than K.
module hdp_accel
  import hdp_pkg::*;
#(
  parameter int unsigned NROW       = 6,
  parameter int unsigned NCOL       = 16,
  parameter int unsigned FMM_DEPTH  = 4096,
  parameter int unsigned KMEM_DEPTH = 2048,
  parameter int unsigned POOL_DEPTH = 256,
  parameter int unsigned QDEPTH     = 4,
  localparam int unsigned FAW = $clog2(FMM_DEPTH),
  localparam int unsigned KAW = $clog2(KMEM_DEPTH),
  localparam int unsigned RBW = (NROW > 1) ? $clog2(NROW) : 1,
  localparam int unsigned CBW = (NCOL > 1) ? $clog2(NCOL) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // layer control
  input  logic               start,
  input  layer_cfg_t         cfg,
  output logic               busy,
  output logic               done,
  // FMM load/store port (external memory side)
  input  logic               fmm_ext_en,
  input  logic               fmm_ext_we,
  input  logic [RBW-1:0]     fmm_ext_bank,
  input  logic [FAW-1:0]     fmm_ext_addr,
  input  logic [WORD_W-1:0]  fmm_ext_wdata,
  output logic [WORD_W-1:0]  fmm_ext_rdata,
  // kernel memory write port (external memory side)
  input  logic               km_we,
  input  logic [CBW-1:0]     km_col,
  input  logic [KAW-1:0]     km_addr,
  input  logic [WORD_W-1:0]  km_wdata
);

  wmode_e      wmode_q;    // weight size of the running pass
  logic        start_ok;

  assign start_ok = start && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        wmode_q <= WMODE_8;
    else if (start_ok) wmode_q <= cfg.wmode;
  end

  // ---------------------------------------------------------------- sequencer
  logic              rd_en, first, last, stall, wb_pop;
  logic [ADDR_W-1:0] fmm_addr, kmem_addr;

  address_generator #(.CREDITS(QDEPTH)) u_ag (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (start_ok),
    .cfg       (cfg),
    .wb_pop    (wb_pop),
    .rd_en     (rd_en),
    .fmm_addr  (fmm_addr),
    .kmem_addr (kmem_addr),
    .first     (first),
    .last      (last),
    .stall     (stall),
    .busy      (busy),
    .done      (done)
  );

  // Memory data arrives one cycle after the address.
  logic v_d, f_d, l_d;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_d <= 1'b0;
      f_d <= 1'b0;
      l_d <= 1'b0;
    end else begin
      v_d <= rd_en;
      f_d <= first;
      l_d <= last;
    end
  end

  // ------------------------------------------------------------ memories
  logic [NROW-1:0][WORD_W-1:0] act_word;
  logic [NROW-1:0]             row_we;
  logic [NROW-1:0][FAW-1:0]    row_waddr;
  logic [NROW-1:0][WORD_W-1:0] row_wdata;
  logic [NROW-1:0][ADDR_W-1:0] row_waddr_full;
  logic [NROW-1:0]             row_pop;

  feature_map_memory #(.NBANK(NROW), .DEPTH(FMM_DEPTH)) u_fmm (
    .clk       (clk),
    .rd_en     ({NROW{rd_en}}),
    .raddr     ({NROW{FAW'(fmm_addr)}}),
    .rdata     (act_word),
    .we        (row_we),
    .waddr     (row_waddr),
    .wdata     (row_wdata),
    .ext_en    (fmm_ext_en),
    .ext_we    (fmm_ext_we),
    .ext_bank  (fmm_ext_bank),
    .ext_addr  (fmm_ext_addr),
    .ext_wdata (fmm_ext_wdata),
    .ext_rdata (fmm_ext_rdata)
  );

  logic [NCOL-1:0][WORD_W-1:0] wgt_word;

  for (genvar cc = 0; cc < NCOL; cc++) begin : g_kmem
    kernel_memory #(.DEPTH(KMEM_DEPTH)) u_kmem (
      .clk   (clk),
      .we    (km_we && 32'(km_col) == cc),
      .waddr (km_addr),
      .wdata (km_wdata),
      .rd_en (rd_en),
      .raddr (KAW'(kmem_addr)),
      .rdata (wgt_word[cc])
    );
  end

  // ------------------------------------------------------- array of cores
  for (genvar r = 0; r < NROW; r++) begin : g_row
    logic [NCOL-1:0][NCELL-1:0][ACC_W-1:0] row_dp;
    logic [NCOL-1:0]                       row_valid;
    logic                                  wb_overflow;

    for (genvar cc = 0; cc < NCOL; cc++) begin : g_core
      hybrid_core u_core (
        .clk      (clk),
        .rst_n    (rst_n),
        .wmode    (wmode_q),
        .in_valid (v_d),
        .in_first (f_d),
        .in_last  (l_d),
        .act      (act_word[r]),
        .wgt      (wgt_word[cc]),
        .dp       (row_dp[cc]),
        .dp_valid (row_valid[cc])
      );
    end

    result_writeback #(.NCOL(NCOL), .POOL_DEPTH(POOL_DEPTH), .QDEPTH(QDEPTH)) u_wb (
      .clk      (clk),
      .rst_n    (rst_n),
      .start    (start_ok),
      .cfg      (cfg),
      .in_valid (row_valid[0]),
      .dp       (row_dp),
      .we       (row_we[r]),
      .waddr    (row_waddr_full[r]),
      .wdata    (row_wdata[r]),
      .pop      (row_pop[r]),
      .overflow (wb_overflow)
    );

    assign row_waddr[r] = FAW'(row_waddr_full[r]);
  end

  // All rows run in lockstep; row 0 returns the credits.
  assign wb_pop = row_pop[0];

endmodule
