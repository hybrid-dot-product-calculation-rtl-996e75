// Result path of one row of cores, in front of the row's FMM write port.
//
// When the NCOL cores of a row finish a dot product, their NCOL x 4 partial
// results are queued (QDEPTH result sets deep). The queue head is then taken one
// core per cycle through a single combine_relu stage: in WMODE_8 each core
// gives one activation (the four partials combined), in WMODE_2 four
// activations (four kernels). Activations are packed eight to a 64-bit word,
// in kernel order, and each full word is written to the FMM, or first merged
// in the pool_unit when the layer is followed by pooling. When the set is done
// the queue entry is freed and a credit (pop) goes back to the address
// generator.
//
// Output placement: output pixel (oy, ox), or pooled pixel (oy/P, ox/P), gets
//   waddr = out_base + pixel*ocw + och_word + w
// where w counts the words of this kernel group (NCOL/8 words in WMODE_8,
// NCOL/2 in WMODE_2). Pooling windows are P x P and do not overlap; outputs
// outside whole windows are dropped. Results arrive in the address
// generator's raster order, which this unit follows with its own counters.
// The document says only that results pass the plane combination and ReLU in
// front of each FMM input port and are pooled through a local memory; the
// queue, packing, placement and flow control are this design's choice.
//
// Timing: the write (we, waddr, wdata) is registered; a result set takes NCOL
// cycles once at the head of the queue.
module result_writeback
  import hdp_pkg::*;
#(
  parameter int unsigned NCOL       = 16,
  parameter int unsigned ACCW       = ACC_W,
  parameter int unsigned POOL_DEPTH = 256,
  parameter int unsigned QDEPTH     = 4
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  start,
  input  layer_cfg_t                            cfg,
  input  logic                                  in_valid,
  input  logic [NCOL-1:0][NCELL-1:0][ACCW-1:0]  dp,
  output logic                                  we,
  output logic [ADDR_W-1:0]                     waddr,
  output logic [WORD_W-1:0]                     wdata,
  output logic                                  pop,
  output logic                                  overflow
);

  localparam int unsigned CW = (NCOL > 1) ? $clog2(NCOL) : 1;
  localparam int unsigned PW = $clog2(POOL_DEPTH);

  typedef logic [NCOL-1:0][NCELL-1:0][ACCW-1:0] set_t;

  localparam int unsigned QW = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;

  // Queue of result sets.
  set_t          q [QDEPTH];
  logic [QW-1:0] wr_ptr, rd_ptr;
  logic [QW:0]   count;

  layer_cfg_t          c;
  logic [3:0]          pp;              // pooling side, 1 without pooling
  logic [DIM_W-1:0]    pw, ph;          // pooled width and height
  logic [DIM_W-1:0]    oy, ox, py, px;
  logic [3:0]          sy, sx;
  logic [CW-1:0]       col;
  logic [WORD_W-1:0]   pack;

  logic [NCELL-1:0][ACT_W-1:0] acts;
  logic [WORD_W-1:0]   word_now;
  logic                word_done, set_done, active, in_window;
  logic [DIM_W-1:0]    w_idx;
  logic [DIM_W-1:0]    wpg;             // words per kernel group

  combine_relu #(.ACCW(ACCW)) u_comb (
    .wmode   (c.wmode),
    .shift   (c.shift),
    .dp      (q[rd_ptr][col]),
    .out_act (acts)
  );

  always_comb begin
    active   = (count != '0);
    if (c.wmode == WMODE_8) begin
      word_now = ((col % 8) == 0) ? '0 : pack;
      word_now[ACT_W*(32'(col) % 8) +: ACT_W] = acts[0];
      word_done = active && ((col % 8) == 7 || 32'(col) == NCOL - 1);
      w_idx     = DIM_W'(col / 8);
      wpg       = DIM_W'((NCOL + 7) / 8);
    end else begin
      word_now = ((col % 2) == 0) ? '0 : pack;
      word_now[4*ACT_W*(32'(col) % 2) +: 4*ACT_W] = acts;
      word_done = active && ((col % 2) == 1 || 32'(col) == NCOL - 1);
      w_idx     = DIM_W'(col / 2);
      wpg       = DIM_W'((NCOL + 1) / 2);
    end
    set_done  = active && (32'(col) == NCOL - 1);
    in_window = (px < pw) && (py < ph);
  end

  // Pooling local memory.
  logic              pool_valid, pool_out_valid;
  logic [WORD_W-1:0] pool_word;
  logic [PW-1:0]     slot;

  assign pool_valid = word_done && c.pool_en && in_window;
  assign slot       = PW'(px * wpg + w_idx);

  pool_unit #(.DEPTH(POOL_DEPTH)) u_pool (
    .clk       (clk),
    .in_valid  (pool_valid),
    .slot      (slot),
    .first     (sy == 0 && sx == 0),
    .last      (sy == pp - 1 && sx == pp - 1),
    .in_word   (word_now),
    .out_valid (pool_out_valid),
    .out_word  (pool_word)
  );

  logic [ADDR_W-1:0] pix;
  assign pix = c.pool_en ? ADDR_W'(py * pw + px) : ADDR_W'(oy * c.ow + ox);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      c        <= '0;
      pp       <= 4'd1;
      pw       <= '0;
      ph       <= '0;
      oy       <= '0;
      ox       <= '0;
      py       <= '0;
      px       <= '0;
      sy       <= '0;
      sx       <= '0;
      col      <= '0;
      pack     <= '0;
      we       <= 1'b0;
      waddr    <= '0;
      wdata    <= '0;
      pop      <= 1'b0;
      overflow <= 1'b0;
    end else begin
      we  <= 1'b0;
      pop <= 1'b0;
      if (start) begin
        c        <= cfg;
        pp       <= (cfg.pool_en && cfg.pool_p != 0) ? cfg.pool_p : 4'd1;
        pw       <= (cfg.pool_en && cfg.pool_p != 0) ? cfg.ow / DIM_W'(cfg.pool_p) : cfg.ow;
        ph       <= (cfg.pool_en && cfg.pool_p != 0) ? cfg.oh / DIM_W'(cfg.pool_p) : cfg.oh;
        oy       <= '0;
        ox       <= '0;
        py       <= '0;
        px       <= '0;
        sy       <= '0;
        sx       <= '0;
        col      <= '0;
        overflow <= 1'b0;
      end
      // enqueue
      if (in_valid) begin
        q[wr_ptr] <= dp;
        wr_ptr    <= (32'(wr_ptr) == QDEPTH - 1) ? '0 : wr_ptr + 1'b1;
        if (32'(count) == QDEPTH && !set_done) overflow <= 1'b1;
      end
      count <= count + (QW+1)'(in_valid) - (QW+1)'(set_done);
      // drain the head, one core per cycle
      if (active) begin
        pack <= word_now;
        if (word_done) begin
          if (!c.pool_en) begin
            we    <= 1'b1;
            waddr <= c.out_base + pix * ADDR_W'(c.ocw) + ADDR_W'(c.och_word) + ADDR_W'(w_idx);
            wdata <= word_now;
          end else if (pool_out_valid) begin
            we    <= 1'b1;
            waddr <= c.out_base + pix * ADDR_W'(c.ocw) + ADDR_W'(c.och_word) + ADDR_W'(w_idx);
            wdata <= pool_word;
          end
        end
        if (set_done) begin
          col    <= '0;
          rd_ptr <= (32'(rd_ptr) == QDEPTH - 1) ? '0 : rd_ptr + 1'b1;
          pop    <= 1'b1;
          // advance the output position in raster order
          if (ox != c.ow - 1) begin
            ox <= ox + 1'b1;
            if (sx == pp - 1) begin
              sx <= '0;
              px <= px + 1'b1;
            end else begin
              sx <= sx + 1'b1;
            end
          end else begin
            ox <= '0;
            sx <= '0;
            px <= '0;
            oy <= oy + 1'b1;
            if (sy == pp - 1) begin
              sy <= '0;
              py <= py + 1'b1;
            end else begin
              sy <= sy + 1'b1;
            end
          end
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !overflow);

endmodule
