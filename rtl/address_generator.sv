// Address generator and layer sequencer.
//
// Runs one pass of a layer: for every output position (oy, ox) it reads the
// words of the receptive field from the feature map memory and the matching
// words of the kernel from the kernel memories, one word per cycle, marking
// the first and last word of each dot product. Feature maps are stored pixel
// by pixel with the channels of a pixel in cw consecutive 64-bit words, so one
// kernel row of the window is kw*cw consecutive words:
//   fmm_addr  = in_base + ((oy*stride + ky)*in_w + ox*stride)*cw + j
//   kmem_addr = ky*kw*cw + j,            j = 0 .. kw*cw-1
// A fully connected layer is the case oh = ow = kh = kw = 1. The same
// addresses serve every row of cores, since each row reads its own bank.
//
// Flow control: a position starts only when a result buffer is free; the
// result path returns a credit (wb_pop) when it has written a position's
// results, with CREDITS buffers in all. Without a credit the generator stalls.
// done pulses once all positions are issued and all credits are back.
// The document names the address generator and says that 3D convolutions are
// run as linear dot products; the loop order, the data layout and the credit
// scheme are this design's choice.
//
// Timing: addresses and flags are registered; memory data follows one cycle
// later.
module address_generator
  import hdp_pkg::*;
#(
  parameter int unsigned CREDITS = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  layer_cfg_t         cfg,
  input  logic               wb_pop,
  output logic               rd_en,
  output logic [ADDR_W-1:0]  fmm_addr,
  output logic [ADDR_W-1:0]  kmem_addr,
  output logic               first,
  output logic               last,
  output logic               stall,
  output logic               busy,
  output logic               done
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;
  state_e state;

  layer_cfg_t            c;
  logic [DIM_W-1:0]      oy, ox, ky;
  logic [2*DIM_W-1:0]    j, row_words;
  logic [$clog2(CREDITS+1)-1:0] credits;
  logic                  pos_start, word_last, pos_last, issue;

  always_comb begin
    row_words = (2*DIM_W)'(c.kw) * (2*DIM_W)'(c.cw);
    pos_start = (ky == '0) && (j == '0);
    word_last = (j == row_words - 1) && (ky == c.kh - 1);
    pos_last  = word_last && (ox == c.ow - 1) && (oy == c.oh - 1);
    stall     = (state == S_RUN) && pos_start && (credits == '0);
    issue     = (state == S_RUN) && !stall;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      c         <= '0;
      oy        <= '0;
      ox        <= '0;
      ky        <= '0;
      j         <= '0;
      credits   <= CREDITS[$bits(credits)-1:0];
      rd_en     <= 1'b0;
      first     <= 1'b0;
      last      <= 1'b0;
      fmm_addr  <= '0;
      kmem_addr <= '0;
      done      <= 1'b0;
    end else begin
      rd_en <= 1'b0;
      first <= 1'b0;
      last  <= 1'b0;
      done  <= 1'b0;
      credits <= credits + $bits(credits)'(wb_pop) - $bits(credits)'(issue && pos_start);
      unique case (state)
        S_IDLE: if (start) begin
          c     <= cfg;
          oy    <= '0;
          ox    <= '0;
          ky    <= '0;
          j     <= '0;
          state <= S_RUN;
        end
        S_RUN: if (issue) begin
          rd_en     <= 1'b1;
          first     <= pos_start;
          last      <= word_last;
          fmm_addr  <= ADDR_W'(32'(c.in_base)
                       + ((32'(oy) * 32'(c.stride) + 32'(ky)) * 32'(c.in_w)
                          + 32'(ox) * 32'(c.stride)) * 32'(c.cw) + 32'(j));
          kmem_addr <= ADDR_W'(ky * c.kw * c.cw + j);
          if (j != row_words - 1) begin
            j <= j + 1'b1;
          end else begin
            j <= '0;
            if (ky != c.kh - 1) begin
              ky <= ky + 1'b1;
            end else begin
              ky <= '0;
              if (ox != c.ow - 1) begin
                ox <= ox + 1'b1;
              end else begin
                ox <= '0;
                oy <= oy + 1'b1;
              end
            end
          end
          if (pos_last) state <= S_DRAIN;
        end
        S_DRAIN: if (credits == CREDITS[$bits(credits)-1:0]) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_credit_range: assert property (@(posedge clk) disable iff (!rst_n)
    credits <= CREDITS[$bits(credits)-1:0]);

endmodule
