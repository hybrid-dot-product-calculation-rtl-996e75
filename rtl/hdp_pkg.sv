// Shared types and constants of the hybrid dot-product accelerator.
//
// The accelerator computes dot products between eight 8-bit activations and
// eight weights per clock in every core. A layer runs either with 8-bit
// weights (one dot product per core) or with 2-bit weights in {-1, 0, 1}
// (four dot products per core, one per kernel). Both use the same 64-bit
// weight word: four planes of eight 2-bit codes, plane j feeding cell j.
//
// Weight codes. Each MACC selects its addend from the 2-bit code (i4 i3) with
// f = ~i4 i3 i0 + i4 ~i3 i1 + i4 i3 i2, where i2 = A, i1 = 2A and i0 = 3A or
// -A. The code of a digit value v is therefore (-v) mod 4:
//   0 -> 2'b00, 1 -> 2'b11, 2 -> 2'b10, 3 (or -1) -> 2'b01.
// An 8-bit weight w = 64*d3 + 16*d2 + 4*d1 + d0 uses digits d0..d2 in 0..3
// and a top digit d3 in -1..1, which limits 8-bit weights to -64..127.
// The encoding functions below are the host-side rule for filling the kernel
// memories; the hardware only ever sees the codes.
//
// Word layouts (this design's choice):
//   activation word: activation i in bits [8i+7:8i], unsigned
//   weight word:     code of weight i of plane j in bits [16j+2i+1:16j+2i]
package hdp_pkg;

  localparam int unsigned ACT_W   = 8;   // activation width
  localparam int unsigned NACT    = 8;   // activations per core per cycle
  localparam int unsigned NCELL   = 4;   // cells (2-bit weight planes) per core
  localparam int unsigned WORD_W  = 64;  // memory word width
  localparam int unsigned MULT_W  = 11;  // signed width of A, 2A, 3A, -A
  localparam int unsigned CHAIN_W = 13;  // signed width of a 4-MACC chain sum
  localparam int unsigned ACC_W   = 32;  // dot-product accumulator width
  localparam int unsigned ADDR_W  = 16;  // width of address fields in the layer config
  localparam int unsigned DIM_W   = 12;  // width of size fields in the layer config

  // Layer weight size.
  typedef enum logic {
    WMODE_2 = 1'b0,   // 8-bit activations x 2-bit weights, four kernels per core
    WMODE_8 = 1'b1    // 8-bit activations x 8-bit weights, one kernel per core
  } wmode_e;

  localparam logic [1:0] CODE_ZERO = 2'b00;
  localparam logic [1:0] CODE_I0   = 2'b01;  // 3A (8-bit digits) or -A
  localparam logic [1:0] CODE_2A   = 2'b10;
  localparam logic [1:0] CODE_1A   = 2'b11;

  // Configuration of one pass of a layer: one group of kernels over all
  // output positions of every image of the batch.
  typedef struct packed {
    wmode_e             wmode;
    logic [ADDR_W-1:0]  in_base;   // first word of the input feature map
    logic [DIM_W-1:0]   in_w;      // input width in pixels
    logic [DIM_W-1:0]   cw;        // input channel words per pixel (channels/8)
    logic [DIM_W-1:0]   kh;        // kernel height
    logic [DIM_W-1:0]   kw;        // kernel width
    logic [DIM_W-1:0]   stride;    // convolution stride
    logic [DIM_W-1:0]   oh;        // output height (before pooling)
    logic [DIM_W-1:0]   ow;        // output width (before pooling)
    logic [ADDR_W-1:0]  out_base;  // first word of the output feature map
    logic [DIM_W-1:0]   ocw;       // output channel words per (pooled) pixel
    logic [DIM_W-1:0]   och_word;  // word offset of this kernel group in a pixel
    logic [4:0]         shift;     // requantization right shift
    logic               pool_en;   // max-pool the outputs
    logic [3:0]         pool_p;    // pooling window side (non-overlapping)
  } layer_cfg_t;

  // Code of one 2-bit digit value (-1..3).
  function automatic logic [1:0] digit_code(int v);
    case (v)
      0:       return CODE_ZERO;
      1:       return CODE_1A;
      2:       return CODE_2A;
      default: return CODE_I0;   // 3 or -1
    endcase
  endfunction

  // Four plane codes of an 8-bit weight in -64..127, plane 0 least significant.
  function automatic logic [3:0][1:0] encode_w8(int w);
    logic [3:0][1:0] c;
    int r;
    r = w;
    for (int j = 0; j < 3; j++) begin
      c[j] = digit_code(((r % 4) + 4) % 4);
      r = (r - (((r % 4) + 4) % 4)) / 4;
    end
    c[3] = digit_code(r);
    return c;
  endfunction

  // Code of a 2-bit weight in {-1, 0, 1}.
  function automatic logic [1:0] encode_w2(int w);
    return digit_code(w);
  endfunction

endpackage
