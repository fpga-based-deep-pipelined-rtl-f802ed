// vit_pkg: default sizes of the multi-head attention accelerator.
//
// The defaults are the encoder configuration evaluated for this design:
// 32x32 images cut into 8x8 patches give 16 tokens, the hidden size is 768
// and there are 12 heads, so each head works on 64 features. The systolic
// arrays are 16 PEs wide (this design's choice) and the on-chip input and
// output memories hold two images at a time (also this design's choice).
// Modules take these values as parameter defaults; nothing here is a port.
package vit_pkg;
  localparam int unsigned IMAGE_SIZE = 32;
  localparam int unsigned PATCH_SIZE = 8;
  localparam int unsigned SEQ_LEN    = (IMAGE_SIZE / PATCH_SIZE) * (IMAGE_SIZE / PATCH_SIZE);
  localparam int unsigned HIDDEN     = 768;
  localparam int unsigned NUM_HEADS  = 12;
  localparam int unsigned HEAD_DIM   = HIDDEN / NUM_HEADS;
  localparam int unsigned ARRAY_COLS = 16;
  localparam int unsigned IMG_SLOTS  = 2;
  // 1/sqrt(d_K) for d_K = 64, as a single-precision constant (0.125)
  localparam logic [31:0] INV_SQRT_DK = 32'h3E00_0000;
endpackage
