// ljpeg_pkg: widths and types shared by the lossless-JPEG SIMD compressor.
//
// Pixels are 8-bit samples of one colour layer (Y, Cr or Cb). The predictor
// output P = X - (A + B - C) is kept as a 9-bit value taken modulo 512; since
// X lies in 0..255, X is still recovered exactly as (P + A + B - C) mod 256,
// so the 9-bit code is lossless. The 9-bit width is the original design's; the
// modulo-512 reading of it is this design's own.
package ljpeg_pkg;
  localparam int unsigned PIX_W  = 8;   // bits per sample
  localparam int unsigned PRED_W = 9;   // bits per predictive value (I_D, I_temp, dout)
  localparam int unsigned LAYERS = 3;   // Y, Cr, Cb

  typedef logic [PIX_W-1:0]  pix_t;
  typedef logic [PRED_W-1:0] pred_t;
endpackage
