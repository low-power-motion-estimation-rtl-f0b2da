// me_pkg: types and default sizes shared by the motion estimation datapath.
//
// Block size N = 16 and search range p = 11 are the sizes used for the CIF
// (352x288) experiments; pixels are 8-bit luminance values. A candidate is
// named by its displacement (dx, dy) relative to the current block, each in
// [-p, +p]; the mv_t struct carries that displacement through the pipeline
// next to the SAD it belongs to. SAD_W = 16 bits holds 16*16*255 = 65280.
package me_pkg;

  localparam int N_DEF     = 16;   // macro-block size (N x N)
  localparam int P_DEF     = 11;   // search range p, window is (2p+1)^2 candidates
  localparam int PIX_W     = 8;    // luminance bits
  localparam int COL_W_DEF = 12;   // column partial sum: 16*255 = 4080 < 2^12
  localparam int SAD_W_DEF = 16;   // candidate SAD: 256*255 = 65280 < 2^16

  typedef logic [PIX_W-1:0] pixel_t;

  // Motion vector / candidate displacement, two's complement.
  typedef struct packed {
    logic signed [7:0] dx;
    logic signed [7:0] dy;
  } mv_t;

endpackage
