// me_pkg: types shared by the pipelined-macroblock motion estimator.
//
// Pixels are 8-bit luminance samples. Motion vector components are signed
// 8-bit numbers, which covers search ranges up to +-128 (displacements
// -128..127). A SAD of an N x N block of 8-bit pixels fits in 16 bits for
// N up to 16. Frame coordinates are 12-bit, enough for frames up to 4095
// pixels on a side. These widths are choices of this design.
package me_pkg;

  localparam int PIX_W   = 8;
  localparam int SAD_W   = 16;
  localparam int MV_W    = 8;
  localparam int COORD_W = 12;

  typedef logic [PIX_W-1:0]          pixel_t;
  typedef logic [SAD_W-1:0]          sad_t;
  typedef logic signed [MV_W-1:0]    mv_comp_t;
  typedef logic [COORD_W-1:0]        coord_t;

  // Which frame a memory read addresses.
  typedef enum logic {
    FRAME_CUR = 1'b0,   // frame being coded: macroblocks (reference blocks)
    FRAME_REF = 1'b1    // previous frame: search window data
  } frame_sel_t;

  // One pixel read request to the frame memory.
  typedef struct packed {
    frame_sel_t frame;
    coord_t     x;
    coord_t     y;
  } mem_req_t;

  // Result of the full search of one macroblock.
  typedef struct packed {
    coord_t   mb_col;   // macroblock column in the frame (in macroblocks)
    coord_t   mb_row;   // macroblock row in the frame (in macroblocks)
    mv_comp_t mvx;      // horizontal displacement of the best match
    mv_comp_t mvy;      // vertical displacement of the best match
    sad_t     sad;      // its sum of absolute differences
  } mv_result_t;

endpackage
