// dvc_pkg: types and sizes shared by the video blocks of the Wyner-Ziv
// decoder: pixels, integer-pel motion vectors and the QCIF frame geometry.
// The frame size (QCIF, 176x144) is the decoder's target format; the 8x8
// motion block, the 6-bit vector components and integer-pel vectors are
// this design's own choices.
package dvc_pkg;
  localparam int FRAME_W = 176;       // QCIF width
  localparam int FRAME_H = 144;       // QCIF height
  localparam int MV_BLK  = 8;         // motion block edge, pixels
  localparam int MVW     = 6;         // signed vector component width

  typedef logic [7:0] pixel_t;

  typedef struct packed {
    logic signed [MVW-1:0] x;
    logic signed [MVW-1:0] y;
  } mv_t;

  // clamp a coordinate into 0..lim-1 (nearest pixel inside the frame)
  function automatic int clamp_coord(int c, int lim);
    if (c < 0) return 0;
    if (c > lim - 1) return lim - 1;
    return c;
  endfunction
endpackage
