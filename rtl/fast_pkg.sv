// fast_pkg: types and constants shared by the FAST corner detector.
//
// A pixel is an 8-bit intensity. A ring pattern is a 16-bit vector whose bit x
// is the binary state of ring point x (standard FAST numbering: point 0 straight above
// the focused pixel p, then clockwise, point 4 to the right, 8 below, 12 to the
// left). The ring is the radius-3 Bresenham circle inside a 7x7 window; the
// (dx, dy) offsets below are image offsets from p, with y growing downwards.
// The compression selector chooses between the two table-compression methods:
// SPLIT (darker/brighter split only) and SYMMETRY (split plus reduction of a
// pattern to its rotation/mirror representative).
package fast_pkg;

  localparam int unsigned PIX_W    = 8;
  localparam int unsigned RING_LEN = 16;
  localparam int unsigned WIN      = 7;   // window side
  localparam int unsigned RADIUS   = 3;   // ring radius, = (WIN-1)/2

  typedef logic [PIX_W-1:0]    pixel_t;
  typedef logic [RING_LEN-1:0] ring_pattern_t;
  typedef pixel_t              ring_pixels_t [RING_LEN];
  typedef pixel_t              window_t [WIN][WIN];

  typedef enum logic {
    COMP_SPLIT    = 1'b0,
    COMP_SYMMETRY = 1'b1
  } compression_e;

  // Horizontal offset of ring point x from p.
  function automatic int ring_dx(input int x);
    case (x)
      0: return 0;   1: return 1;   2: return 2;   3: return 3;
      4: return 3;   5: return 3;   6: return 2;   7: return 1;
      8: return 0;   9: return -1;  10: return -2; 11: return -3;
      12: return -3; 13: return -3; 14: return -2; default: return -1;
    endcase
  endfunction

  // Vertical offset of ring point x from p (positive = further down the image).
  function automatic int ring_dy(input int x);
    case (x)
      0: return -3;  1: return -3;  2: return -2;  3: return -1;
      4: return 0;   5: return 1;   6: return 2;   7: return 3;
      8: return 3;   9: return 3;   10: return 2;  11: return 1;
      12: return 0;  13: return -1; 14: return -2; default: return -3;
    endcase
  endfunction

endpackage
