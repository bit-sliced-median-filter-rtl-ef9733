// bsmf_pkg: types and constants shared by the bit-sliced median filter.
//
// The 3x3 image window is numbered i = 1..9 row by row, left to right, top
// row first (the layout of the window-shape drawings). Bit i-1 of a 9-bit
// window vector holds position i, so bit 8 is the newest pixel (bottom right)
// and bit 0 the oldest (top left). The four window shapes and the value that
// each unused position is forced to follow the published shape drawings; the
// encoding of the shape selector and the numbering of positions in time are
// this design's own choices.
package bsmf_pkg;

  localparam int unsigned WIN2D = 9;  // 3x3 window

  typedef enum logic [1:0] {
    SHAPE_SQUARE = 2'd0,
    SHAPE_CROSS  = 2'd1,
    SHAPE_X      = 2'd2,
    SHAPE_DOT    = 2'd3
  } shape_e;

  // Window-shape control, delayed along with the pixel bits so that a shape
  // change takes effect on one output pixel in every bit slice.
  typedef struct packed {
    logic   custom; // 1: M_1/S_1 of the MSB slice taken from the m1/s1 inputs
    logic   by_ms;  // 1: shape applied through M_1/S_1 of the MSB slice
    shape_e shape;
  } shape_ctrl_t;

  // Positions that take part in the median (mask bit 1 = used).
  function automatic logic [WIN2D-1:0] shape_mask(shape_e sh);
    case (sh)
      SHAPE_SQUARE: return 9'b111_111_111;
      SHAPE_CROSS:  return 9'b010_111_010;
      SHAPE_X:      return 9'b101_010_101;
      default:      return 9'b000_010_000;  // dot
    endcase
  endfunction

  // Value forced into each unused position: half of them 1 (top side),
  // half 0 (bottom side), so the median of the used pixels is unchanged.
  function automatic logic [WIN2D-1:0] shape_set(shape_e sh);
    case (sh)
      SHAPE_SQUARE: return 9'b000_000_000;
      SHAPE_CROSS:  return 9'b000_000_101;
      SHAPE_X:      return 9'b000_001_010;
      default:      return 9'b000_001_111;  // dot
    endcase
  endfunction

endpackage
