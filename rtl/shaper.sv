// shaper: window-shape selection for one bit plane of a 3x3 window.
//
// Window positions that the selected shape does not use are forced to a
// fixed bit, 1 for the positions on the upper side and 0 for those on the
// lower side, equally many of each. Every bit of such a pixel is forced the
// same way, so it acts as a pixel of maximum or minimum value and the rank
// of the median of the used pixels is preserved. Shapes: square (all nine),
// cross, X and dot (centre only), with the patterns of bsmf_pkg, which
// follow the published shape drawings. When enable is 0 the window passes
// unchanged (used when the shape is applied through M_1/S_1 instead).
// Combinational.
module shaper
  import bsmf_pkg::*;
(
  input  logic [8:0] win_in,
  input  shape_e     shape,
  input  logic       enable,
  output logic [8:0] win_out
);

  logic [8:0] mask, setv;

  always_comb begin
    mask    = enable ? shape_mask(shape) : 9'h1FF;
    setv    = shape_set(shape);
    win_out = (win_in & mask) | (setv & ~mask);
  end

endmodule
