// bsmf_top: the bit-sliced median filters side by side.
//
// img_*: the 3x3 image median filter (median_filter_2d), N2D-bit pixels in
// raster order, LINE_WIDTH per line, selectable window shape; the median
// centred on pixel p - LINE_WIDTH - 1 appears N2D cycles after pixel p.
// img_custom / img_m1 / img_s1 give an arbitrary window through the initial
// mask/set vectors. img_test_mode / img_scan_*: its scan path through the C bits of every
// slice (tie img_test_mode and img_scan_en to 0 in normal use).
// sig_*: the one-dimensional filter (median_filter_1d), median of the last
// W1D samples of N1D bits, N1D cycles of latency. Both take one word per
// clock and share the clock and the synchronous active-low reset. Default
// sizes: a 9-element window for both, as in the published examples; 4-bit
// samples for the signal filter (the worked example's word length) and
// 8-bit pixels with 512-pixel lines for the image filter (this design's
// choice).
module bsmf_top
  import bsmf_pkg::*;
#(
  parameter int unsigned N2D        = 8,
  parameter int unsigned LINE_WIDTH = 512,
  parameter int unsigned N1D        = 4,
  parameter int unsigned W1D        = 9
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [N2D-1:0] img_pix_in,
  input  shape_e         img_shape,
  input  logic           img_by_ms,
  input  logic           img_custom,
  input  logic [8:0]     img_m1,
  input  logic [8:0]     img_s1,
  output logic [N2D-1:0] img_pix_out,
  input  logic           img_test_mode,
  input  logic           img_scan_en,
  input  logic           img_scan_in,
  output logic           img_scan_out,
  input  logic [N1D-1:0] sig_x_in,
  output logic [N1D-1:0] sig_y_out
);

  median_filter_2d #(.N(N2D), .LINE_WIDTH(LINE_WIDTH)) u_img (
    .clk       (clk),
    .rst_n     (rst_n),
    .pix_in    (img_pix_in),
    .shape     (img_shape),
    .by_ms     (img_by_ms),
    .custom    (img_custom),
    .m1        (img_m1),
    .s1        (img_s1),
    .pix_out   (img_pix_out),
    .test_mode (img_test_mode),
    .scan_en   (img_scan_en),
    .scan_in   (img_scan_in),
    .scan_out  (img_scan_out)
  );

  median_filter_1d #(.N(N1D), .W(W1D)) u_sig (
    .clk   (clk),
    .rst_n (rst_n),
    .x_in  (sig_x_in),
    .y_out (sig_y_out)
  );

endmodule
