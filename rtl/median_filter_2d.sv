// median_filter_2d: real-time 3x3 median filter for raster-scanned images.
//
// One N-bit pixel enters per clock (pix_in), in raster order with
// LINE_WIDTH pixels per line. The filter is bit-sliced: N identical
// image_bit_slice instances, slice 1 for the MSB down to slice N for the
// LSB, each with its own one-bit window buffer and scan line buffers. The
// median is found bit by bit with majority gates only; the mask/set vectors
// travel down the slices one cycle per slice (bit-pipelined), and skewing /
// deskewing delays keep each slice on the same window. The window shape
// (square, cross, X, dot) is chosen per pixel with `shape`; by_ms selects
// whether it is applied by the shapers in every slice or by the initial
// mask/set vectors M_1, S_1 of the MSB slice; both give the same result.
// With custom = 1, M_1 and S_1 are taken from the m1/s1 inputs instead, so
// that every window position can be assigned separately (m1[i-1] = 1: the
// pixel at position i takes part; 0: it counts as all ones if s1[i-1] = 1,
// all zeros otherwise). For a median of the used pixels, use an odd number
// of them and as many forced ones as forced zeros.
// For testing, the scan path registers of the slices form one chain from
// scan_in through slice 1 (MSB) to slice N and out on scan_out, 9 bits per
// slice; bit 8 of each slice's register leaves first (see c_scan_reg).
//
// Timing: the pixel clocked in at edge t completes the window whose median
// is on pix_out after edge t+N (LATENCY = N cycles), one median per clock.
// That window is pixels p - r*LINE_WIDTH - c for r, c in 0..2 (p = newest),
// so the output is the median centred on pixel p - LINE_WIDTH - 1. Borders
// get no special treatment. The slice structure, skew/deskew scheme and shape
// patterns follow the published design; word length, line width, reset and
// the output register are this design's choices.
module median_filter_2d
  import bsmf_pkg::*;
#(
  parameter int unsigned N          = 8,    // bits per pixel
  parameter int unsigned LINE_WIDTH = 512   // pixels per line
) (
  input  logic         clk,
  input  logic         rst_n,   // synchronous, active low
  input  logic [N-1:0] pix_in,
  input  shape_e       shape,
  input  logic         by_ms,
  input  logic         custom,     // window given by m1/s1
  input  logic [8:0]   m1,         // custom M_1, with the pixel
  input  logic [8:0]   s1,         // custom S_1, with the pixel
  output logic [N-1:0] pix_out,
  input  logic         test_mode,  // majority gates fed from the scan registers
  input  logic         scan_en,    // shift the scan chain
  input  logic         scan_in,
  output logic         scan_out
);

  shape_ctrl_t ctrl;
  assign ctrl = '{custom: custom, by_ms: by_ms, shape: shape};

  logic [8:0]   m_chain [N+1];
  logic [8:0]   s_chain [N+1];
  logic [N-1:0] u_bits;
  logic [N:0]   scan_chain;

  assign m_chain[0] = m1;
  assign s_chain[0] = s1;
  assign scan_chain[0] = scan_in;
  assign scan_out = scan_chain[N];

  for (genvar k = 1; k <= N; k++) begin : g_slice
    image_bit_slice #(.N(N), .STAGE(k), .LINE_WIDTH(LINE_WIDTH)) u_slice (
      .clk     (clk),
      .rst_n   (rst_n),
      .b_in    (pix_in[N-k]),
      .ctrl_in (ctrl),
      .m_in    (m_chain[k-1]),
      .s_in    (s_chain[k-1]),
      .m_out   (m_chain[k]),
      .s_out   (s_chain[k]),
      .u_out     (u_bits[N-k]),
      .test_mode (test_mode),
      .scan_en   (scan_en),
      .scan_in   (scan_chain[k-1]),
      .scan_out  (scan_chain[k])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) pix_out <= '0;
    else        pix_out <= u_bits;
  end

endmodule
