// window_buffer_2d: one-bit 3x3 window buffer with two scan line buffers.
//
// The incoming bit stream of one bit plane of a raster-scanned image passes
// through three groups of three shift-register cells; between the groups a
// scan line buffer delays it by LINE_WIDTH-3 cycles, so that each group holds
// three horizontally adjacent pixels of one line and the three groups hold
// three consecutive lines. The nine cells are presented in parallel as a
// column (win). Position numbering (see bsmf_pkg): bit 8 is the cell the new
// bit enters (bottom right of the window), bit 0 the oldest (top left).
// After the bit of pixel p is clocked in, win[8-3r-c] holds the bit of pixel
// p - r*LINE_WIDTH - c. The structure follows the published bit stage; the
// line width is a parameter of this design. Windows that straddle a line end
// are not treated specially (the published design gives no border rule).
module window_buffer_2d #(
  parameter int unsigned LINE_WIDTH = 512  // pixels per image line, >= 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       d,    // bit of the newest pixel
  output logic [8:0] win   // the nine window bits, bit 8 newest
);

  logic [2:0] row_cur, row_mid, row_old;  // [0] newest cell of each group
  logic       line1_q, line2_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      row_cur <= '0;
      row_mid <= '0;
      row_old <= '0;
    end else begin
      row_cur <= {row_cur[1:0], d};
      row_mid <= {row_mid[1:0], line1_q};
      row_old <= {row_old[1:0], line2_q};
    end
  end

  scan_line_buffer #(.DEPTH(LINE_WIDTH - 3)) u_line1 (
    .clk (clk), .rst_n (rst_n), .d (row_cur[2]), .q (line1_q)
  );

  scan_line_buffer #(.DEPTH(LINE_WIDTH - 3)) u_line2 (
    .clk (clk), .rst_n (rst_n), .d (row_mid[2]), .q (line2_q)
  );

  // bit 3r+c: r = 0 oldest line, c = 0 oldest (leftmost) pixel
  assign win = {row_cur[0], row_cur[1], row_cur[2],
                row_mid[0], row_mid[1], row_mid[2],
                row_old[0], row_old[1], row_old[2]};

endmodule
