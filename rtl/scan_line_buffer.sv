// scan_line_buffer: one-bit scan line buffer, a fixed delay of DEPTH cycles.
//
// Holds the bits of the previous image line so that the window buffer can
// present three lines at once. It is written as a circular buffer in a
// memory array: each cycle the bit written DEPTH cycles ago is read from the
// slot the pointer addresses, and the new bit is written into that slot. In
// a 3x3 window system DEPTH is the line width less the three window-buffer
// cells of one row. Only the pointer is reset; the memory contents are
// undefined until one line has passed. Memory-based storage is this design's
// choice (a shift register would behave the same).
module scan_line_buffer #(
  parameter int unsigned DEPTH = 509  // >= 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q  // d delayed by DEPTH cycles
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic          mem [DEPTH];
  logic [AW-1:0] ptr;

  assign q = mem[ptr];

  always_ff @(posedge clk) begin
    mem[ptr] <= d;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                       ptr <= '0;
    else if (ptr == AW'(DEPTH - 1))   ptr <= '0;
    else                              ptr <= ptr + 1'b1;
  end

endmodule
