// image_bit_slice: one bit stage of the 3x3 image median filter.
//
// Slice STAGE (1 = MSB, N = LSB) handles bit N-STAGE of every pixel. The
// pixel bit and the window-shape control are first skewed by STAGE-1
// cycles, then the bit enters the window buffer with its two scan line
// buffers; the shaper forces the unused positions; the median selection
// stage combines the nine bits with the mask/set vectors M_k, S_k from the
// slice above and produces the median bit u_k and M_{k+1}, S_{k+1}, which
// are registered for the slice below (it works one cycle later on the same
// window). A scan path register (c_scan_reg) between the M/S modules and
// the majority gate makes the C bits observable and the gate controllable
// in test mode; it is transparent otherwise. u_k is deskewed by N-STAGE cycles so that all bits of a median
// leave together. For STAGE = 1, M_1 and S_1 come from the shape control:
// all ones / zeros normally, the shape pattern when ctrl.by_ms is set, or
// the m_in/s_in inputs (an arbitrary window, given with each pixel) when
// ctrl.custom is set; in the last two cases the shaper is bypassed. Skew, deskew, shaper and median selection follow
// the published structure; the register placement, reset and the skewing of
// the shape control are this design's choices.
module image_bit_slice
  import bsmf_pkg::*;
#(
  parameter int unsigned N          = 8,    // pixel word length (slices)
  parameter int unsigned STAGE      = 1,    // 1 = MSB slice
  parameter int unsigned LINE_WIDTH = 512   // pixels per line
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        b_in,    // bit N-STAGE of the incoming pixel, unskewed
  input  shape_ctrl_t ctrl_in, // shape control, unskewed
  input  logic [8:0]  m_in,    // M_k from slice STAGE-1; custom M_1 for STAGE 1
  input  logic [8:0]  s_in,    // S_k from slice STAGE-1; custom S_1 for STAGE 1
  output logic [8:0]  m_out,   // M_{k+1}, registered
  output logic [8:0]  s_out,   // S_{k+1}, registered
  output logic        u_out,   // median bit, deskewed
  input  logic        test_mode,
  input  logic        scan_en,
  input  logic        scan_in,
  output logic        scan_out
);

  logic        b_sk;
  shape_ctrl_t ctrl_sk;
  logic [8:0]  win, win_sh, m_k, s_k, m_nx, s_nx, c_k, x_k;
  logic        u_k;

  delay_line #(.WIDTH(1 + $bits(shape_ctrl_t)), .DEPTH(STAGE - 1)) u_skew (
    .clk (clk), .rst_n (rst_n), .d ({b_in, ctrl_in}), .q ({b_sk, ctrl_sk})
  );

  window_buffer_2d #(.LINE_WIDTH(LINE_WIDTH)) u_win (
    .clk (clk), .rst_n (rst_n), .d (b_sk), .win (win)
  );

  // the control must stay aligned with the window, which is one cycle behind
  shape_ctrl_t ctrl_w;
  always_ff @(posedge clk) begin
    if (!rst_n) ctrl_w <= '0;
    else        ctrl_w <= ctrl_sk;
  end

  shaper u_shaper (
    .win_in  (win),
    .shape   (ctrl_w.shape),
    .enable  (!(ctrl_w.by_ms || ctrl_w.custom)),
    .win_out (win_sh)
  );

  if (STAGE == 1) begin : g_first
    // the custom vectors arrive with the pixel, unskewed (STAGE 1 has no
    // skew), and are held one cycle like the control
    logic [8:0] m_w, s_w;
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        m_w <= '1;
        s_w <= '0;
      end else begin
        m_w <= m_in;
        s_w <= s_in;
      end
    end
    always_comb begin
      if (ctrl_w.custom) begin
        m_k = m_w;
        s_k = s_w;
      end else begin
        m_k = ctrl_w.by_ms ? shape_mask(ctrl_w.shape) : 9'h1FF;
        s_k = shape_set(ctrl_w.shape);
      end
    end
  end else begin : g_next
    assign m_k = m_in;
    assign s_k = s_in;
  end

  median_stage #(.W(9)) u_sel (
    .b (win_sh), .m (m_k), .s (s_k), .c (c_k), .x (x_k),
    .u (u_k), .m_next (m_nx), .s_next (s_nx)
  );

  c_scan_reg #(.W(9)) u_scan (
    .clk       (clk),
    .rst_n     (rst_n),
    .test_mode (test_mode),
    .scan_en   (scan_en),
    .scan_in   (scan_in),
    .c         (c_k),
    .x         (x_k),
    .scan_out  (scan_out)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      m_out <= '0;
      s_out <= '0;
    end else begin
      m_out <= m_nx;
      s_out <= s_nx;
    end
  end

  delay_line #(.WIDTH(1), .DEPTH(N - STAGE)) u_deskew (
    .clk (clk), .rst_n (rst_n), .d (u_k), .q (u_out)
  );

endmodule
