// median_filter_1d: word-parallel, bit-pipelined median filter for a
// one-dimensional sequence.
//
// One N-bit sample enters per clock (x_in); y_out is the median of the last
// W samples (W odd). There are N bit stages, MSB first. Stage k receives bit
// N-k of the input skewed by k-1 cycles into its window buffer, a W-cell
// shift-register column; a median_stage combines the column with the
// mask/set vectors M_k, S_k registered from stage k-1 and gives the median
// bit u_k, which is deskewed by N-k cycles. M_1 is all ones (every sample
// in the window takes part). Timing: the sample clocked in at edge t is the
// newest of the window whose median is on y_out after edge t+N (LATENCY = N
// cycles); one median per clock. The architecture follows the published
// bit-sliced filter; reset and the output register are this design's
// choices.
module median_filter_1d #(
  parameter int unsigned N = 4,  // bits per sample
  parameter int unsigned W = 9   // window size, odd
) (
  input  logic         clk,
  input  logic         rst_n,  // synchronous, active low
  input  logic [N-1:0] x_in,
  output logic [N-1:0] y_out
);

  logic [W-1:0] m_chain [N+1];
  logic [W-1:0] s_chain [N+1];
  logic [N-1:0] u_bits;

  assign m_chain[0] = '1;
  assign s_chain[0] = '0;

  for (genvar k = 1; k <= N; k++) begin : g_stage
    logic         b_sk, u_k;
    logic [W-1:0] win, c_k, m_nx, s_nx;

    delay_line #(.WIDTH(1), .DEPTH(k - 1)) u_skew (
      .clk (clk), .rst_n (rst_n), .d (x_in[N-k]), .q (b_sk)
    );

    // window buffer: win[0] newest
    always_ff @(posedge clk) begin
      if (!rst_n) win <= '0;
      else        win <= {win[W-2:0], b_sk};
    end

    median_stage #(.W(W)) u_sel (
      .b (win), .m (m_chain[k-1]), .s (s_chain[k-1]), .c (c_k), .x (c_k),
      .u (u_k), .m_next (m_nx), .s_next (s_nx)
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        m_chain[k] <= '0;
        s_chain[k] <= '0;
      end else begin
        m_chain[k] <= m_nx;
        s_chain[k] <= s_nx;
      end
    end

    delay_line #(.WIDTH(1), .DEPTH(N - k)) u_deskew (
      .clk (clk), .rst_n (rst_n), .d (u_k), .q (u_bits[N-k])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) y_out <= '0;
    else        y_out <= u_bits;
  end

endmodule
