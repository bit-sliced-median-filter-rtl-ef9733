// median_stage: one bit stage of the median selection unit.
//
// W mask-and-set modules turn the k-th most significant bits of the W window
// elements, together with the mask and setting vectors M_k and S_k, into the
// bits C; a W-input majority gate picks their majority, which is the k-th
// bit u of the median; each M/S module then uses u to produce M_{k+1} and
// S_{k+1} for the next stage. The structure follows the published stage;
// it is combinational, and the pipeline registers between stages are placed
// by the filters that cascade it. The C bits leave the stage on `c` and the
// majority gate takes its inputs from `x`, so that a scan path register can
// be inserted between them for testing; without one, connect x to c.
module median_stage #(
  parameter int unsigned W = 9  // window size, odd
) (
  input  logic [W-1:0] b,       // bit k of every window element
  input  logic [W-1:0] m,       // M_k
  input  logic [W-1:0] s,       // S_k
  output logic [W-1:0] c,       // C bits from the M/S modules
  input  logic [W-1:0] x,       // majority gate inputs (normally = c)
  output logic         u,       // bit k of the median
  output logic [W-1:0] m_next,  // M_{k+1}
  output logic [W-1:0] s_next   // S_{k+1}
);

  for (genvar i = 0; i < W; i++) begin : g_ms
    ms_cell u_ms (
      .b      (b[i]),
      .m      (m[i]),
      .s      (s[i]),
      .u      (u),
      .c      (c[i]),
      .m_next (m_next[i]),
      .s_next (s_next[i])
    );
  end

  maj_gate #(.W(W)) u_maj (
    .x (x),
    .u (u)
  );

endmodule
