// maj_gate: W-input binary majority gate.
//
// u is 1 when more than half of the W inputs are 1 (W odd). For binary inputs
// the majority is also the median, which is what the bit-level median
// algorithm relies on. The published gate is a transistor-level circuit (a
// divider of W output-wired inverters followed by an inverting buffer); here
// the same logic function is written as a count of ones compared with
// (W+1)/2, the simplest synthesizable form. Purely combinational.
// THRESHOLD generalises it to an equal-weight threshold gate (u = 1 when at
// least THRESHOLD inputs are 1), as the published circuit becomes when its
// inverter ratios are retuned; the default is the majority.
module maj_gate #(
  parameter int unsigned W         = 9,            // number of inputs, odd
  parameter int unsigned THRESHOLD = (W + 1) / 2   // 1 .. W
) (
  input  logic [W-1:0] x,
  output logic         u
);

  localparam int unsigned CW = $clog2(W + 1);

  logic [CW-1:0] ones;

  always_comb begin
    ones = '0;
    for (int i = 0; i < W; i++) ones = ones + CW'(x[i]);
    u = (ones >= CW'(THRESHOLD));
  end

endmodule
