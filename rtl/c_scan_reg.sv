// c_scan_reg: scan path register between the M/S modules and the majority
// gate of one median selection stage.
//
// The C bits of a stage cannot be observed from outside the filter, nor can
// the majority gate be driven directly. This W-bit register sits on that
// path. In normal operation (test_mode = 0) the gate sees c unchanged and
// the register has no effect on the result. In test mode the gate sees the
// register instead. With scan_en = 1 the register shifts by one bit per
// clock (scan_in enters at bit 0, bit W-1 leaves on scan_out), which loads
// a test pattern for the gate and unloads captured C bits. With scan_en = 0
// it captures c at every clock edge. Registers of several stages are chained
// scan_out to scan_in. The published design only says such registers can be
// inserted; mode control, shift order and chaining are this design's own.
module c_scan_reg #(
  parameter int unsigned W = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test_mode,
  input  logic         scan_en,
  input  logic         scan_in,
  input  logic [W-1:0] c,         // from the M/S modules
  output logic [W-1:0] x,         // to the majority gate
  output logic         scan_out
);

  logic [W-1:0] r;

  always_ff @(posedge clk) begin
    if (!rst_n)       r <= '0;
    else if (scan_en) r <= {r[W-2:0], scan_in};
    else              r <= c;
  end

  assign x        = test_mode ? r : c;
  assign scan_out = r[W-1];

endmodule
