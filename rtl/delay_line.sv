// delay_line: a row of DEPTH registers delaying a WIDTH-bit signal.
//
// Used as the skewing delays in front of a bit slice and the deskewing
// delays behind it: the slice for the k-th most significant bit sees its
// input k-1 cycles late and its output is held back N-k cycles, so all bits
// of one median leave together. DEPTH = 0 is a plain wire. The registers
// are cleared by the synchronous active-low reset (a choice of this design).
module delay_line #(
  parameter int unsigned WIDTH = 1,
  parameter int unsigned DEPTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  if (DEPTH == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [WIDTH-1:0] r [DEPTH];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) r[i] <= '0;
      end else begin
        r[0] <= d;
        for (int i = 1; i < DEPTH; i++) r[i] <= r[i-1];
      end
    end
    assign q = r[DEPTH-1];
  end

endmodule
