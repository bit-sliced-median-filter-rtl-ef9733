// ms_cell: mask-and-set (M/S) module for one window element and one bit.
//
// From the mask flag M, the setting flag S and the data bit B of its element
// it forms the bit C that goes to the majority gate: B while the element is
// still in the subset that holds the median (M = 1), the stored setting S
// once it has been pushed out (M = 0). Given the majority U of this bit
// position it produces the flags for the next, less significant bit:
//   C  = M&B | ~M&S
//   M' = M & ~(U ^ C)   (stays in the subset only if its bit equals U)
//   S' = C              (an element leaving the subset has C = ~U, the
//                        local extreme that keeps the median's rank)
// These equations follow the published algorithm; combinational only.
module ms_cell (
  input  logic b,       // data bit of this element
  input  logic m,       // mask flag M_k
  input  logic s,       // setting flag S_k
  input  logic u,       // majority (median bit) of this bit position
  output logic c,       // bit presented to the majority gate
  output logic m_next,  // M_{k+1}
  output logic s_next   // S_{k+1}
);

  always_comb begin
    c      = m ? b : s;
    m_next = m & ~(u ^ c);
    s_next = c;
  end

endmodule
