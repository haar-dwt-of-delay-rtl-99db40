// lf_gray_cell: gray cell of a parallel-prefix carry network.
//
// Used where the lower group already reaches the carry-in, so only the
// group generate (the carry) is needed: G = g_hi | (p_hi & g_lo). It is an
// AND-OR, one AND gate fewer than a black cell, and has no propagate output.
// Purely combinational.
module lf_gray_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  output logic g_out
);
  assign g_out = g_hi | (p_hi & g_lo);
endmodule
