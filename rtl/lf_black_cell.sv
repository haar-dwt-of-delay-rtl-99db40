// lf_black_cell: black cell of a parallel-prefix carry network.
//
// Combines a high group (g_hi, p_hi) with the adjacent lower group
// (g_lo, p_lo): G = g_hi | (p_hi & g_lo), P = p_hi & p_lo. That is two AND
// gates and one OR gate. Purely combinational.
module lf_black_cell (
  input  logic g_hi,
  input  logic p_hi,
  input  logic g_lo,
  input  logic p_lo,
  output logic g_out,
  output logic p_out
);
  assign g_out = g_hi | (p_hi & g_lo);
  assign p_out = p_hi & p_lo;
endmodule
