// dwt_top: 1-D Haar transform core with magnitude outputs.
//
// Holds the forward Haar step (haar_fdwt8) and, on each of its N outputs, a
// magnitude stage (coef_abs_buffer: inverter, +1 adder, sign multiplexer).
// dwt_out carries the signed coefficients (sums first, then differences) for
// a later inverse transform; dwt_mag carries their magnitudes, the
// non-negative outputs of the block.
// Timing: x sampled with in_valid; dwt_out, dwt_mag and out_valid one clock
// later. rst is synchronous, active high.
// The structure (one transform core, one inverter/adder/multiplexer chain
// per output) follows the source schematic; widths and handshake are this
// design's choices.
module dwt_top
  import haar_pkg::*;
#(
  parameter int N  = N_POINTS,
  parameter int IW = PIX_W,
  parameter int CW = PIX_W + 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic [N-1:0][IW-1:0]  x,
  output logic                  out_valid,
  output logic [N-1:0][CW-1:0]  dwt_out,
  output logic [N-1:0][CW-1:0]  dwt_mag
);
  haar_fdwt8 #(.N(N), .IW(IW), .CW(CW)) u_dwt (
    .clk, .rst, .in_valid, .x, .out_valid, .coef(dwt_out)
  );

  for (genvar i = 0; i < N; i++) begin : g_abs
    coef_abs_buffer #(.W(CW)) u_abs (.coef(dwt_out[i]), .mag(dwt_mag[i]));
  end
endmodule
