// coef_shifter: division of a non-negative coefficient by 2^SHIFT.
//
// Adds half an output LSB (2^(SHIFT-1)) with a Ladner-Fischer adder and
// shifts right by SHIFT, i.e. divides with rounding to nearest (ties up).
// Input is W-bit unsigned; the output keeps the low OW bits of the rounded
// quotient, OW being chosen by the caller to hold the largest quotient.
// Purely combinational.
// The shifter performing the division factor follows the source
// description; the rounding is this design's choice.
module coef_shifter #(
  parameter int W     = 13,
  parameter int SHIFT = 2,
  parameter int OW    = 11
) (
  input  logic [W-1:0]  din,
  output logic [OW-1:0] dout
);
  localparam logic [W-1:0] HALF = (SHIFT > 0) ? W'(1) << (SHIFT - 1) : '0;

  logic [W-1:0] rounded;
  logic         carry;
  logic [W:0]   full;

  lf_adder #(.WIDTH(W)) u_round (
    .a(din), .b(HALF), .cin(1'b0), .sum(rounded), .cout(carry)
  );

  assign full = {carry, rounded} >> SHIFT;
  assign dout = full[OW-1:0];
endmodule
