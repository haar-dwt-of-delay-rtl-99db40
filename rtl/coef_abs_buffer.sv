// coef_abs_buffer: removes the sign of a wavelet coefficient.
//
// A W-bit two's-complement coefficient is replaced by its magnitude. The
// negated value is formed as the bitwise inverse plus one, the +1 coming
// from the carry-in of a Ladner-Fischer adder, and a 2:1 multiplexer
// controlled by the sign bit selects between the coefficient and its
// negation. The magnitude is returned as a W-bit unsigned number, which holds
// every magnitude including that of the most negative input.
// Purely combinational.
// Inverter, adder and multiplexer per coefficient follow the source
// schematic; reading "remove negative coefficients" as taking the magnitude
// is this design's interpretation.
module coef_abs_buffer #(
  parameter int W = 10
) (
  input  logic [W-1:0] coef,
  output logic [W-1:0] mag
);
  logic [W-1:0] inv, neg;

  assign inv = ~coef;

  lf_adder #(.WIDTH(W)) u_inc (
    .a(inv), .b('0), .cin(1'b1), .sum(neg), .cout()
  );

  assign mag = coef[W-1] ? neg : coef;
endmodule
