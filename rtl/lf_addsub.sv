// lf_addsub: WIDTH-bit adder/subtractor on the Ladner-Fischer adder.
//
// sub = 0 gives a + b, sub = 1 gives a - b as a + ~b + 1 (two's complement),
// with the carry-in of the prefix adder supplying the +1. The result is
// WIDTH bits modulo 2^WIDTH; callers size WIDTH so that no overflow can occur.
// cout is the adder carry (for subtraction: 1 when a >= b as unsigned).
// Purely combinational. The adder/subtractor role follows the source
// description; the conditional inversion is this design's choice.
module lf_addsub #(
  parameter int WIDTH = 9
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,
  output logic [WIDTH-1:0] result,
  output logic             cout
);
  logic [WIDTH-1:0] b_eff;
  assign b_eff = sub ? ~b : b;

  lf_adder #(.WIDTH(WIDTH)) u_add (
    .a   (a),
    .b   (b_eff),
    .cin (sub),
    .sum (result),
    .cout(cout)
  );
endmodule
