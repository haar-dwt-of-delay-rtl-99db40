// haar_pm: processing module of the multi-level Haar transform.
//
// Handles one decomposition level of a sample stream. Samples arrive on x
// with en (driven by the controller). On the first sample of a pair
// (phase = 0) the sample is stored in the pair register; on the second
// (phase = 1) a Ladner-Fischer adder and subtractor form
//   approx = first + second,   detail = first - second
// and valid is raised. approx/detail/valid are combinational from x and the
// pair register so that the next level can take approx in the same clock; the
// registers that hold results are loaded by the caller on valid.
// Samples and results are W-bit two's complement; W must leave room for the
// growth over all levels (no overflow is checked).
// The processing module computing one level's coefficients follows the
// source description; the pair register and the combinational chaining are
// this design's choices.
module haar_pm #(
  parameter int W = 13
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         en,
  input  logic         phase,
  input  logic [W-1:0] x,
  output logic         valid,
  output logic [W-1:0] approx,
  output logic [W-1:0] detail
);
  logic [W-1:0] first_q;

  always_ff @(posedge clk) begin
    if (rst)               first_q <= '0;
    else if (en && !phase) first_q <= x;
  end

  lf_addsub #(.WIDTH(W)) u_add (.a(first_q), .b(x), .sub(1'b0), .result(approx), .cout());
  lf_addsub #(.WIDTH(W)) u_sub (.a(first_q), .b(x), .sub(1'b1), .result(detail), .cout());

  assign valid = en && phase;
endmodule
