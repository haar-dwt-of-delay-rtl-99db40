// haar_fdwt8: one forward Haar step on a vector of N pixels (default 8).
//
// With the unit Haar filters (low pass h0 = h1 = 1, high pass g0 = 1,
// g1 = -1) the step is N/2 pair sums and N/2 pair differences:
//   coef[i]       = x[2i] + x[2i+1]      (approximation, i = 0..N/2-1)
//   coef[N/2 + i] = x[2i] - x[2i+1]      (detail)
// so the output vector is ordered averages first, details second. Each
// result comes from a Ladner-Fischer adder/subtractor; no multiplier is
// used. Coefficients are CW-bit two's complement (default PIX_W + 2 = 10
// bits, wide enough for a sum of two 8-bit pixels as a positive signed
// number). No scaling is applied here; the factor 1/2 is applied on the
// inverse side.
// Timing: x is sampled when in_valid is high; coef and out_valid appear one
// clock later (one vector per clock). rst is synchronous, active high, and
// clears out_valid and the coefficient register.
// The sums/differences and their ordering follow the source description;
// the register stage, widths and handshake are this design's choices.
module haar_fdwt8
  import haar_pkg::*;
#(
  parameter int N     = N_POINTS,
  parameter int IW    = PIX_W,
  parameter int CW    = PIX_W + 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic [N-1:0][IW-1:0]  x,
  output logic                  out_valid,
  output logic [N-1:0][CW-1:0]  coef
);
  logic [N-1:0][CW-1:0] coef_d;

  for (genvar i = 0; i < N / 2; i++) begin : g_pair
    logic [CW-1:0] xa, xb;
    assign xa = CW'(x[2*i]);
    assign xb = CW'(x[2*i+1]);

    lf_addsub #(.WIDTH(CW)) u_sum (
      .a(xa), .b(xb), .sub(1'b0), .result(coef_d[i]), .cout()
    );
    lf_addsub #(.WIDTH(CW)) u_diff (
      .a(xa), .b(xb), .sub(1'b1), .result(coef_d[N/2 + i]), .cout()
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      coef      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) coef <= coef_d;
    end
  end
endmodule
