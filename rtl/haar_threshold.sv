// haar_threshold: hard thresholding of the detail coefficients.
//
// The input vector holds N/2 approximation coefficients followed by N/2
// detail coefficients (CW-bit two's complement). Each detail coefficient
// whose magnitude is below thr is set to zero; detail coefficients at or
// above thr, and all approximation coefficients, pass unchanged. Magnitudes
// come from coef_abs_buffer. thr is an unsigned run-time input; thr = 0
// passes everything.
// Timing: sampled with in_valid, result and out_valid one clock later.
// rst is synchronous, active high.
// Thresholding between forward and inverse transform is a step of the
// source's processing flow; hard (rather than soft) thresholding of the
// details only is this design's choice.
module haar_threshold
  import haar_pkg::*;
#(
  parameter int N  = N_POINTS,
  parameter int CW = PIX_W + 2
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic [CW-1:0]         thr,
  input  logic [N-1:0][CW-1:0]  coef_in,
  output logic                  out_valid,
  output logic [N-1:0][CW-1:0]  coef_out
);
  logic [N-1:0][CW-1:0] coef_d;

  for (genvar i = 0; i < N; i++) begin : g_c
    if (i < N / 2) begin : g_approx
      assign coef_d[i] = coef_in[i];
    end else begin : g_detail
      logic [CW-1:0] mag;
      coef_abs_buffer #(.W(CW)) u_abs (.coef(coef_in[i]), .mag(mag));
      assign coef_d[i] = (mag < thr) ? '0 : coef_in[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      coef_out  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) coef_out <= coef_d;
    end
  end
endmodule
