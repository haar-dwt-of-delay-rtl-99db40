// haar_idwt8: one inverse Haar step, N coefficients back to N pixels.
//
// The input holds approximations a_i (indices 0..N/2-1) and details d_i
// (indices N/2..N-1), CW-bit two's complement, as produced by haar_fdwt8.
// Each output pair is rebuilt with the linear equations
//   s_2i   = a_i + d_i,   s_2i+1 = a_i - d_i
// on Ladner-Fischer adder/subtractors (CW+1 bits, no overflow), followed by
// an arithmetic shift right by one: the forward step uses unit filter
// coefficients, so its factor 2 is divided out here. Results are clipped to
// the pixel range 0..2^OW-1, which only matters once details have been
// altered (for example by thresholding); without that the step is exact.
// Timing: sampled with in_valid, pixels and out_valid one clock later.
// rst is synchronous, active high.
// The two equations follow the source description; the shift, clipping,
// widths and handshake are this design's choices.
module haar_idwt8
  import haar_pkg::*;
#(
  parameter int N  = N_POINTS,
  parameter int CW = PIX_W + 2,
  parameter int OW = PIX_W
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic [N-1:0][CW-1:0]  coef,
  output logic                  out_valid,
  output logic [N-1:0][OW-1:0]  x
);
  localparam int SW = CW + 1;
  localparam logic signed [SW-1:0] MAXV = SW'((1 << OW) - 1);

  logic [N-1:0][OW-1:0] x_d;

  function automatic logic [OW-1:0] clip(input logic signed [SW-1:0] v);
    if (v < 0)         return '0;
    else if (v > MAXV) return '1;
    else               return OW'(v);
  endfunction

  for (genvar i = 0; i < N / 2; i++) begin : g_pair
    logic [SW-1:0] ai, di, s_even, s_odd;
    assign ai = {coef[i][CW-1], coef[i]};
    assign di = {coef[N/2 + i][CW-1], coef[N/2 + i]};

    lf_addsub #(.WIDTH(SW)) u_even (
      .a(ai), .b(di), .sub(1'b0), .result(s_even), .cout()
    );
    lf_addsub #(.WIDTH(SW)) u_odd (
      .a(ai), .b(di), .sub(1'b1), .result(s_odd), .cout()
    );

    assign x_d[2*i]   = clip($signed(s_even) >>> 1);
    assign x_d[2*i+1] = clip($signed(s_odd) >>> 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      x         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) x <= x_d;
    end
  end
endmodule
