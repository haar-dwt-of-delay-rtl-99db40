// data_format_conv: pixel to fixed-point conversion.
//
// Converts a PIX_W-bit unsigned grey level into an unsigned Q(PIX_W).FRAC
// fixed-point number, i.e. the pixel scaled by 2^FRAC, so that the later
// divisions of the 2-D transform keep FRAC fractional bits instead of
// truncating. The conversion is registered: pixel and in_valid are sampled
// on a clock edge and q / out_valid are presented for one clock after it.
// rst is synchronous, active high.
// The conversion into a Q format follows the source description; the
// number of fractional bits (default 2, enough for the divide-by-four of the
// 2-D step to be exact) is this design's choice.
module data_format_conv
  import haar_pkg::*;
#(
  parameter int IW   = PIX_W,
  parameter int FRAC = FRAC_BITS
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic [IW-1:0]      pix,
  output logic               out_valid,
  output logic [IW+FRAC-1:0] q
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      q         <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) q <= {pix, {FRAC{1'b0}}};
    end
  end
endmodule
