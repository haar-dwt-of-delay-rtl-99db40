// moving_window: 2x2 overlapped window over a raster pixel stream.
//
// A line buffer of W words holds the previous image row. When a pixel at
// column col arrives, the word at col (the pixel above it) is read and the
// new pixel written in its place; two registers keep the pixel to the left
// and the pixel above-left. The window for the arriving pixel is
//   w00 = above-left   w01 = above
//   w10 = left         w11 = current pixel
// and is meaningful when row > 0 and col > 0 (see dwt2d_controller).
// Consecutive windows overlap by one column, consecutive rows by one row.
// Timing: the window is combinational from the stored state and the current
// pixel; state updates on the clock edge with in_valid. The line buffer is
// written before it is read at any address, so it needs no reset; the two
// registers are cleared by rst (synchronous, active high).
// The overlapped 2x2 window follows the source description; the line-buffer
// realisation is this design's choice.
module moving_window
  import haar_pkg::*;
#(
  parameter int W  = IMG_W,
  parameter int DW = PIX_W + FRAC_BITS
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic [$clog2(W)-1:0] col,
  input  logic [DW-1:0]        pix,
  output logic [DW-1:0]        w00,
  output logic [DW-1:0]        w01,
  output logic [DW-1:0]        w10,
  output logic [DW-1:0]        w11
);
  logic [DW-1:0] line_buf [W];
  logic [DW-1:0] left_q, above_left_q, above;

  assign above = line_buf[col];

  always_ff @(posedge clk) begin
    if (in_valid) line_buf[col] <= pix;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      left_q       <= '0;
      above_left_q <= '0;
    end else if (in_valid) begin
      left_q       <= pix;
      above_left_q <= above;
    end
  end

  assign w00 = above_left_q;
  assign w01 = above;
  assign w10 = left_q;
  assign w11 = pix;
endmodule
