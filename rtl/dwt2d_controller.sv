// dwt2d_controller: frame position and window selection for the 2-D path.
//
// Counts the column and row of each valid pixel of an IMG_W x IMG_H raster
// frame (left to right, top to bottom). For the pixel now presented it
// reports:
//   col, row    its position (used to address the line buffer);
//   win_valid   an overlapped 2x2 window ends here (row > 0 and col > 0);
//   keep        the window is one of the non-overlapped ones (row and col
//               both odd): the others are discarded, which is the
//               downsampling by two in both directions;
//   frame_done  this is the last pixel of the frame.
// Counters advance on each clock with in_valid and wrap at the frame end.
// col/row are registered; the flags are combinational from in_valid and the
// counters. rst (synchronous, active high) returns to the frame start.
// Selecting non-overlapped windows from the overlapped stream follows the
// source description; the counter form is this design's choice.
module dwt2d_controller
  import haar_pkg::*;
#(
  parameter int W = IMG_W,
  parameter int H = IMG_H
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  output logic [$clog2(W)-1:0] col,
  output logic [$clog2(H)-1:0] row,
  output logic                 win_valid,
  output logic                 keep,
  output logic                 frame_done
);
  localparam logic [$clog2(W)-1:0] LAST_COL = $clog2(W)'(W - 1);
  localparam logic [$clog2(H)-1:0] LAST_ROW = $clog2(H)'(H - 1);

  always_ff @(posedge clk) begin
    if (rst) begin
      col <= '0;
      row <= '0;
    end else if (in_valid) begin
      if (col == LAST_COL) begin
        col <= '0;
        row <= (row == LAST_ROW) ? '0 : row + 1'b1;
      end else begin
        col <= col + 1'b1;
      end
    end
  end

  assign win_valid  = in_valid && (row != '0) && (col != '0);
  assign keep       = in_valid && row[0] && col[0];
  assign frame_done = in_valid && (row == LAST_ROW) && (col == LAST_COL);
endmodule
