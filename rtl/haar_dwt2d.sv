// haar_dwt2d: streaming one-level 2-D Haar transform of a raster frame.
//
// Pixels of a W x H frame enter one per clock with pix_valid, row by row.
// The chain is
//   data_format_conv  pixel -> unsigned Q(IW).FRAC (registered)
//   dwt2d_controller  column/row counters, window selection
//   moving_window     line buffer forming the overlapped 2x2 window
//   subband_addsub    LL, LH, HL, HH with Ladner-Fischer add/subtract units
//   coef_abs_buffer   magnitudes of LH, HL, HH (LL is never negative)
//   coef_shifter      divide by 4 (the 2-D Haar factor 1/2 * 1/2)
//   downsample_dff    keep only the non-overlapped windows (row and column
//                     both odd), i.e. downsample by two in each direction
// Outputs are DW = IW + FRAC bit unsigned Q(IW).FRAC numbers: ll is the mean
// of the 2x2 block, lh / hl / hh a quarter of the magnitude of the
// row / column / diagonal difference. With FRAC = 2 the division is exact.
// band_row / band_col give the position in the (W/2) x (H/2) sub-band image.
// band_neg = {LH<0, HL<0, HH<0} keeps the signs the magnitude stage removes,
// so that haar_idwt2d can rebuild the pixels.
// Timing: the bands of the block whose bottom-right pixel enters at clock t
// are presented with band_valid during clock t+2; one set per 2x2 block,
// W*H/4 sets per frame, at the input pixel rate. frame_done accompanies the
// last set of a frame. rst is synchronous, active high.
// The block chain follows the source description; the concrete widths,
// band naming and timing are this design's choices.
module haar_dwt2d
  import haar_pkg::*;
#(
  parameter int W    = IMG_W,
  parameter int H    = IMG_H,
  parameter int IW   = PIX_W,
  parameter int FRAC = FRAC_BITS
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   pix_valid,
  input  logic [IW-1:0]          pix,
  output logic                   band_valid,
  output logic [IW+FRAC-1:0]     ll,
  output logic [IW+FRAC-1:0]     lh,
  output logic [IW+FRAC-1:0]     hl,
  output logic [IW+FRAC-1:0]     hh,
  output logic [$clog2(H)-2:0]   band_row,
  output logic [$clog2(W)-2:0]   band_col,
  output logic [2:0]             band_neg,
  output logic                   frame_done
);
  localparam int DW = IW + FRAC;
  localparam int SW = DW + 3;
  localparam int XW = $clog2(W);
  localparam int YW = $clog2(H);

  logic          q_valid;
  logic [DW-1:0] q;
  logic [XW-1:0] col;
  logic [YW-1:0] row;
  logic          win_valid, keep, last_pix;
  logic [DW-1:0] w00, w01, w10, w11;
  logic [SW-1:0] ll_s, lh_s, hl_s, hh_s;
  logic [SW-1:0] lh_m, hl_m, hh_m;
  logic [DW-1:0] ll_d, lh_d, hl_d, hh_d;

  data_format_conv #(.IW(IW), .FRAC(FRAC)) u_dfc (
    .clk, .rst, .in_valid(pix_valid), .pix, .out_valid(q_valid), .q
  );

  dwt2d_controller #(.W(W), .H(H)) u_ctrl (
    .clk, .rst, .in_valid(q_valid), .col, .row,
    .win_valid, .keep, .frame_done(last_pix)
  );

  moving_window #(.W(W), .DW(DW)) u_win (
    .clk, .rst, .in_valid(q_valid), .col, .pix(q), .w00, .w01, .w10, .w11
  );

  subband_addsub #(.DW(DW), .SW(SW)) u_bands (
    .w00, .w01, .w10, .w11, .ll(ll_s), .lh(lh_s), .hl(hl_s), .hh(hh_s)
  );

  coef_abs_buffer #(.W(SW)) u_abs_lh (.coef(lh_s), .mag(lh_m));
  coef_abs_buffer #(.W(SW)) u_abs_hl (.coef(hl_s), .mag(hl_m));
  coef_abs_buffer #(.W(SW)) u_abs_hh (.coef(hh_s), .mag(hh_m));

  coef_shifter #(.W(SW), .SHIFT(2), .OW(DW)) u_sh_ll (.din(ll_s), .dout(ll_d));
  coef_shifter #(.W(SW), .SHIFT(2), .OW(DW)) u_sh_lh (.din(lh_m), .dout(lh_d));
  coef_shifter #(.W(SW), .SHIFT(2), .OW(DW)) u_sh_hl (.din(hl_m), .dout(hl_d));
  coef_shifter #(.W(SW), .SHIFT(2), .OW(DW)) u_sh_hh (.din(hh_m), .dout(hh_d));

  downsample_dff #(.DW(DW), .RW(YW - 1), .CLW(XW - 1)) u_dff (
    .clk, .rst, .load(keep),
    .ll_in(ll_d), .lh_in(lh_d), .hl_in(hl_d), .hh_in(hh_d),
    .row_in(row[YW-1:1]), .col_in(col[XW-1:1]),
    .neg_in({lh_s[SW-1], hl_s[SW-1], hh_s[SW-1]}),
    .out_valid(band_valid), .ll, .lh, .hl, .hh, .row(band_row), .col(band_col),
    .neg(band_neg)
  );

  always_ff @(posedge clk) begin
    if (rst) frame_done <= 1'b0;
    else     frame_done <= last_pix;
  end

  // A kept window is always a complete (non-edge) overlapped window.
  assert property (@(posedge clk) disable iff (rst) keep |-> win_valid);
endmodule
