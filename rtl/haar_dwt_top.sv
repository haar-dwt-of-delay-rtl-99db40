// haar_dwt_top: Haar wavelet transform built on Ladner-Fischer adders.
//
// Three datapaths share the clock and the reset controller:
//   1-D vector path: an N-point vector of pixels (vec_x, vec_valid) goes
//     through dwt_top (forward Haar step plus magnitude stages), then
//     haar_threshold (details below vec_thr set to zero) and haar_idwt8
//     (inverse step); vec_thr is sampled with vec_x and so belongs to that
//     vector. The path gives the coefficients (dwt_coef, signed), their
//     magnitudes (dwt_mag) and the reconstructed vector (rec_x).
//     dwt_valid is high one clock after vec_valid, rec_valid three clocks
//     after it; a new vector may enter every clock.
//   2-D frame path: haar_dwt2d turns a raster stream of W x H pixels into
//     the LL, LH, HL, HH sub-bands (magnitudes plus the sign bits band_neg),
//     one set per 2x2 block, two clocks after the block's last pixel. Then
//     band_threshold (details below band_thr set to zero, band_thr sampled
//     with each set) and haar_idwt2d rebuild the 2x2 block, rec2_px =
//     {bottom-right, bottom-left, top-right, top-left} at image position
//     (2*rec2_row, 2*rec2_col), two clocks after band_valid.
//   multi-level path: haar_dwt_ml transforms a sample stream (ml_x,
//     ml_valid) over M = 4 decomposition levels, giving each level's details
//     and, once per 2^M samples, the final approximation, one clock after
//     the completing sample.
// rst_n is an asynchronous active-low reset, released synchronously by the
// reset controller; rst_out is that internal reset and clk_out the clock,
// both brought out for downstream logic to run in step.
// The blocks and their order follow the source description; placing the
// three paths side by side in one top is this design's choice.
module haar_dwt_top
  import haar_pkg::*;
#(
  parameter int N    = N_POINTS,
  parameter int IW   = PIX_W,
  parameter int W    = IMG_W,
  parameter int H    = IMG_H,
  parameter int FRAC = FRAC_BITS,
  parameter int M    = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  output logic                        clk_out,
  output logic                        rst_out,
  // 1-D vector path
  input  logic                        vec_valid,
  input  logic [N-1:0][IW-1:0]        vec_x,
  input  logic [IW+1:0]               vec_thr,
  output logic                        dwt_valid,
  output logic [N-1:0][IW+1:0]        dwt_coef,
  output logic [N-1:0][IW+1:0]        dwt_mag,
  output logic                        rec_valid,
  output logic [N-1:0][IW-1:0]        rec_x,
  // 2-D frame path
  input  logic                        pix_valid,
  input  logic [IW-1:0]               pix,
  output logic                        band_valid,
  output logic [IW+FRAC-1:0]          ll,
  output logic [IW+FRAC-1:0]          lh,
  output logic [IW+FRAC-1:0]          hl,
  output logic [IW+FRAC-1:0]          hh,
  output logic [$clog2(H)-2:0]        band_row,
  output logic [$clog2(W)-2:0]        band_col,
  output logic [2:0]                  band_neg,
  output logic                        frame_done,
  // 2-D reconstruction
  input  logic [IW+FRAC-1:0]          band_thr,
  output logic                        rec2_valid,
  output logic [3:0][IW-1:0]          rec2_px,
  output logic [$clog2(H)-2:0]        rec2_row,
  output logic [$clog2(W)-2:0]        rec2_col,
  // multi-level 1-D sample stream
  input  logic                        ml_valid,
  input  logic [IW-1:0]               ml_x,
  output logic [M-1:0]                ml_det_valid,
  output logic [M-1:0][IW+M:0]        ml_det,
  output logic                        ml_app_valid,
  output logic [IW+M:0]               ml_app,
  output logic                        ml_block_done
);
  localparam int CW  = IW + 2;
  localparam int DW  = IW + FRAC;
  localparam int RW  = $clog2(H) - 1;
  localparam int CLW = $clog2(W) - 1;

  logic                 rst;
  logic [CW-1:0]        thr_q;
  logic                 thr_valid;
  logic [N-1:0][CW-1:0] thr_coef;
  logic                 bt_valid;
  logic [DW-1:0]        bt_ll, bt_lh, bt_hl, bt_hh;
  logic [2:0]           bt_neg;
  logic [RW-1:0]        bt_row;
  logic [CLW-1:0]       bt_col;

  reset_controller u_rstc (.clk, .rst_n_in(rst_n), .rst, .rst_out);
  assign clk_out = clk;

  dwt_top #(.N(N), .IW(IW), .CW(CW)) u_dwt_top (
    .clk, .rst, .in_valid(vec_valid), .x(vec_x),
    .out_valid(dwt_valid), .dwt_out(dwt_coef), .dwt_mag
  );

  // The threshold travels with its vector: sampled together with vec_x and
  // applied one stage later, when that vector's coefficients are present.
  always_ff @(posedge clk) begin
    if (rst)            thr_q <= '0;
    else if (vec_valid) thr_q <= vec_thr;
  end

  haar_threshold #(.N(N), .CW(CW)) u_thr (
    .clk, .rst, .in_valid(dwt_valid), .thr(thr_q), .coef_in(dwt_coef),
    .out_valid(thr_valid), .coef_out(thr_coef)
  );

  haar_idwt8 #(.N(N), .CW(CW), .OW(IW)) u_idwt (
    .clk, .rst, .in_valid(thr_valid), .coef(thr_coef),
    .out_valid(rec_valid), .x(rec_x)
  );

  haar_dwt2d #(.W(W), .H(H), .IW(IW), .FRAC(FRAC)) u_dwt2d (
    .clk, .rst, .pix_valid, .pix,
    .band_valid, .ll, .lh, .hl, .hh, .band_row, .band_col, .band_neg, .frame_done
  );

  band_threshold #(.DW(DW), .RW(RW), .CLW(CLW)) u_bthr (
    .clk, .rst, .in_valid(band_valid), .thr(band_thr),
    .ll_in(ll), .lh_in(lh), .hl_in(hl), .hh_in(hh), .neg_in(band_neg),
    .row_in(band_row), .col_in(band_col),
    .out_valid(bt_valid), .ll(bt_ll), .lh(bt_lh), .hl(bt_hl), .hh(bt_hh),
    .neg(bt_neg), .row(bt_row), .col(bt_col)
  );

  haar_dwt_ml #(.M(M), .IW(IW), .CW(IW + M + 1)) u_ml (
    .clk, .rst, .in_valid(ml_valid), .x(ml_x),
    .det_valid(ml_det_valid), .det(ml_det), .app_valid(ml_app_valid), .app(ml_app),
    .block_done(ml_block_done)
  );

  haar_idwt2d #(.DW(DW), .OW(IW), .RW(RW), .CLW(CLW)) u_idwt2d (
    .clk, .rst, .in_valid(bt_valid),
    .ll(bt_ll), .lh(bt_lh), .hl(bt_hl), .hh(bt_hh), .neg(bt_neg),
    .row_in(bt_row), .col_in(bt_col),
    .out_valid(rec2_valid), .px(rec2_px), .row(rec2_row), .col(rec2_col)
  );
endmodule
