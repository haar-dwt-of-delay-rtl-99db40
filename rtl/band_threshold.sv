// band_threshold: hard thresholding of the 2-D detail sub-bands.
//
// Takes one sub-band set in sign-magnitude form (LL, and the magnitudes of
// LH, HL, HH with their sign bits neg = {LH<0, HL<0, HH<0}). Each detail
// whose magnitude is below thr becomes zero (magnitude and sign cleared); LL
// and details at or above thr pass unchanged. Row/column tags pass along.
// Timing: sampled with in_valid, result and out_valid one clock later. thr
// is sampled with the set. rst is synchronous, active high.
// A thresholding step between the forward and inverse transform follows
// the source processing flow; hard thresholding of the details is this
// design's choice.
module band_threshold #(
  parameter int DW  = 10,
  parameter int RW  = 7,
  parameter int CLW = 7
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           in_valid,
  input  logic [DW-1:0]  thr,
  input  logic [DW-1:0]  ll_in,
  input  logic [DW-1:0]  lh_in,
  input  logic [DW-1:0]  hl_in,
  input  logic [DW-1:0]  hh_in,
  input  logic [2:0]     neg_in,
  input  logic [RW-1:0]  row_in,
  input  logic [CLW-1:0] col_in,
  output logic           out_valid,
  output logic [DW-1:0]  ll,
  output logic [DW-1:0]  lh,
  output logic [DW-1:0]  hl,
  output logic [DW-1:0]  hh,
  output logic [2:0]     neg,
  output logic [RW-1:0]  row,
  output logic [CLW-1:0] col
);
  logic [2:0] below_thr;
  assign below_thr = {lh_in < thr, hl_in < thr, hh_in < thr};

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      {ll, lh, hl, hh} <= '0;
      neg <= '0;
      row <= '0;
      col <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        ll  <= ll_in;
        lh  <= below_thr[2] ? '0 : lh_in;
        hl  <= below_thr[1] ? '0 : hl_in;
        hh  <= below_thr[0] ? '0 : hh_in;
        neg <= neg_in & ~below_thr;
        row <= row_in;
        col <= col_in;
      end
    end
  end
endmodule
