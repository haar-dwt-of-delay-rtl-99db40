// haar_idwt2d: inverse one-level 2-D Haar step, one 2x2 block per set.
//
// Input is one sub-band set as produced by haar_dwt2d: LL and the magnitudes
// of LH, HL, HH (DW-bit numbers equal to the raw pixel-unit sums of the
// block) with their sign bits neg = {LH<0, HL<0, HH<0}. The details are
// given back their sign (0 - magnitude on a Ladner-Fischer subtractor), then
// two butterfly levels of Ladner-Fischer adder/subtractors undo the forward
// step, the Haar reconstruction filters (1, 1) and (1, -1) first across the
// rows of the block and then across its columns:
//   t0 = LL + LH = 2(a+b)    t1 = LL - LH = 2(c+d)
//   t2 = HL + HH = 2(a-b)    t3 = HL - HH = 2(c-d)
//   a = (t0 + t2) / 4,  b = (t0 - t2) / 4,  c = (t1 + t3) / 4,  d = (t1 - t3) / 4
// with the divide by four as an arithmetic shift. For the 2x2 Haar case the
// upsampling of the filter bank is implicit: each set rebuilds its own block.
// Pixels are clipped to 0..2^OW-1, which only matters after thresholding.
// px = {d, c, b, a} as packed [3:0] (a = top-left, b = top-right,
// c = bottom-left, d = bottom-right) at image position (2*row, 2*col).
// Timing: sampled with in_valid, px and out_valid one clock later.
// rst is synchronous, active high.
// The reconstruction filter bank follows the source figure of the
// reconstruction step; the butterfly form, sign handling, shift and clipping
// are this design's choices.
module haar_idwt2d #(
  parameter int DW  = 10,
  parameter int OW  = 8,
  parameter int RW  = 7,
  parameter int CLW = 7
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic [DW-1:0]       ll,
  input  logic [DW-1:0]       lh,
  input  logic [DW-1:0]       hl,
  input  logic [DW-1:0]       hh,
  input  logic [2:0]          neg,
  input  logic [RW-1:0]       row_in,
  input  logic [CLW-1:0]      col_in,
  output logic                out_valid,
  output logic [3:0][OW-1:0]  px,
  output logic [RW-1:0]       row,
  output logic [CLW-1:0]      col
);
  localparam int SW = DW + 3;
  localparam logic signed [SW-1:0] MAXV = SW'((1 << OW) - 1);

  logic [SW-1:0] llx, lhx, hlx, hhx;           // zero-extended magnitudes
  logic [SW-1:0] lhn, hln, hhn;                 // negated magnitudes
  logic [SW-1:0] lhs, hls, hhs;                 // signed details
  logic [SW-1:0] t0, t1, t2, t3;
  logic [3:0][SW-1:0] s4;                       // 4 x pixel, signed
  logic [3:0][OW-1:0] px_d;

  assign llx = SW'(ll);
  assign lhx = SW'(lh);
  assign hlx = SW'(hl);
  assign hhx = SW'(hh);

  lf_addsub #(.WIDTH(SW)) u_nlh (.a('0), .b(lhx), .sub(1'b1), .result(lhn), .cout());
  lf_addsub #(.WIDTH(SW)) u_nhl (.a('0), .b(hlx), .sub(1'b1), .result(hln), .cout());
  lf_addsub #(.WIDTH(SW)) u_nhh (.a('0), .b(hhx), .sub(1'b1), .result(hhn), .cout());

  assign lhs = neg[2] ? lhn : lhx;
  assign hls = neg[1] ? hln : hlx;
  assign hhs = neg[0] ? hhn : hhx;

  lf_addsub #(.WIDTH(SW)) u_t0 (.a(llx), .b(lhs), .sub(1'b0), .result(t0), .cout());
  lf_addsub #(.WIDTH(SW)) u_t1 (.a(llx), .b(lhs), .sub(1'b1), .result(t1), .cout());
  lf_addsub #(.WIDTH(SW)) u_t2 (.a(hls), .b(hhs), .sub(1'b0), .result(t2), .cout());
  lf_addsub #(.WIDTH(SW)) u_t3 (.a(hls), .b(hhs), .sub(1'b1), .result(t3), .cout());

  lf_addsub #(.WIDTH(SW)) u_a (.a(t0), .b(t2), .sub(1'b0), .result(s4[0]), .cout());
  lf_addsub #(.WIDTH(SW)) u_b (.a(t0), .b(t2), .sub(1'b1), .result(s4[1]), .cout());
  lf_addsub #(.WIDTH(SW)) u_c (.a(t1), .b(t3), .sub(1'b0), .result(s4[2]), .cout());
  lf_addsub #(.WIDTH(SW)) u_d (.a(t1), .b(t3), .sub(1'b1), .result(s4[3]), .cout());

  function automatic logic [OW-1:0] clip(input logic signed [SW-1:0] v);
    if (v < 0)         return '0;
    else if (v > MAXV) return '1;
    else               return OW'(v);
  endfunction

  for (genvar k = 0; k < 4; k++) begin : g_px
    assign px_d[k] = clip($signed(s4[k]) >>> 2);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      px  <= '0;
      row <= '0;
      col <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        px  <= px_d;
        row <= row_in;
        col <= col_in;
      end
    end
  end
endmodule
