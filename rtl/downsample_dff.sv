// downsample_dff: output register bank of the 2-D path.
//
// Loads the four sub-band values, the output position and the three sign
// bits of LH, HL, HH (neg, kept so the bands can be inverted later) only on clocks
// where load is high, i.e. for the non-overlapped windows the controller
// keeps; every other (overlapping) window is dropped. This is the
// downsampling by two. out_valid is high for the clock after each load; the
// outputs hold their value between loads. rst (synchronous, active high)
// clears the bank.
// A flip-flop stage that discards the overlapped windows follows the source
// description; the valid flag and the carried position are this design's
// choices.
module downsample_dff #(
  parameter int DW = 10,
  parameter int RW = 7,
  parameter int CLW = 7
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [DW-1:0] ll_in,
  input  logic [DW-1:0] lh_in,
  input  logic [DW-1:0] hl_in,
  input  logic [DW-1:0] hh_in,
  input  logic [RW-1:0] row_in,
  input  logic [CLW-1:0] col_in,
  input  logic [2:0]    neg_in,
  output logic          out_valid,
  output logic [DW-1:0] ll,
  output logic [DW-1:0] lh,
  output logic [DW-1:0] hl,
  output logic [DW-1:0] hh,
  output logic [RW-1:0] row,
  output logic [CLW-1:0] col,
  output logic [2:0]    neg
);
  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      {ll, lh, hl, hh} <= '0;
      row <= '0;
      col <= '0;
      neg <= '0;
    end else begin
      out_valid <= load;
      if (load) begin
        ll  <= ll_in;
        lh  <= lh_in;
        hl  <= hl_in;
        hh  <= hh_in;
        row <= row_in;
        col <= col_in;
        neg <= neg_in;
      end
    end
  end
endmodule
