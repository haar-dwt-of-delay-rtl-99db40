// haar_dwt_ml: streaming M-level 1-D Haar transform (default four levels).
//
// M processing modules (haar_pm) are chained: level 1 takes the input
// samples in pairs, each further level takes the approximations of the level
// before it in pairs. The control block (haar_ml_ctrl) counts samples and
// tells each level when to store the first member of a pair and when to
// produce its result. Per block of 2^M samples the transform gives
// 2^(M-1) level-1 details, 2^(M-2) level-2 details, ... one level-M detail
// and one level-M approximation (the sum of all 2^M samples). Filters are
// the unit Haar pair (1, 1) / (1, -1), without scaling.
// Outputs: for each level m a registered detail det[m-1] with a one-clock
// strobe det_valid[m-1]; the level-M approximation app with app_valid. All
// appear on the clock after the sample that completes them, so several
// levels can finish together (the last sample of a block completes all M).
// Samples are IW-bit unsigned; results are CW = IW + M + 1 bit two's
// complement. One sample per clock, with gaps allowed.
// rst is synchronous, active high, and starts a new block.
// The M = 4 processing modules and the synchronising control block follow
// the source description; widths, the output registers and timing are this
// design's choices.
module haar_dwt_ml
  import haar_pkg::*;
#(
  parameter int M  = 4,
  parameter int IW = PIX_W,
  parameter int CW = PIX_W + 4 + 1
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  logic [IW-1:0]         x,
  output logic [M-1:0]          det_valid,
  output logic [M-1:0][CW-1:0]  det,
  output logic                  app_valid,
  output logic [CW-1:0]         app,
  output logic                  block_done
);
  logic [M-1:0]          en, phase, valid;
  logic [M:0][CW-1:0]    chain;          // chain[m] is the input of level m+1
  logic [M-1:0][CW-1:0]  detail;
  logic                  done_d;

  haar_ml_ctrl #(.M(M)) u_ctrl (.clk, .rst, .in_valid, .en, .phase, .block_done(done_d));

  assign chain[0] = CW'(x);

  for (genvar m = 0; m < M; m++) begin : g_pm
    haar_pm #(.W(CW)) u_pm (
      .clk, .rst, .en(en[m]), .phase(phase[m]), .x(chain[m]),
      .valid(valid[m]), .approx(chain[m+1]), .detail(detail[m])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      det_valid  <= '0;
      det        <= '0;
      app_valid  <= 1'b0;
      app        <= '0;
      block_done <= 1'b0;
    end else begin
      det_valid  <= valid;
      app_valid  <= valid[M-1];
      block_done <= done_d;
      for (int m = 0; m < M; m++)
        if (valid[m]) det[m] <= detail[m];
      if (valid[M-1]) app <= chain[M];
    end
  end

  // The last level completes exactly when the controller closes a block.
  assert property (@(posedge clk) disable iff (rst) valid[M-1] == done_d);
endmodule
