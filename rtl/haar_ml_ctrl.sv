// haar_ml_ctrl: control block of the multi-level Haar transform.
//
// Counts the valid input samples modulo 2^M. Level m (1..M) works on every
// 2^(m-1)-th sample: its enable en[m-1] is high when a sample arrives and the
// low m-1 counter bits are all ones (level 1 takes every sample), and its
// phase[m-1] is counter bit m-1, i.e. whether this is the first or the
// second member of the pair at that level. The controller thereby makes each
// processing module load its pair register and present its result at the
// right sample; level M finishes once every 2^M samples (block_done).
// Enables and phases are combinational from in_valid and the registered
// counter. rst (synchronous, active high) starts a new block.
// A control block synchronising the processing modules follows the source
// description; the counter form is this design's choice.
module haar_ml_ctrl #(
  parameter int M = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         in_valid,
  output logic [M-1:0] en,
  output logic [M-1:0] phase,
  output logic         block_done
);
  logic [M-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)           cnt <= '0;
    else if (in_valid) cnt <= cnt + 1'b1;
  end

  for (genvar m = 0; m < M; m++) begin : g_lvl
    if (m == 0) begin : g_first
      assign en[m] = in_valid;
    end else begin : g_next
      assign en[m] = in_valid && (&cnt[m-1:0]);
    end
    assign phase[m] = cnt[m];
  end

  assign block_done = in_valid && (&cnt);
endmodule
