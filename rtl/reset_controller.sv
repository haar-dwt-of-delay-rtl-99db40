// reset_controller: reset synchroniser for the wavelet datapaths.
//
// rst_n_in is an external, asynchronous, active-low reset. It is passed
// through a chain of STAGES flip-flops so that reset is asserted at once
// (asynchronously) but released only on a clock edge, STAGES clocks after
// rst_n_in rises. rst is the resulting active-high reset for the logic
// inside; rst_out is the same signal brought out so that logic downstream
// can be released in step with this block.
// The existence of a reset controller and of rst_out follows the source
// description; the synchroniser form and its depth are this design's
// choices.
module reset_controller #(
  parameter int STAGES = 2
) (
  input  logic clk,
  input  logic rst_n_in,
  output logic rst,
  output logic rst_out
);
  logic [STAGES-1:0] sync;

  always_ff @(posedge clk or negedge rst_n_in) begin
    if (!rst_n_in) sync <= '0;
    else           sync <= {sync[STAGES-2:0], 1'b1};
  end

  assign rst     = ~sync[STAGES-1];
  assign rst_out = rst;
endmodule
