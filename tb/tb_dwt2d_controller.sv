// tb_dwt2d_controller: 8 x 4 frame with gaps in the valid stream; checks the
// column/row of each pixel, the window flags and the frame-end pulse against
// counters kept by the testbench, over three frames.
module tb_dwt2d_controller;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [2:0] col;
  logic [1:0] row;
  logic win_valid, keep, frame_done;
  int ecol, erow, nkeep;

  dwt2d_controller #(.W(8), .H(4)) u_dut (.clk, .rst, .in_valid, .col, .row,
                                          .win_valid, .keep, .frame_done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ecol = 0; erow = 0; nkeep = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 3 * 32; ) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      #1;
      checks += 5;
      if (int'(col) != ecol || int'(row) != erow) failures++;
      if (win_valid != (in_valid && ecol > 0 && erow > 0)) failures++;
      if (keep != (in_valid && ecol % 2 == 1 && erow % 2 == 1)) failures++;
      if (frame_done != (in_valid && ecol == 7 && erow == 3)) failures++;
      if (keep && !win_valid) failures++;
      if (in_valid) begin
        n++;
        if (keep) nkeep++;
        ecol++;
        if (ecol == 8) begin ecol = 0; erow = (erow + 1) % 4; end
      end
    end
    checks++;
    if (nkeep != 3 * 8) failures++;     // one kept window per 2x2 block
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
