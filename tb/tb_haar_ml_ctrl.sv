// tb_haar_ml_ctrl: random valid pattern over several blocks; for every valid
// sample, level m must be enabled exactly when the sample index (counted
// here) is a multiple-minus-one of 2^(m-1), with phase equal to bit m-1 of
// the index; block_done must mark every 16th sample.
module tb_haar_ml_ctrl;
  int checks = 0, failures = 0, n_done = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [3:0] en, phase;
  logic       block_done;
  int         idx;

  haar_ml_ctrl u_dut (.clk, .rst, .in_valid, .en, .phase, .block_done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    idx = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 16 * 20; ) begin
      @(negedge clk);
      in_valid = ($urandom_range(3) != 0);
      #1;
      for (int m = 0; m < 4; m++) begin
        checks++;
        if (en[m] != (in_valid && ((idx % (1 << m)) == (1 << m) - 1))) failures++;
        if (in_valid && en[m] && phase[m] != ((idx >> m) & 1)) failures++;
      end
      checks++;
      if (block_done != (in_valid && (idx % 16) == 15)) failures++;
      if (block_done) n_done++;
      if (in_valid) begin idx++; n++; end
    end
    checks++;
    if (n_done != 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
