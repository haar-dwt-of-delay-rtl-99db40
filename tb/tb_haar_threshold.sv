// tb_haar_threshold: random coefficient vectors and thresholds; detail
// coefficients with magnitude below the threshold must become zero, all
// others pass unchanged, with one clock of latency.
module tb_haar_threshold;
  int checks = 0, failures = 0, zeroed = 0, kept = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [9:0]      thr;
  logic [7:0][9:0] coef_in, coef_out, e;
  logic            out_valid;

  haar_threshold u_dut (.clk, .rst, .in_valid, .thr, .coef_in, .out_valid, .coef_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v;
    coef_in = '0; thr = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = 1;
      thr = 10'($urandom_range(64));
      for (int i = 0; i < 8; i++) begin
        v = (i < 4) ? int'($urandom_range(510)) : int'($urandom_range(160)) - 80;
        coef_in[i] = 10'(v);
        if (i >= 4 && ((v < 0) ? -v : v) < int'(thr)) begin
          e[i] = '0; zeroed++;
        end else begin
          e[i] = coef_in[i]; if (i >= 4) kept++;
        end
      end
      @(posedge clk); #1;
      checks += 2;
      if (!out_valid) failures++;
      if (coef_out != e) failures++;
    end
    checks++;
    if (zeroed == 0 || kept == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
