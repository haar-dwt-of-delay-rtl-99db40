// tb_haar_pm: random sample pairs (with idle clocks between) through one
// processing module; on the second sample of each pair approx and detail
// must equal first+second and first-second, with valid high only then.
module tb_haar_pm;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, phase = 0;
  logic [12:0] x, approx, detail;
  logic        valid;
  int          first, second;

  haar_pm u_dut (.clk, .rst, .en, .phase, .x, .valid, .approx, .detail);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 4000; n++) begin
      first  = int'($urandom_range(4000)) - 2000;
      second = int'($urandom_range(4000)) - 2000;
      @(negedge clk) en = 1; phase = 0; x = 13'(first);
      #1 checks++; if (valid) failures++;
      @(negedge clk) en = 0; phase = 1; x = 13'($urandom);   // idle clock
      #1 checks++; if (valid) failures++;
      @(negedge clk) en = 1; phase = 1; x = 13'(second);
      #1;
      checks += 2;
      if (!valid) failures++;
      if ($signed(approx) != 13'(first + second) || $signed(detail) != 13'(first - second)) begin
        failures++;
        if (failures < 5) $display("FAIL %0d %0d -> %0d %0d", first, second, $signed(approx), $signed(detail));
      end
    end
    @(negedge clk) en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
