// tb_data_format_conv: every pixel value converted to Q8.2 (value * 4) with
// one clock of latency; q holds while in_valid is low; reset clears valid.
module tb_data_format_conv;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [7:0] pix;
  logic       out_valid;
  logic [9:0] q;

  data_format_conv u_dut (.clk, .rst, .in_valid, .pix, .out_valid, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pix = 0;
    repeat (2) @(posedge clk);
    #1 checks++; if (out_valid) failures++;
    rst = 0;
    for (int i = 0; i < 256; i++) begin
      @(negedge clk) in_valid = 1; pix = 8'(i);
      @(posedge clk); #1;
      checks += 2;
      if (!out_valid) failures++;
      if (int'(q) != 4 * i) begin failures++; $display("FAIL %0d -> %0d", i, q); end
      @(negedge clk) in_valid = 0; pix = 8'($urandom);
      @(posedge clk); #1;
      checks += 2;
      if (out_valid) failures++;
      if (int'(q) != 4 * i) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
