// tb_dwt_top: random pixel vectors through the transform core with its
// magnitude stages; the signed coefficients and their magnitudes are
// compared, one clock after the input, with values computed here.
module tb_dwt_top;
  int checks = 0, failures = 0, negatives = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [7:0][7:0] x;
  logic            out_valid;
  logic [7:0][9:0] dwt_out, dwt_mag;
  int              e_c [8];

  dwt_top u_dut (.clk, .rst, .in_valid, .x, .out_valid, .dwt_out, .dwt_mag);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = 1;
      for (int i = 0; i < 8; i++) x[i] = 8'($urandom);
      for (int i = 0; i < 4; i++) begin
        e_c[i]     = int'(x[2*i]) + int'(x[2*i+1]);
        e_c[4 + i] = int'(x[2*i]) - int'(x[2*i+1]);
      end
      @(posedge clk); #1;
      checks++;
      if (!out_valid) failures++;
      for (int i = 0; i < 8; i++) begin
        checks += 2;
        if (int'($signed(dwt_out[i])) != e_c[i]) failures++;
        if (int'(dwt_mag[i]) != ((e_c[i] < 0) ? -e_c[i] : e_c[i])) failures++;
        if (e_c[i] < 0) negatives++;
      end
    end
    checks++;
    if (negatives == 0) failures++;   // the sign removal must have been exercised
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
