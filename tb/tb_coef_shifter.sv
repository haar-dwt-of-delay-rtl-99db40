// tb_coef_shifter: exhaustive check of the rounding divide-by-4 at 13 bits
// against floor((x + 2) / 4), and of a divide-by-8 instance, both modulo
// their output width (the top quotients do not fit and wrap).
module tb_coef_shifter;
  int checks = 0, failures = 0;
  logic [12:0] din;
  logic [10:0] d4;
  logic [9:0]  d8;

  coef_shifter u_dut4 (.din(din), .dout(d4));
  coef_shifter #(.W(13), .SHIFT(3), .OW(10)) u_dut8 (.din(din), .dout(d8));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8192; i++) begin
      din = 13'(i);
      #1;
      checks += 2;
      if (int'(d4) != ((i + 2) / 4) % 2048) failures++;
      if (int'(d8) != ((i + 4) / 8) % 1024) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
