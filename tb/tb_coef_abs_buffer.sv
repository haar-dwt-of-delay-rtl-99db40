// tb_coef_abs_buffer: exhaustive check of the magnitude stage at 10 bits
// (every two's-complement input) and random checks at 13 bits, against the
// integer absolute value.
module tb_coef_abs_buffer;
  int checks = 0, failures = 0;
  logic [9:0]  c10, m10;
  logic [12:0] c13, m13;

  coef_abs_buffer u_dut10 (.coef(c10), .mag(m10));
  coef_abs_buffer #(.W(13)) u_dut13 (.coef(c13), .mag(m13));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, e;
    for (int i = -512; i < 512; i++) begin
      c10 = 10'(i);
      #1;
      e = (i < 0) ? -i : i;
      checks++;
      if (int'(m10) != e) begin
        failures++;
        $display("FAIL abs(%0d) = %0d", i, m10);
      end
    end
    for (int n = 0; n < 5000; n++) begin
      v = int'($urandom_range(8191)) - 4096;
      c13 = 13'(v);
      #1;
      checks++;
      if (int'(m13) != ((v < 0) ? -v : v)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
