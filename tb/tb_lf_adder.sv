// tb_lf_adder: self-checking test of the Ladner-Fischer adder.
// Exhaustive over a, b and cin at the default 9-bit width, plus random
// vectors on a 16-bit instance; results are compared with the integer sum.
module tb_lf_adder;
  int checks = 0, failures = 0;

  logic [8:0]  a9, b9, s9;
  logic        c9, co9;
  logic [15:0] a16, b16, s16;
  logic        c16, co16;

  lf_adder u_dut9 (.a(a9), .b(b9), .cin(c9), .sum(s9), .cout(co9));
  lf_adder #(.WIDTH(16)) u_dut16 (.a(a16), .b(b16), .cin(c16), .sum(s16), .cout(co16));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 512; j++) begin
        for (int c = 0; c < 2; c++) begin
          a9 = 9'(i); b9 = 9'(j); c9 = c[0];
          #1;
          checks++;
          if ({co9, s9} != 10'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 9b %0d+%0d+%0d = %0d", i, j, c, {co9, s9});
          end
        end
      end
    end
    for (int n = 0; n < 20000; n++) begin
      a16 = 16'($urandom); b16 = 16'($urandom); c16 = 1'($urandom);
      #1;
      checks++;
      if ({co16, s16} != 17'(32'(a16) + 32'(b16) + 32'(c16))) begin
        failures++;
        if (failures < 10) $display("FAIL 16b %0d+%0d+%0d", a16, b16, c16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
