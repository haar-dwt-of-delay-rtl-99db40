// tb_lf_addsub: self-checking test of the Ladner-Fischer adder/subtractor.
// Exhaustive over a, b and the add/subtract select at 9 bits; the result is
// compared modulo 512 with the integer sum or difference, and the carry out
// with the unsigned comparison a >= b for subtraction.
module tb_lf_addsub;
  int checks = 0, failures = 0;
  logic [8:0] a, b, r;
  logic       sub, co;

  lf_addsub u_dut (.a(a), .b(b), .sub(sub), .result(r), .cout(co));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 512; j++) begin
        for (int s = 0; s < 2; s++) begin
          a = 9'(i); b = 9'(j); sub = s[0];
          #1;
          checks++;
          if (s == 0) begin
            if ({co, r} != 10'(i + j)) failures++;
          end else begin
            if (r != 9'(i - j) || co != (i >= j)) failures++;
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
