// tb_haar_idwt8: (1) coefficients of random pixel vectors, computed here
// with the forward Haar equations, must be inverted exactly; (2) random
// approximations with random (altered) details must give
// clip((a +/- d) >> 1) to the pixel range. One clock of latency.
module tb_haar_idwt8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [7:0][9:0] coef;
  logic [7:0][7:0] x, e;
  logic            out_valid;

  haar_idwt8 u_dut (.clk, .rst, .in_valid, .coef, .out_valid, .x);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  initial begin
    int a, d;
    coef = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      in_valid = 1;
      for (int i = 0; i < 4; i++) begin
        if (n < 3000) begin
          e[2*i] = 8'($urandom); e[2*i+1] = 8'($urandom);
          a = int'(e[2*i]) + int'(e[2*i+1]);
          d = int'(e[2*i]) - int'(e[2*i+1]);
        end else begin
          a = int'($urandom_range(510));
          d = int'($urandom_range(510)) - 255;
          e[2*i]   = 8'(clip((a + d) >>> 1));
          e[2*i+1] = 8'(clip((a - d) >>> 1));
        end
        coef[i] = 10'(a); coef[4 + i] = 10'(d);
      end
      @(posedge clk); #1;
      checks += 2;
      if (!out_valid) failures++;
      if (x != e) begin
        failures++;
        if (failures < 5) $display("FAIL vector %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
