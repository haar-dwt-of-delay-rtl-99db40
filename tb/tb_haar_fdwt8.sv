// tb_haar_fdwt8: random pixel vectors (one per clock, with gaps) through the
// forward step; each output vector is compared, one clock after its input,
// with the pair sums and differences computed here. Also checks that the
// coefficients hold while in_valid is low.
module tb_haar_fdwt8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [7:0][7:0] x;
  logic            out_valid;
  logic [7:0][9:0] coef, exp_c;
  logic            exp_v;

  haar_fdwt8 u_dut (.clk, .rst, .in_valid, .x, .out_valid, .coef);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0][9:0] model(input logic [7:0][7:0] v);
    for (int i = 0; i < 4; i++) begin
      model[i]     = 10'(int'(v[2*i]) + int'(v[2*i+1]));
      model[4 + i] = 10'(int'(v[2*i]) - int'(v[2*i+1]));
    end
  endfunction

  initial begin
    exp_c = '0;
    x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      for (int i = 0; i < 8; i++) x[i] = 8'($urandom);
      if (n < 4) x = (n % 2 == 0) ? {8{8'hff}} : {4{8'h00, 8'hff}};
      exp_v = in_valid;
      if (in_valid) exp_c = model(x);
      @(posedge clk); #1;
      checks += 2;
      if (out_valid != exp_v) failures++;
      if (coef != exp_c) begin
        failures++;
        if (failures < 5) $display("FAIL vector %0d", n);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
