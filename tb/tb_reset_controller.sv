// tb_reset_controller: reset must assert as soon as rst_n_in falls (without
// a clock edge) and release exactly two rising clock edges after rst_n_in
// rises; rst_out must follow rst.
module tb_reset_controller;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n_in = 0;
  logic rst, rst_out;

  reset_controller u_dut (.clk, .rst_n_in, .rst, .rst_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rst(input logic v, input string what);
    checks++;
    if (rst !== v || rst_out !== v) begin
      failures++;
      $display("FAIL %s: rst=%b rst_out=%b", what, rst, rst_out);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 expect_rst(1'b1, "held in reset");
    for (int r = 0; r < 5; r++) begin
      @(negedge clk) rst_n_in = 1'b1;
      @(posedge clk); #1 expect_rst(1'b1, "one edge after release");
      @(posedge clk); #1 expect_rst(1'b0, "two edges after release");
      repeat (3) @(posedge clk);
      #1 expect_rst(1'b0, "running");
      #2 rst_n_in = 1'b0;       // between edges
      #1 expect_rst(1'b1, "asynchronous assertion");
      repeat (2) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
