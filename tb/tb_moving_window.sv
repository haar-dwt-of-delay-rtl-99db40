// tb_moving_window: streams two random 8 x 6 images (with gaps) through the
// window with the column supplied by the testbench, and compares every
// complete window (row > 0, col > 0) with the stored image.
module tb_moving_window;
  localparam int W = 8, H = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [2:0] col;
  logic [9:0] pix, w00, w01, w10, w11;
  logic [9:0] img [H][W];

  moving_window #(.W(W), .DW(10)) u_dut (.clk, .rst, .in_valid, .col, .pix,
                                          .w00, .w01, .w10, .w11);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    col = 0; pix = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 2; f++) begin
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          while ($urandom_range(4) == 0) begin
            in_valid = 0; pix = 10'($urandom);
            @(negedge clk);
          end
          img[r][c] = 10'($urandom);
          in_valid = 1; col = 3'(c); pix = img[r][c];
          #1;
          if (r > 0 && c > 0) begin
            checks++;
            if (w00 != img[r-1][c-1] || w01 != img[r-1][c] ||
                w10 != img[r][c-1]   || w11 != img[r][c]) begin
              failures++;
              $display("FAIL window at %0d,%0d", r, c);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
