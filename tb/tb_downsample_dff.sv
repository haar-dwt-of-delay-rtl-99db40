// tb_downsample_dff: random load pattern; the bank must take new values only
// on load, hold them otherwise, and flag out_valid the clock after a load.
module tb_downsample_dff;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, load = 0;
  logic [9:0] ll_in, lh_in, hl_in, hh_in, ll, lh, hl, hh;
  logic [6:0] row_in, col_in, row, col;
  logic [2:0] neg_in, neg, e_neg;
  logic       out_valid;
  logic [9:0] e_ll, e_lh, e_hl, e_hh;
  logic [6:0] e_row, e_col;
  logic       loaded;

  downsample_dff u_dut (.clk, .rst, .load, .ll_in, .lh_in, .hl_in, .hh_in,
                        .row_in, .col_in, .neg_in, .out_valid, .ll, .lh, .hl, .hh, .row, .col, .neg);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {e_ll, e_lh, e_hl, e_hh, e_row, e_col, e_neg} = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      load = ($urandom_range(3) == 0);
      {ll_in, lh_in, hl_in, hh_in} = {10'($urandom), 10'($urandom), 10'($urandom), 10'($urandom)};
      {row_in, col_in} = {7'($urandom), 7'($urandom)};
      neg_in = 3'($urandom);
      loaded = load;
      if (load) {e_ll, e_lh, e_hl, e_hh, e_row, e_col, e_neg} = {ll_in, lh_in, hl_in, hh_in, row_in, col_in, neg_in};
      @(posedge clk); #1;
      checks += 2;
      if (out_valid != loaded) failures++;
      if ({ll, lh, hl, hh, row, col, neg} != {e_ll, e_lh, e_hl, e_hh, e_row, e_col, e_neg}) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
