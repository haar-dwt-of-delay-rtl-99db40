// tb_band_threshold: random sub-band sets and thresholds; details below the
// threshold must come out as zero with their sign cleared, everything else
// unchanged, one clock after the input.
module tb_band_threshold;
  int checks = 0, failures = 0, zeroed = 0, kept = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [9:0] thr, ll_in, lh_in, hl_in, hh_in, ll, lh, hl, hh;
  logic [2:0] neg_in, neg;
  logic       out_valid;
  logic [6:0] row_in, col_in, row, col;
  logic [9:0] e_lh, e_hl, e_hh;
  logic [2:0] e_neg;

  band_threshold u_dut (.clk, .rst, .in_valid, .thr, .ll_in, .lh_in, .hl_in, .hh_in,
                        .neg_in, .row_in, .col_in, .out_valid, .ll, .lh, .hl, .hh,
                        .neg, .row, .col);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {thr, ll_in, lh_in, hl_in, hh_in, neg_in, row_in, col_in} = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = 1;
      thr = 10'($urandom_range(60));
      ll_in = 10'($urandom); lh_in = 10'($urandom_range(100));
      hl_in = 10'($urandom_range(100)); hh_in = 10'($urandom_range(100));
      neg_in = 3'($urandom); row_in = 7'($urandom); col_in = 7'($urandom);
      e_lh = (lh_in < thr) ? '0 : lh_in;
      e_hl = (hl_in < thr) ? '0 : hl_in;
      e_hh = (hh_in < thr) ? '0 : hh_in;
      e_neg = neg_in & ~{lh_in < thr, hl_in < thr, hh_in < thr};
      zeroed += int'(lh_in < thr) + int'(hl_in < thr) + int'(hh_in < thr);
      kept   += int'(lh_in >= thr) + int'(hl_in >= thr) + int'(hh_in >= thr);
      @(posedge clk); #1;
      checks += 3;
      if (!out_valid) failures++;
      if (ll != ll_in || lh != e_lh || hl != e_hl || hh != e_hh || neg != e_neg) failures++;
      if (row != row_in || col != col_in) failures++;
    end
    checks++;
    if (zeroed == 0 || kept == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
