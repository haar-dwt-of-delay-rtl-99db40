// tb_haar_idwt2d: (1) random 2x2 pixel blocks are transformed here into
// sign-magnitude sub-bands (ll = a+b+c+d, lh = (a+b)-(c+d), hl = (a-b)+(c-d),
// hh = (a-b)-(c-d)) and must be rebuilt exactly; (2) with randomly zeroed
// details the pixels must equal clip((ll +/- lh +/- hl +/- hh) >>> 2).
// One clock of latency; row/column tags must pass along.
module tb_haar_idwt2d;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [9:0] ll, lh, hl, hh;
  logic [2:0] neg;
  logic [6:0] row_in, col_in, row, col;
  logic       out_valid;
  logic [3:0][7:0] px, e;

  haar_idwt2d u_dut (.clk, .rst, .in_valid, .ll, .lh, .hl, .hh, .neg, .row_in, .col_in,
                     .out_valid, .px, .row, .col);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction
  function automatic int clip(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  initial begin
    int a, b, c, d, L, LH, HL, HH;
    {ll, lh, hl, hh, neg, row_in, col_in} = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      in_valid = 1;
      a = $urandom_range(255); b = $urandom_range(255);
      c = $urandom_range(255); d = $urandom_range(255);
      if (n < 4) begin a = 255 * (n % 2); b = 255 - a; c = b; d = a; end
      L = a + b + c + d; LH = (a + b) - (c + d); HL = (a - b) + (c - d); HH = (a - b) - (c - d);
      if (n >= 3000) begin
        if ($urandom_range(1)) LH = 0;
        if ($urandom_range(1)) HL = 0;
        if ($urandom_range(1)) HH = 0;
      end
      ll = 10'(L); lh = 10'(iabs(LH)); hl = 10'(iabs(HL)); hh = 10'(iabs(HH));
      neg = {LH < 0, HL < 0, HH < 0};
      row_in = 7'($urandom); col_in = 7'($urandom);
      e[0] = 8'(clip((L + LH + HL + HH) >>> 2));
      e[1] = 8'(clip((L + LH - HL - HH) >>> 2));
      e[2] = 8'(clip((L - LH + HL - HH) >>> 2));
      e[3] = 8'(clip((L - LH - HL + HH) >>> 2));
      if (n < 3000 && e != {8'(d), 8'(c), 8'(b), 8'(a)}) failures++;   // model sanity
      @(posedge clk); #1;
      checks += 3;
      if (!out_valid) failures++;
      if (px != e) begin
        failures++;
        if (failures < 5) $display("FAIL block %0d: %h expected %h", n, px, e);
      end
      if (row != row_in || col != col_in) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
