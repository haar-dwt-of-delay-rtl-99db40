// tb_subband_addsub: random and corner 2x2 windows of 10-bit values; the
// four sub-bands are compared with integer arithmetic on the window.
module tb_subband_addsub;
  int checks = 0, failures = 0;
  logic [9:0]  w00, w01, w10, w11;
  logic [12:0] ll, lh, hl, hh;

  subband_addsub u_dut (.w00, .w01, .w10, .w11, .ll, .lh, .hl, .hh);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int a, input int b, input int c, input int d);
    w00 = 10'(a); w01 = 10'(b); w10 = 10'(c); w11 = 10'(d);
    #1;
    checks += 4;
    if ($signed(ll) != 13'(a + b + c + d)) failures++;
    if ($signed(lh) != 13'((a + b) - (c + d))) failures++;
    if ($signed(hl) != 13'((a - b) + (c - d))) failures++;
    if ($signed(hh) != 13'((a - b) - (c - d))) failures++;
  endtask

  initial begin
    check(0, 0, 0, 0);
    check(1023, 1023, 1023, 1023);
    check(0, 1023, 1023, 0);
    check(1023, 0, 0, 1023);
    for (int n = 0; n < 20000; n++)
      check($urandom_range(1023), $urandom_range(1023), $urandom_range(1023), $urandom_range(1023));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
