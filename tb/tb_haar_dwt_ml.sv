// tb_haar_dwt_ml: random 8-bit samples (with gaps) through the four-level
// transform. The expected coefficients are computed here per block of 16
// samples (level m detail = sum of the first half minus sum of the second
// half of each group of 2^m samples; approximation = sum of all 16), and
// every output is checked on the clock after the sample that completes it.
module tb_haar_dwt_ml;
  localparam int M = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, in_valid = 0;
  logic [7:0]            x;
  logic [M-1:0]          det_valid;
  logic [M-1:0][12:0]    det;
  logic                  app_valid, block_done;
  logic [12:0]           app;
  longint cyc = 0;

  typedef struct { longint edge_no; int v; } item_t;
  item_t dq [M][$];
  item_t aq [$];
  int    blk [16];

  haar_dwt_ml u_dut (.clk, .rst, .in_valid, .x, .det_valid, .det, .app_valid, .app, .block_done);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    #1;
    if (!rst) begin
      for (int m = 0; m < M; m++) begin
        checks++;
        if (det_valid[m] != (dq[m].size() > 0 && dq[m][0].edge_no == cyc)) begin failures++; if (failures < 5) $display("FAIL det_valid[%0d] at %0d", m, cyc); end
        if (det_valid[m] && dq[m].size() > 0) begin
          item_t e;
          e = dq[m].pop_front();
          checks++;
          if (int'($signed(det[m])) != e.v) begin
            failures++;
            if (failures < 5) $display("FAIL level %0d detail %0d expected %0d", m + 1, $signed(det[m]), e.v);
          end
        end
      end
      checks += 2;
      if (app_valid != (aq.size() > 0 && aq[0].edge_no == cyc)) failures++;
      if (block_done != app_valid) begin failures++; if (failures < 5) $display("FAIL block_done %b app_valid %b at %0d", block_done, app_valid, cyc); end
      if (app_valid && aq.size() > 0) begin
        item_t e;
        e = aq.pop_front();
        checks++;
        if (int'($signed(app)) != e.v) failures++;
      end
    end
  end

  initial begin
    x = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 16 * 200; n++) begin
      int k;
      @(negedge clk);
      while ($urandom_range(3) == 0) begin
        in_valid = 0; x = 8'($urandom);
        @(negedge clk);
      end
      k = n % 16;
      blk[k] = (n < 16) ? 255 * (k % 2) : int'($urandom_range(255));
      in_valid = 1;
      x = 8'(blk[k]);
      // every level whose group ends at this sample produces a detail now
      for (int m = 1; m <= M; m++) begin
        int g;
        g = 1 << m;
        if ((k + 1) % g == 0) begin
          item_t e;
          int s1, s2;
          s1 = 0; s2 = 0;
          for (int j = k + 1 - g; j < k + 1 - g / 2; j++) s1 += blk[j];
          for (int j = k + 1 - g / 2; j <= k; j++) s2 += blk[j];
          e.edge_no = cyc + 1;
          e.v = s1 - s2;
          dq[m-1].push_back(e);
          if (m == M) begin
            e.v = s1 + s2;
            aq.push_back(e);
          end
        end
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (aq.size() != 0 || dq[0].size() != 0 || dq[M-1].size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
