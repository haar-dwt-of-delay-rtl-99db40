// tb_haar_dwt_top: end-to-end test of the whole design at its default sizes
// (8-point vectors, 256 x 256 frame, Q8.2 sub-bands).
//  * Reset: rst_n is pulled low between clock edges; rst_out must rise at
//    once and fall two edges after release.
//  * 1-D path: random vectors (with gaps) and random thresholds. Coefficients
//    and magnitudes are checked one edge after input, the thresholded
//    reconstruction three edges after input, all against a model here. With
//    threshold 0 the reconstruction must equal the input.
//  * 2-D path, in parallel: one full frame of a synthetic image (gradient,
//    stripes and noise) with gaps in the stream; every sub-band set is
//    checked for value, sign bits, position and the two-edge latency. The
//    sets are thresholded (threshold 0 in the first half of the frame, 24 in
//    the second) and inverted; every rebuilt 2x2 block is checked four edges
//    after its last pixel, and must equal the image where the threshold is 0.
//  * Multi-level path, in parallel: 1000 blocks of 16 random samples; every
//    detail of all four levels and every approximation is checked one edge
//    after the completing sample.
// Each mechanism is counted and must occur: asynchronous reset, sign removal
// on coefficients and on sub-bands, details zeroed and details kept by the
// threshold, exact reconstruction (1-D and 2-D), 2-D details zeroed,
// overlapped windows discarded, stalls in
// all three input streams, frame end, and on the multi-level path every
// block and every detail of all four levels.
module tb_haar_dwt_top;
  localparam int N = 8, W = 256, H = 256;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic clk_out, rst_out;
  logic                 vec_valid = 0;
  logic [N-1:0][7:0]    vec_x;
  logic [9:0]           vec_thr;
  logic                 dwt_valid, rec_valid;
  logic [N-1:0][9:0]    dwt_coef, dwt_mag;
  logic [N-1:0][7:0]    rec_x;
  logic                 pix_valid = 0;
  logic [7:0]           pix;
  logic                 band_valid, frame_done;
  logic [9:0]           ll, lh, hl, hh;
  logic [6:0]           band_row, band_col;
  logic [2:0]           band_neg;
  logic [9:0]           band_thr = '0;
  logic                 rec2_valid;
  logic [3:0][7:0]      rec2_px;
  logic [6:0]           rec2_row, rec2_col;
  logic                 ml_valid = 0;
  logic [7:0]           ml_x;
  logic [3:0]           ml_det_valid;
  logic [3:0][12:0]     ml_det;
  logic                 ml_app_valid, ml_block_done;
  logic [12:0]          ml_app;
  typedef struct { longint edge_no; int v; } item_t;
  item_t mdq [4][$];
  item_t maq [$];
  int    mblk [16];
  int    n_ml_det [4] = '{0, 0, 0, 0};
  int    n_ml_blocks = 0, n_ml_stall = 0;

  // Mechanism counters.
  int n_reset = 0, n_neg_coef = 0, n_zeroed = 0, n_kept = 0, n_exact = 0;
  int n_vec_stall = 0, n_pix_stall = 0, n_discard = 0, n_neg_band = 0;
  int n_frame_done = 0, n_bands = 0, n_vec = 0;
  int n_rec2_exact = 0, n_rec2 = 0, n_band_zeroed = 0;

  longint cyc = 0;
  bit     vec_done = 0, pix_done = 0;

  typedef struct {
    longint edge_no;
    int     c [N];
    logic [N-1:0][7:0] rec;
    bit     exact;
  } vexp_t;
  typedef struct {
    longint edge_no;
    int ll, lh, hl, hh, r, c;
    bit last;
    logic [2:0] neg;
    logic [3:0][7:0] rec;
    bit exact;
  } bexp_t;
  vexp_t vq_coef[$], vq_rec[$];
  bexp_t bq[$], rq[$];
  int    img_prev [W];
  int    img_cur  [W];

  haar_dwt_top u_dut (
    .clk, .rst_n, .clk_out, .rst_out,
    .vec_valid, .vec_x, .vec_thr, .dwt_valid, .dwt_coef, .dwt_mag, .rec_valid, .rec_x,
    .pix_valid, .pix, .band_valid, .ll, .lh, .hl, .hh, .band_row, .band_col, .band_neg, .frame_done,
    .band_thr, .rec2_valid, .rec2_px, .rec2_row, .rec2_col,
    .ml_valid, .ml_x, .ml_det_valid, .ml_det, .ml_app_valid, .ml_app, .ml_block_done
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
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

  // ---------------- reset ----------------
  task automatic do_reset();
    @(negedge clk);
    #2 rst_n = 0;
    #1;
    checks++;
    if (!rst_out) failures++;
    if (clk_out != clk) failures++;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk); #1;
    checks++;
    if (!rst_out) failures++;
    @(posedge clk); #1;
    checks++;
    if (rst_out) failures++;
    else n_reset++;
  endtask

  // ---------------- monitors ----------------
  always @(posedge clk) begin
    #1;
    if (!rst_out) begin
      // 1-D coefficients
      checks++;
      if (dwt_valid != (vq_coef.size() > 0 && vq_coef[0].edge_no == cyc)) begin
        failures++;
        $display("FAIL dwt_valid timing at edge %0d", cyc);
      end
      if (dwt_valid && vq_coef.size() > 0) begin
        vexp_t e;
        e = vq_coef.pop_front();
        for (int i = 0; i < N; i++) begin
          checks += 2;
          if (int'($signed(dwt_coef[i])) != e.c[i] || int'(dwt_mag[i]) != iabs(e.c[i])) begin
            failures++;
            if (failures < 10) $display("FAIL coefficient %0d: %0d/%0d expected %0d", i, $signed(dwt_coef[i]), dwt_mag[i], e.c[i]);
          end
          if (e.c[i] < 0 && dwt_mag[i] != dwt_coef[i]) n_neg_coef++;
        end
      end
      // 1-D reconstruction
      checks++;
      if (rec_valid != (vq_rec.size() > 0 && vq_rec[0].edge_no == cyc)) begin
        failures++;
        $display("FAIL rec_valid timing at edge %0d", cyc);
      end
      if (rec_valid && vq_rec.size() > 0) begin
        vexp_t e;
        e = vq_rec.pop_front();
        checks++;
        if (rec_x != e.rec) begin
          failures++;
          if (failures < 10) $display("FAIL reconstruction %h expected %h", rec_x, e.rec);
        end else if (e.exact) n_exact++;
      end
      // 2-D sub-bands
      checks++;
      if (band_valid != (bq.size() > 0 && bq[0].edge_no == cyc)) begin
        failures++;
        $display("FAIL band_valid timing at edge %0d", cyc);
      end
      if (band_valid && bq.size() > 0) begin
        bexp_t e;
        e = bq.pop_front();
        checks++;
        n_bands++;
        if (int'(ll) != e.ll || int'(lh) != e.lh || int'(hl) != e.hl || int'(hh) != e.hh ||
            int'(band_row) != e.r || int'(band_col) != e.c || frame_done != e.last ||
            band_neg != e.neg) begin
          failures++;
          if (failures < 10) $display("FAIL block %0d,%0d", e.r, e.c);
        end
        if (frame_done) n_frame_done++;
      end
      // 2-D reconstruction
      checks++;
      if (rec2_valid != (rq.size() > 0 && rq[0].edge_no == cyc)) begin
        failures++;
        $display("FAIL rec2_valid timing at edge %0d", cyc);
      end
      if (rec2_valid && rq.size() > 0) begin
        bexp_t e;
        e = rq.pop_front();
        checks++;
        n_rec2++;
        if (rec2_px != e.rec || int'(rec2_row) != e.r || int'(rec2_col) != e.c) begin
          failures++;
          if (failures < 10) $display("FAIL rec2 block %0d,%0d: %h expected %h", e.r, e.c, rec2_px, e.rec);
        end else if (e.exact) n_rec2_exact++;
      end
      // multi-level path
      for (int m = 0; m < 4; m++) begin
        checks++;
        if (ml_det_valid[m] != (mdq[m].size() > 0 && mdq[m][0].edge_no == cyc)) begin
          failures++;
          $display("FAIL ml_det_valid[%0d] timing at edge %0d", m, cyc);
        end
        if (ml_det_valid[m] && mdq[m].size() > 0) begin
          item_t e;
          e = mdq[m].pop_front();
          checks++;
          n_ml_det[m]++;
          if (int'($signed(ml_det[m])) != e.v) failures++;
        end
      end
      checks += 2;
      if (ml_app_valid != (maq.size() > 0 && maq[0].edge_no == cyc)) failures++;
      if (ml_block_done != ml_app_valid) failures++;
      if (ml_app_valid && maq.size() > 0) begin
        item_t e;
        e = maq.pop_front();
        checks++;
        n_ml_blocks++;
        if (int'($signed(ml_app)) != e.v) failures++;
      end
      // overlapped windows thrown away, negative sub-band values made positive
      if (u_dut.u_dwt2d.win_valid && !u_dut.u_dwt2d.keep) n_discard++;
      if (u_dut.u_dwt2d.keep &&
          (u_dut.u_dwt2d.lh_s[12] || u_dut.u_dwt2d.hl_s[12] || u_dut.u_dwt2d.hh_s[12]))
        n_neg_band++;
    end
  end

  // ---------------- 1-D vector stream ----------------
  task automatic vec_stream(input int count);
    for (int n = 0; n < count; n++) begin
      vexp_t e;
      int a, d;
      @(negedge clk);
      while ($urandom_range(3) == 0) begin
        vec_valid = 0;
        n_vec_stall++;
        @(negedge clk);
      end
      vec_valid = 1;
      vec_thr = (n % 3 == 0) ? 10'd0 : 10'($urandom_range(100));
      for (int i = 0; i < N; i++)
        vec_x[i] = (n % 2 == 0) ? 8'($urandom) : 8'(128 + $urandom_range(40) - 20);
      e.edge_no = cyc + 1;
      e.exact = (vec_thr == 0);
      for (int i = 0; i < N / 2; i++) begin
        a = int'(vec_x[2*i]) + int'(vec_x[2*i+1]);
        d = int'(vec_x[2*i]) - int'(vec_x[2*i+1]);
        e.c[i] = a; e.c[N/2 + i] = d;
        if (iabs(d) < int'(vec_thr)) begin
          d = 0; n_zeroed++;
        end else n_kept++;
        e.rec[2*i]   = 8'((a + d) >>> 1);
        e.rec[2*i+1] = 8'((a - d) >>> 1);
      end
      if (e.exact && e.rec != vec_x) begin failures++; $display("FAIL model"); end
      vq_coef.push_back(e);
      e.edge_no = cyc + 3;
      vq_rec.push_back(e);
      n_vec++;
    end
    @(negedge clk) vec_valid = 0;
  endtask

  // ---------------- 2-D pixel stream ----------------
  task automatic pix_stream();
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        int v;
        @(negedge clk);
        while ($urandom_range(7) == 0) begin
          pix_valid = 0;
          n_pix_stall++;
          @(negedge clk);
        end
        if (r < 64)       v = c;                                   // gradient
        else if (r < 128) v = ((c / 4) % 2 == 0) ? 230 : 20;       // stripes
        else              v = int'($urandom_range(255));           // noise
        img_cur[c] = v;
        // second half of the frame: 2-D details below 24 (Q8.2 units) are
        // dropped; switched on an even row, when no sub-band set is in flight
        if (r == 128 && c == 16) band_thr = 10'd24;
        pix_valid = 1;
        pix = 8'(v);
        if (r % 2 == 1 && c % 2 == 1) begin
          bexp_t e;
          int a, b, cc, d;
          a = img_prev[c-1]; b = img_prev[c]; cc = img_cur[c-1]; d = v;
          e.edge_no = cyc + 2;
          e.ll = a + b + cc + d;
          e.lh = iabs((a + b) - (cc + d));
          e.hl = iabs((a - b) + (cc - d));
          e.hh = iabs((a - b) - (cc - d));
          e.r = r / 2; e.c = c / 2;
          e.last = (r == H - 1 && c == W - 1);
          e.neg = {((a + b) - (cc + d)) < 0, ((a - b) + (cc - d)) < 0, ((a - b) - (cc - d)) < 0};
          bq.push_back(e);
          begin
            int L, LH, HL, HH;
            L = a + b + cc + d; LH = (a + b) - (cc + d); HL = (a - b) + (cc - d); HH = (a - b) - (cc - d);
            if (iabs(LH) < int'(band_thr)) begin LH = 0; n_band_zeroed++; end
            if (iabs(HL) < int'(band_thr)) begin HL = 0; n_band_zeroed++; end
            if (iabs(HH) < int'(band_thr)) begin HH = 0; n_band_zeroed++; end
            e.rec[0] = 8'(clip((L + LH + HL + HH) >>> 2));
            e.rec[1] = 8'(clip((L + LH - HL - HH) >>> 2));
            e.rec[2] = 8'(clip((L - LH + HL - HH) >>> 2));
            e.rec[3] = 8'(clip((L - LH - HL + HH) >>> 2));
            e.exact = (band_thr == 0);
            if (e.exact && e.rec != {8'(d), 8'(cc), 8'(b), 8'(a)}) failures++;  // model sanity
            e.edge_no = cyc + 4;
            rq.push_back(e);
          end
        end
      end
      img_prev = img_cur;
    end
    @(negedge clk) pix_valid = 0;
  endtask

  // ---------------- multi-level sample stream ----------------
  task automatic ml_stream(input int blocks);
    for (int n = 0; n < 16 * blocks; n++) begin
      int k, g, s1, s2;
      @(negedge clk);
      while ($urandom_range(4) == 0) begin
        ml_valid = 0;
        n_ml_stall++;
        @(negedge clk);
      end
      k = n % 16;
      mblk[k] = int'($urandom_range(255));
      ml_valid = 1;
      ml_x = 8'(mblk[k]);
      for (int m = 1; m <= 4; m++) begin
        g = 1 << m;
        if ((k + 1) % g == 0) begin
          item_t e;
          s1 = 0; s2 = 0;
          for (int j = k + 1 - g; j < k + 1 - g / 2; j++) s1 += mblk[j];
          for (int j = k + 1 - g / 2; j <= k; j++) s2 += mblk[j];
          e.edge_no = cyc + 1;
          e.v = s1 - s2;
          mdq[m-1].push_back(e);
          if (m == 4) begin
            e.v = s1 + s2;
            maq.push_back(e);
          end
        end
      end
    end
    @(negedge clk) ml_valid = 0;
  endtask

  initial begin
    vec_x = '0; vec_thr = '0; pix = '0; ml_x = '0;
    do_reset();
    fork
      begin vec_stream(3000); vec_done = 1; end
      begin pix_stream();     pix_done = 1; end
      begin ml_stream(1000); end
    join
    repeat (6) @(posedge clk);
    checks += 4;
    if (vq_coef.size() != 0 || vq_rec.size() != 0 || bq.size() != 0 || rq.size() != 0) failures++;
    if (maq.size() != 0 || mdq[0].size() != 0 || mdq[3].size() != 0) failures++;
    if (n_bands != (W / 2) * (H / 2)) failures++;
    // a second reset in the middle of nothing must also work
    do_reset();
    checks++;
    if (dwt_valid || rec_valid || band_valid) failures++;
    // every mechanism must have been seen
    checks += 17;
    if (n_ml_blocks != 1000) begin failures++; $display("MISSING multi-level blocks"); end
    if (n_ml_det[0] != 8000 || n_ml_det[1] != 4000 || n_ml_det[2] != 2000 || n_ml_det[3] != 1000)
      begin failures++; $display("MISSING multi-level details"); end
    if (n_ml_stall == 0) begin failures++; $display("MISSING multi-level stall"); end
    if (n_rec2 != (W / 2) * (H / 2)) begin failures++; $display("MISSING 2-D reconstructions"); end
    if (n_rec2_exact == 0) begin failures++; $display("MISSING exact 2-D reconstruction"); end
    if (n_band_zeroed == 0) begin failures++; $display("MISSING thresholded sub-band"); end
    if (n_reset != 2)      begin failures++; $display("MISSING reset"); end
    if (n_neg_coef == 0)   begin failures++; $display("MISSING coefficient sign removal"); end
    if (n_zeroed == 0)     begin failures++; $display("MISSING thresholded detail"); end
    if (n_kept == 0)       begin failures++; $display("MISSING kept detail"); end
    if (n_exact == 0)      begin failures++; $display("MISSING exact reconstruction"); end
    if (n_vec_stall == 0)  begin failures++; $display("MISSING vector stall"); end
    if (n_pix_stall == 0)  begin failures++; $display("MISSING pixel stall"); end
    if (n_discard == 0)    begin failures++; $display("MISSING overlapped window discard"); end
    if (n_neg_band == 0)   begin failures++; $display("MISSING sub-band sign removal"); end
    if (n_frame_done != 1) begin failures++; $display("MISSING frame end"); end
    if (n_vec != 3000)     begin failures++; $display("MISSING vectors"); end
    $display("multi-level: blocks=%0d details per level=%0d/%0d/%0d/%0d stalls=%0d", n_ml_blocks,
             n_ml_det[0], n_ml_det[1], n_ml_det[2], n_ml_det[3], n_ml_stall);
    $display("2-D reconstruction: blocks=%0d exact=%0d details_zeroed=%0d", n_rec2, n_rec2_exact, n_band_zeroed);
    $display("mechanisms: resets=%0d neg_coef=%0d zeroed=%0d kept=%0d exact=%0d vec_stall=%0d pix_stall=%0d discarded_windows=%0d neg_band=%0d bands=%0d frame_done=%0d",
             n_reset, n_neg_coef, n_zeroed, n_kept, n_exact, n_vec_stall, n_pix_stall,
             n_discard, n_neg_band, n_bands, n_frame_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
