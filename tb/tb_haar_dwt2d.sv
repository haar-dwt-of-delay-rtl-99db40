// tb_haar_dwt2d: streams random W x H frames (small size, with gaps in the
// pixel stream) through the 2-D path. For every 2x2 block the expected
// sub-bands are computed here from the stored frame
//   ll = a+b+c+d, lh = |(a+b)-(c+d)|, hl = |(a-b)+(c-d)|, hh = |(a-b)-(c-d)|
// (pixel units; in the Q8.2 output this is the band divided by four). Each set
// and the sign bits band_neg
// must appear with band_valid on the second rising edge after the block's
// bottom-right pixel was sampled, at the right band_row/band_col, and
// frame_done must mark the last set of each frame.
module tb_haar_dwt2d;
  localparam int W = 16, H = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, pix_valid = 0;
  logic [7:0] pix;
  logic       band_valid, frame_done;
  logic [9:0] ll, lh, hl, hh;
  logic [1:0] band_row;
  logic [2:0] band_col;
  logic [2:0] band_neg;

  typedef struct {
    longint edge_no;
    int ll, lh, hl, hh, r, c;
    bit last;
    logic [2:0] neg;
  } exp_t;
  exp_t q[$];
  longint cyc = 0;
  int img [H][W];

  haar_dwt2d #(.W(W), .H(H)) u_dut (.clk, .rst, .pix_valid, .pix, .band_valid,
                                     .ll, .lh, .hl, .hh, .band_row, .band_col, .band_neg, .frame_done);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int iabs(input int v);
    return (v < 0) ? -v : v;
  endfunction

  // Output monitor.
  always @(posedge clk) begin
    #1;
    if (!rst) begin
      checks++;
      if (band_valid != (q.size() > 0 && q[0].edge_no == cyc)) begin
        failures++;
        $display("FAIL band_valid=%b at edge %0d (expected %0d)", band_valid, cyc, q.size() > 0 ? q[0].edge_no : -1);
      end
      if (band_valid && q.size() > 0) begin
        exp_t e;
        e = q.pop_front();
        checks++;
        if (int'(ll) != e.ll || int'(lh) != e.lh || int'(hl) != e.hl || int'(hh) != e.hh ||
            int'(band_row) != e.r || int'(band_col) != e.c || frame_done != e.last || band_neg != e.neg) begin
          failures++;
          $display("FAIL block %0d,%0d: got %0d %0d %0d %0d at %0d,%0d last %b", e.r, e.c, ll, lh, hl, hh, band_row, band_col, frame_done);
        end
      end
    end
  end

  initial begin
    pix = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int f = 0; f < 3; f++) begin
      for (int r = 0; r < H; r++) begin
        for (int c = 0; c < W; c++) begin
          @(negedge clk);
          while ($urandom_range(5) == 0) begin
            pix_valid = 0; pix = 8'($urandom);
            @(negedge clk);
          end
          img[r][c] = (f == 0 && r < 2) ? 255 * ((r + c) % 2) : int'($urandom_range(255));
          pix_valid = 1; pix = 8'(img[r][c]);
          if (r % 2 == 1 && c % 2 == 1) begin
            exp_t e;
            int a, b, cc, d;
            a = img[r-1][c-1]; b = img[r-1][c]; cc = img[r][c-1]; d = img[r][c];
            e.edge_no = cyc + 2;   // sampled at the next edge (cyc+1), shown after the one after
            e.ll = a + b + cc + d;
            e.lh = iabs((a + b) - (cc + d));
            e.hl = iabs((a - b) + (cc - d));
            e.hh = iabs((a - b) - (cc - d));
            e.neg = {((a + b) - (cc + d)) < 0, ((a - b) + (cc - d)) < 0, ((a - b) - (cc - d)) < 0};
            e.r = r / 2; e.c = c / 2;
            e.last = (r == H - 1 && c == W - 1);
            q.push_back(e);
          end
        end
      end
    end
    @(negedge clk) pix_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
