// lf_adder: Ladner-Fischer parallel-prefix adder, WIDTH bits plus carry-in.
//
// The carry-in is treated as an extra prefix position -1 (generate = cin,
// propagate = 0), so position k of the network holds bit k-1 of the
// operands; the cell labels i:j of the usual prefix diagrams are spans over
// these positions. The network has three parts:
//   * pre-processing: p_i = a_i ^ b_i, g_i = a_i & b_i;
//   * carry network: first every odd position is combined with its even
//     neighbour; then a Sklansky (divide-and-conquer) tree runs over the odd
//     positions only, doubling the span at each level; a last row of gray
//     cells completes the even positions from their odd neighbour. Cells whose
//     lower input already reaches the carry-in are gray cells (generate only),
//     the others are black cells (generate and propagate);
//   * post-processing: s_i = p_i ^ c_i, where c_i is the group generate of
//     positions below bit i.
// Depth is ceil(log2(WIDTH+1)) + 1 cell levels with a fan-out that at most
// doubles per level. Purely combinational: sum and cout follow a, b and cin
// in the same cycle.
// The black/gray cell structure follows the source description; the odd/
// even split with a Sklansky tree is the textbook form of Ladner-Fischer and
// is this design's reading of it. The default width is the 9-bit coefficient
// width of the wavelet datapath.
module lf_adder #(
  parameter int WIDTH = 9
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int M = WIDTH + 1;          // prefix positions, incl. carry-in
  localparam int L = $clog2(M);          // Sklansky levels over the odd positions

  // Group generate / propagate after each level. Level 0 is pre-processing,
  // levels 1..L the odd-position tree, level L+1 the even fix-up row.
  logic [M-1:0] gl [0:L+1];
  logic [M-1:0] pl [0:L+1];
  logic [M-1:1] p_bit;                   // bit propagate, per operand bit

  // Pre-processing.
  assign gl[0][0] = cin;
  assign pl[0][0] = 1'b0;
  for (genvar i = 1; i < M; i++) begin : g_pre
    assign p_bit[i] = a[i-1] ^ b[i-1];
    assign gl[0][i] = a[i-1] & b[i-1];
    assign pl[0][i] = p_bit[i];
  end

  // Carry network over the odd positions.
  for (genvar k = 0; k < L; k++) begin : g_lvl
    for (genvar i = 0; i < M; i++) begin : g_pos
      // Lower partner: i-1 on the first level, the top of the lower half-block
      // on the following ones.
      localparam int J = (k == 0) ? i - 1 : ((i >> k) << k) - 1;
      if ((i % 2 == 1) && (((i >> k) & 1) == 1) && (J >= 0)) begin : g_cell
        if ((i >> k) == 1) begin : g_gray
          lf_gray_cell u_gray (
            .g_hi (gl[k][i]), .p_hi (pl[k][i]), .g_lo (gl[k][J]),
            .g_out(gl[k+1][i])
          );
          assign pl[k+1][i] = 1'b0;   // group reaches the carry-in: P unused
        end else begin : g_black
          lf_black_cell u_black (
            .g_hi (gl[k][i]), .p_hi (pl[k][i]), .g_lo (gl[k][J]), .p_lo (pl[k][J]),
            .g_out(gl[k+1][i]), .p_out(pl[k+1][i])
          );
        end
      end else begin : g_pass
        assign gl[k+1][i] = gl[k][i];
        assign pl[k+1][i] = pl[k][i];
      end
    end
  end

  // Fix-up row: even positions take the carry of their odd neighbour.
  for (genvar i = 0; i < M; i++) begin : g_fix
    if ((i % 2 == 0) && (i > 0)) begin : g_gray
      lf_gray_cell u_gray (
        .g_hi (gl[L][i]), .p_hi (pl[L][i]), .g_lo (gl[L][i-1]),
        .g_out(gl[L+1][i])
      );
      assign pl[L+1][i] = 1'b0;
    end else begin : g_pass
      assign gl[L+1][i] = gl[L][i];
      assign pl[L+1][i] = pl[L][i];
    end
  end

  // Post-processing: carry into bit i is the group generate of positions 0..i.
  for (genvar i = 0; i < WIDTH; i++) begin : g_sum
    assign sum[i] = p_bit[i+1] ^ gl[L+1][i];
  end
  assign cout = gl[L+1][WIDTH];
endmodule
