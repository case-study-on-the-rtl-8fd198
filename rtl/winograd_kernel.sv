// winograd_kernel - one F(2x2,3x3) Winograd convolution tile for one input
// channel: Y = A^T [ U .* (B^T d B) ] A.
//
// d is a 4x4 window of Q16 input pixels and u the matching 4x4 filter already in
// the Winograd domain (u = G g G^T, computed off-line, so no filter transform is
// built in hardware). The kernel
//   1. transforms the window, V = B^T d B, with additions only
//      (B^T = [1 0 -1 0; 0 1 1 0; 0 -1 1 0; 0 1 0 -1]); V needs two more bits
//      than the input;
//   2. forms the 16 element-wise products M = U .* V in parallel (16 multipliers
//      instead of the 36 a direct 2x2 output tile needs); each product drops its
//      16 extra fractional bits by an arithmetic shift;
//   3. transforms back, Y = A^T M A with A^T = [1 1 1 0; 0 1 -1 -1], again with
//      additions only, giving the 2x2 convolution outputs of the tile (valid
//      3x3 convolution, i.e. correlation as used by CNN frameworks).
// y[i][j] is the output at offset (i, j) from the top-left of the window. The
// outputs stay at the wide accumulator width so channel sums cannot overflow.
// The module is purely combinational; the convolution core registers its result.
// The F(2x2,3x3) algorithm, the parallel products and the use of filters stored
// already transformed follow the described kernel; truncating each product and
// the internal widths are this design's own choices.
module winograd_kernel
  import cnn_pkg::*;
(
  input  q16_t d [4][4],
  input  q16_t u [4][4],
  output acc_t y [2][2]
);

  localparam int unsigned VW = DATA_W + 2;
  typedef logic signed [VW-1:0] v_t;

  v_t   s [4][4];  // B^T d
  v_t   v [4][4];  // B^T d B
  acc_t m [4][4];  // U .* V
  acc_t t [2][4];  // A^T M

  always_comb begin
    // B^T d (operate on columns)
    for (int j = 0; j < 4; j++) begin
      s[0][j] = v_t'(d[0][j]) - v_t'(d[2][j]);
      s[1][j] = v_t'(d[1][j]) + v_t'(d[2][j]);
      s[2][j] = v_t'(d[2][j]) - v_t'(d[1][j]);
      s[3][j] = v_t'(d[1][j]) - v_t'(d[3][j]);
    end
    // (B^T d) B (operate on rows)
    for (int i = 0; i < 4; i++) begin
      v[i][0] = s[i][0] - s[i][2];
      v[i][1] = s[i][1] + s[i][2];
      v[i][2] = s[i][2] - s[i][1];
      v[i][3] = s[i][1] - s[i][3];
    end
    // element-wise products in the Winograd domain
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        logic signed [VW+DATA_W-1:0] p;
        p = v[i][j] * u[i][j];
        m[i][j] = acc_t'(p >>> FRAC_W);
      end
    end
    // A^T M
    for (int j = 0; j < 4; j++) begin
      t[0][j] = m[0][j] + m[1][j] + m[2][j];
      t[1][j] = m[1][j] - m[2][j] - m[3][j];
    end
    // (A^T M) A
    for (int i = 0; i < 2; i++) begin
      y[i][0] = t[i][0] + t[i][1] + t[i][2];
      y[i][1] = t[i][1] - t[i][2] - t[i][3];
    end
  end

endmodule
