// max_pool_relu - 2x2 max pooling of the four channel_acc values of a Winograd
// tile, followed by ReLU and saturation to Q16.
//
// Because the Winograd F(2x2,3x3) tile produces exactly the 2x2 block that one
// 2x2/stride-2 pooling window covers, pooling needs no buffering: the output is
// max(a[0][0], a[0][1], a[1][0], a[1][1]) clamped below at 0 (ReLU) and above
// at the largest Q16 value. ReLU is applied after pooling, which gives the same
// result as before pooling since both are monotonic. The ReLU is part of the
// trained network this design runs; it can be switched off with RELU = 0.
// Max pooling directly after the 2x2 channel accumulators follows the described
// core; ReLU placement and saturation (rather than wrap-around) are this
// design's own choices. Purely combinational.
module max_pool_relu
  import cnn_pkg::*;
#(
  parameter bit RELU = 1'b1
) (
  input  acc_t a [2][2],
  output q16_t y
);

  acc_t m0, m1, mx;

  always_comb begin
    m0 = (a[0][0] > a[0][1]) ? a[0][0] : a[0][1];
    m1 = (a[1][0] > a[1][1]) ? a[1][0] : a[1][1];
    mx = (m0 > m1) ? m0 : m1;
    if (RELU && mx < 0) mx = '0;
    y = sat_q16(mx);
  end

endmodule
