// cnn_pkg - number format and shared helpers of the Winograd CNN accelerator.
//
// All activations and weights are 32-bit two's complement fixed point with 16
// fractional bits (Q16), which is the format the design is built around.
// Inside the datapath, sums and products are kept wider (ACC_W bits, still with
// 16 fractional bits) and are only brought back to Q16, with saturation, when a
// value leaves a layer. The width of the internal accumulators and the choice of
// saturation (instead of wrap-around) are this design's own.
package cnn_pkg;

  localparam int unsigned DATA_W = 32;  // Q16 word width
  localparam int unsigned FRAC_W = 16;  // fractional bits
  localparam int unsigned ACC_W  = 56;  // internal accumulator width (Q16 scaling)

  typedef logic signed [DATA_W-1:0] q16_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Fixed-point multiply of a wide operand by a Q16 weight; the 16 extra
  // fractional bits are dropped by an arithmetic shift (round toward -inf).
  function automatic acc_t qmul(input acc_t a, input q16_t w);
    logic signed [ACC_W+DATA_W-1:0] p;
    p = a * w;
    return acc_t'(p >>> FRAC_W);
  endfunction

  // Clamp a wide value into the Q16 range.
  function automatic q16_t sat_q16(input acc_t a);
    localparam acc_t MAXV = acc_t'({1'b0, {(DATA_W-1){1'b1}}});
    localparam acc_t MINV = -MAXV - 1;
    if (a > MAXV)      return q16_t'(MAXV);
    else if (a < MINV) return q16_t'(MINV);
    else               return q16_t'(a);
  endfunction

endpackage
