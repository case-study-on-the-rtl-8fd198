// window_buffer - K x K sliding window over one image channel that arrives as a
// row-major stream of pixels.
//
// Every `shift` puts `din` into the right-most register of the bottom window
// row. Each register passes its value to its left neighbour; the left-most
// register of a row feeds a line buffer of IMG_W-K words, whose output enters the
// right-most register of the row above. After the pixel at (row y, column x) has
// been shifted in (x >= K-1, y >= K-1), window[r][c] holds pixel
// (y-K+1+r, x-K+1+c): row 0 is the oldest row and column 0 the left-most column.
// This is the register / line buffer chain of the window buffer as described for
// the convolution cores, here sized 4x4 for the Winograd F(2x2,3x3) tile. The
// window registers reset to zero; the output is read combinationally.
module window_buffer
  import cnn_pkg::*;
#(
  parameter int unsigned K     = 4,
  parameter int unsigned IMG_W = 28
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  q16_t din,
  output q16_t window [K][K]
);

  q16_t regs   [K][K];
  q16_t lb_out [K-1];

  // one line buffer between each pair of adjacent window rows
  for (genvar r = 0; r < K - 1; r++) begin : g_lb
    line_buffer #(.LEN(IMG_W - K), .WIDTH(DATA_W)) u_lb (
      .clk  (clk),
      .rst_n(rst_n),
      .shift(shift),
      .din  (regs[r+1][0]),
      .dout (lb_out[r])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K; c++) regs[r][c] <= '0;
    end else if (shift) begin
      for (int r = 0; r < K; r++) begin
        for (int c = 0; c < K - 1; c++) regs[r][c] <= regs[r][c+1];
        regs[r][K-1] <= (r == K - 1) ? din : lb_out[r];
      end
    end
  end

  assign window = regs;

endmodule
