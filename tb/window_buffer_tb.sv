// window_buffer_tb - streams random images through a 4x4 window buffer (the
// Winograd tile) and a 3x3 one (two line buffers), with random idle cycles, and
// after every pixel checks every register of each complete window against the
// image.
module window_buffer_tb;
  import cnn_pkg::*;
  localparam int K = 4;
  localparam int W = 9;
  localparam int H = 7;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n = 1'b0, shift = 1'b0;
  q16_t din = '0;
  q16_t window [K][K];
  q16_t img [H][W];
  int checks = 0, failures = 0;

  q16_t window3 [3][3];

  window_buffer #(.K(K), .IMG_W(W)) dut (.*);
  window_buffer #(.K(3), .IMG_W(W)) dut3 (.clk(clk), .rst_n(rst_n), .shift(shift), .din(din), .window(window3));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int frame = 0; frame < 3; frame++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) img[y][x] = q16_t'($urandom);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(2) == 0) begin
            @(negedge clk);
            shift = 1'b0;
          end
          @(negedge clk);
          shift = 1'b1;
          din   = img[y][x];
          @(negedge clk);
          shift = 1'b0;
          if (x >= K - 1 && y >= K - 1) begin
            for (int r = 0; r < K; r++) begin
              for (int c = 0; c < K; c++) begin
                checks++;
                if (window[r][c] !== img[y-K+1+r][x-K+1+c]) begin
                  failures++;
                  $display("FAIL frame %0d pixel (%0d,%0d) window[%0d][%0d]=%h expected %h",
                           frame, y, x, r, c, window[r][c], img[y-K+1+r][x-K+1+c]);
                end
              end
            end
          end
          if (x >= 2 && y >= 2) begin
            for (int r = 0; r < 3; r++) begin
              for (int c = 0; c < 3; c++) begin
                checks++;
                if (window3[r][c] !== img[y-2+r][x-2+c]) begin
                  failures++;
                  $display("FAIL 3x3 frame %0d pixel (%0d,%0d) window[%0d][%0d]", frame, y, x, r, c);
                end
              end
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
