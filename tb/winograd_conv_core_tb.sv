// winograd_conv_core_tb - runs two random multi-channel images through a small
// Winograd convolution core and checks every pooled output against a direct
// 3x3 convolution + bias + 2x2 max pool + ReLU computed here from the spatial
// filters. The core's weight memory is filled with U = G g G^T per filter and
// channel. Filters are on a 2^-14 grid so U is exact; each channel may then be
// off by at most 9 LSB (truncated products), hence a tolerance of 9*C_IN+1 LSB.
// Image 1 runs with no back-pressure and checks the cycle count of a tile,
// N_FILT*(16*C_IN+4); image 2 runs with random input gaps and random holds
// from the next layer, and checks that both happened.
module winograd_conv_core_tb;
  import cnn_pkg::*;
  localparam int C_IN = 3;
  localparam int N_FILT = 4;
  localparam int W = 11;
  localparam int H = 9;
  localparam int WPF = 1 + 16 * C_IN;
  localparam int WAW = $clog2(N_FILT * WPF);
  localparam int TX = (W - 2) / 2;
  localparam int TY = (H - 2) / 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_hold;
  q16_t in_data = '0;
  logic out_valid, out_hold = 1'b0;
  q16_t out_data;
  logic w_re;
  logic [WAW-1:0] w_addr;
  q16_t w_data;
  logic busy;

  winograd_conv_core #(.C_IN(C_IN), .N_FILT(N_FILT), .IMG_W(W), .IMG_H(H)) dut (.*);

  q16_t wmem [N_FILT * WPF];
  always_ff @(posedge clk) if (w_re) w_data <= wmem[w_addr];

  longint g [N_FILT][C_IN][3][3];
  longint bias [N_FILT];
  q16_t   img [H][W][C_IN];
  longint expq [$];
  int checks = 0, failures = 0;
  int n_out = 0, n_stall = 0, n_gap = 0, busy_cycles = 0;
  bit random_hold = 1'b0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", msg);
    end
  endtask

  // weights: U = G g G^T (G scaled by 2, result divided by 4)
  task automatic load_weights();
    longint gs [4][3];
    gs = '{'{2, 0, 0}, '{1, 1, 1}, '{1, -1, 1}, '{0, 0, 2}};
    for (int f = 0; f < N_FILT; f++) begin
      bias[f] = longint'(int'($urandom_range(2 ** 16)) - 2 ** 15);
      wmem[f * WPF] = q16_t'(bias[f]);
      for (int c = 0; c < C_IN; c++) begin
        longint t [4][3];
        for (int a = 0; a < 3; a++)
          for (int b = 0; b < 3; b++)
            g[f][c][a][b] = longint'((int'($urandom_range(2 ** 17)) - 2 ** 16) & ~3);
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 3; j++) begin
            t[i][j] = 0;
            for (int k = 0; k < 3; k++) t[i][j] += gs[i][k] * g[f][c][k][j];
          end
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            longint s = 0;
            for (int k = 0; k < 3; k++) s += t[i][k] * gs[j][k];
            wmem[f * WPF + 1 + 16 * c + 4 * i + j] = q16_t'(s / 4);
          end
      end
    end
  endtask

  // expected outputs of one image, in stream order
  task automatic make_expected();
    for (int ty = 0; ty < TY; ty++)
      for (int tx = 0; tx < TX; tx++)
        for (int f = 0; f < N_FILT; f++) begin
          longint mx = -(64'sd1 <<< 60);
          for (int oy = 0; oy < 2; oy++)
            for (int ox = 0; ox < 2; ox++) begin
              longint s = 0;
              for (int c = 0; c < C_IN; c++)
                for (int a = 0; a < 3; a++)
                  for (int b = 0; b < 3; b++)
                    s += longint'(img[2*ty+oy+a][2*tx+ox+b][c]) * g[f][c][a][b];
              s = (s >>> 16) + bias[f];
              if (s > mx) mx = s;
            end
          if (mx < 0) mx = 0;
          if (mx > 64'sd2147483647) mx = 64'sd2147483647;
          expq.push_back(mx);
        end
  endtask

  // output monitor
  always @(posedge clk) begin
    if (rst_n) begin
      if (busy) busy_cycles++;
      if (out_valid && out_hold) n_stall++;
      if (out_valid && !out_hold) begin
        longint e, d;
        n_out++;
        checks++;
        if (expq.size() == 0) begin
          failures++;
          $display("FAIL unexpected output %0d", out_data);
        end else begin
          e = expq.pop_front();
          d = longint'(out_data) - e;
          if (d > 9 * C_IN + 1 || d < -(9 * C_IN + 1)) begin
            failures++;
            $display("FAIL output %0d: got %0d expected %0d", n_out, out_data, e);
          end
        end
      end
    end
  end

  always @(negedge clk) out_hold <= random_hold ? ($urandom_range(3) == 0) : 1'b0;

  task automatic send_image(input bit gaps);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        for (int c = 0; c < C_IN; c++) begin
          while (gaps && $urandom_range(3) == 0) begin
            in_valid = 1'b0;
            n_gap++;
            @(negedge clk);
          end
          in_valid = 1'b1;
          in_data  = img[y][x][c];
          @(posedge clk);
          while (in_hold) @(posedge clk);
          @(negedge clk);
        end
    in_valid = 1'b0;
  endtask

  initial begin
    load_weights();
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++)
          for (int c = 0; c < C_IN; c++)
            img[y][x][c] = q16_t'(int'($urandom_range(2 ** 18)) - 2 ** 17);
      make_expected();
      random_hold = (pass == 1);
      n_out = 0;
      busy_cycles = 0;
      send_image(pass == 1);
      while (busy || out_valid) @(negedge clk);
      random_hold = 1'b0;
      repeat (3) @(negedge clk);
      check(n_out == TX * TY * N_FILT && expq.size() == 0,
            $sformatf("image %0d: %0d outputs, expected %0d", pass, n_out, TX * TY * N_FILT));
      if (pass == 0)
        check(busy_cycles == TX * TY * N_FILT * (16 * C_IN + 4),
              $sformatf("tile cycles %0d, expected %0d", busy_cycles, TX * TY * N_FILT * (16 * C_IN + 4)));
    end
    check(n_stall > 0 && n_gap > 0, $sformatf("coverage: stalls %0d gaps %0d", n_stall, n_gap));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
