// winograd_cnn_top_tb - end-to-end test of the whole accelerator at reduced size (16x16 image, 3 and 4 filters, 5 scores).
//
// It loads random weights and 2 random image(s) through the load ports,
// runs inference and checks every stage:
//   - layer 1 outputs (observed on the stream into layer 2) against a direct
//     3x3 convolution + bias + max pool + ReLU of the image (at most 10 LSB off);
//   - layer 2 outputs (stream into the FC layer) against the same computation
//     applied to the layer-1 outputs the design produced (9*N1+1 LSB);
//   - the ten scores read back from the output memory against the FC sums of
//     the layer-2 outputs (exact: same Q16 product rule);
//   - the scores against a full-precision model of the whole network, reported
//     and bounded at 0.05;
//   - the cycle count, from start to done, between the compute time of layer 2
//     alone and the sum of all stages.
// It counts the back-pressure events: the input reader held by layer 1, layer 1
// held by layer 2 (both must happen), and layer 2 held by the FC layer, which
// must never happen because the FC layer takes an input every two cycles while
// a Winograd core needs at least 20 cycles per output.
module winograd_cnn_top_tb;
  import cnn_pkg::*;
  localparam int IMG = 16;
  localparam int N1 = 3;
  localparam int N2 = 4;
  localparam int N_OUT = 5;
  localparam int NIMG = 2;
  localparam int P1 = (IMG - 2) / 2;
  localparam int P2 = (P1 - 2) / 2;
  localparam int FC_IN = P2 * P2 * N2;
  localparam int WPF1 = 17;
  localparam int WPF2 = 1 + 16 * N1;
  localparam int IN_AW = $clog2(IMG * IMG);
  localparam int W1_AW = $clog2(N1 * WPF1);
  localparam int W2_AW = $clog2(N2 * WPF2);
  localparam int FC_AW = $clog2(FC_IN + 1);
  localparam int O_AW = (N_OUT > 1) ? $clog2(N_OUT) : 1;
  localparam longint LAYER2_CYC = longint'(P2 * P2) * N2 * (16 * N1 + 4);
  localparam longint SERIAL_CYC = 2 * IMG * IMG + longint'(P1 * P1) * N1 * 20 + LAYER2_CYC
                                  + 2 * FC_IN + N_OUT + 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n = 1'b0, start = 1'b0, busy, done;
  logic in_we = 1'b0, w1_we = 1'b0, w2_we = 1'b0, fcw_we = 1'b0;
  logic [IN_AW-1:0] in_addr = '0;
  logic [W1_AW-1:0] w1_addr = '0;
  logic [W2_AW-1:0] w2_addr = '0;
  logic [FC_AW-1:0] fcw_addr = '0;
  q16_t in_wdata = '0, w1_wdata = '0, w2_wdata = '0;
  logic [N_OUT-1:0][DATA_W-1:0] fcw_wdata = '0;
  logic [O_AW-1:0] out_raddr = '0;
  q16_t out_rdata;

  winograd_cnn_top #(.IMG(IMG), .N1(N1), .N2(N2), .N_OUT(N_OUT)) dut (.*);

  // network parameters (spatial filters; the design gets U = G g G^T)
  longint g1 [N1][3][3];
  longint b1 [N1];
  longint g2 [N2][N1][3][3];
  longint b2 [N2];
  longint fw [FC_IN][N_OUT];
  longint fb [N_OUT];
  longint img [IMG][IMG];
  // streams observed inside the design
  longint l1 [$];
  longint l2 [$];

  int checks = 0, failures = 0;
  int n_rd_hold = 0, n_l1_hold = 0, n_l2_hold = 0, n_relu = 0;
  longint cyc = 0;

  initial begin
    repeat (400000) @(posedge clk);
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

  function automatic int rnd(input int lo, input int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

  // U = G g G^T for one 3x3 filter, as 16 words
  task automatic to_winograd(input longint g [3][3], output longint u [4][4]);
    longint gs [4][3];
    longint t [4][3];
    gs = '{'{2, 0, 0}, '{1, 1, 1}, '{1, -1, 1}, '{0, 0, 2}};
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 3; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 3; k++) t[i][j] += gs[i][k] * g[k][j];
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        u[i][j] = 0;
        for (int k = 0; k < 3; k++) u[i][j] += t[i][k] * gs[j][k];
        u[i][j] /= 4;
      end
  endtask

  task automatic load_weights();
    longint u [4][4];
    longint g [3][3];
    for (int f = 0; f < n1v; f++) begin
      b1[f] = rnd(-6554, 6554);
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) g1[f][a][b] = rnd(-32768, 32768) & ~3;
      g = g1[f];
      to_winograd(g, u);
      @(negedge clk);
      w1_we = 1'b1; w1_addr = W1_AW'(f * WPF1); w1_wdata = q16_t'(b1[f]);
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        w1_addr = W1_AW'(f * WPF1 + 1 + k); w1_wdata = q16_t'(u[k / 4][k % 4]);
      end
    end
    @(negedge clk) w1_we = 1'b0;
    for (int f = 0; f < n2v; f++) begin
      b2[f] = rnd(-3277, 3277);
      @(negedge clk);
      w2_we = 1'b1; w2_addr = W2_AW'(f * WPF2); w2_wdata = q16_t'(b2[f]);
      for (int c = 0; c < n1v; c++) begin
        for (int a = 0; a < 3; a++)
          for (int b = 0; b < 3; b++) g2[f][c][a][b] = rnd(-4096, 4096) & ~3;
        g = g2[f][c];
        to_winograd(g, u);
        for (int k = 0; k < 16; k++) begin
          @(negedge clk);
          w2_addr = W2_AW'(f * WPF2 + 1 + 16 * c + k); w2_wdata = q16_t'(u[k / 4][k % 4]);
        end
      end
    end
    @(negedge clk) w2_we = 1'b0;
    for (int i = 0; i <= fcv; i++) begin
      @(negedge clk);
      fcw_we = 1'b1; fcw_addr = FC_AW'(i);
      for (int j = 0; j < noutv; j++) begin
        if (i < fcv) begin
          fw[i][j] = rnd(-2048, 2048);
          fcw_wdata[j] = 32'(fw[i][j]);
        end else begin
          fb[j] = rnd(-6554, 6554);
          fcw_wdata[j] = 32'(fb[j]);
        end
      end
    end
    @(negedge clk) fcw_we = 1'b0;
  endtask

  task automatic load_image();
    for (int y = 0; y < IMG; y++)
      for (int x = 0; x < IMG; x++) begin
        img[y][x] = rnd(0, 65535);
        @(negedge clk);
        in_we = 1'b1; in_addr = IN_AW'(y * IMG + x); in_wdata = q16_t'(img[y][x]);
      end
    @(negedge clk) in_we = 1'b0;
  endtask

  function automatic longint clamp(input longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  // stream monitors and event counters
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (dut.s0_valid && dut.s0_hold) n_rd_hold++;
      if (dut.s1_valid && dut.s1_hold) n_l1_hold++;
      if (dut.s2_valid && dut.s2_hold) n_l2_hold++;
      if (dut.s1_valid && !dut.s1_hold) begin
        l1.push_back(longint'(dut.s1_data));
        if (dut.s1_data == 0) n_relu++;
      end
      if (dut.s2_valid && !dut.s2_hold) l2.push_back(longint'(dut.s2_data));
    end
  end

  // reference results; loop bounds below are run-time copies of the sizes so
  // that the simulator compiles the loops as loops
  longint d1 [P1][P1][N1];
  longint d2 [FC_IN];
  real    r1 [P1][P1][N1];
  real    r2 [FC_IN];
  longint scores [N_OUT];
  int n1v, n2v, p1v, p2v, fcv, noutv;
  real batch_err = 0.0;

  // direct convolution of layer 1 at output (y, x) of filter f: exact Q16 sum
  // and full-precision value
  function automatic void conv1_at(input int y, input int x, input int f,
                                   output longint q, output real r);
    longint s = 0;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) s += img[y+a][x+b] * g1[f][a][b];
    r = real'(s) / 4294967296.0 + real'(b1[f]) / 65536.0;
    q = (s >>> 16) + b1[f];
  endfunction

  // direct convolution of layer 2 at output (y, x) of filter f, on the
  // layer-1 outputs of the design (q) and of the full-precision model (r)
  function automatic void conv2_at(input int y, input int x, input int f,
                                   output longint q, output real r);
    longint s = 0;
    real rs = real'(b2[f]) / 65536.0;
    for (int c = 0; c < n1v; c++)
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          s  += d1[y+a][x+b][c] * g2[f][c][a][b];
          rs += r1[y+a][x+b][c] * real'(g2[f][c][a][b]) / 65536.0;
        end
    q = (s >>> 16) + b2[f];
    r = rs;
  endfunction

  task automatic check_image(input int n);
    real    max_err = 0.0;
    int     bad1 = 0, bad2 = 0, bad3 = 0;
    check(l1.size() == P1 * P1 * N1, $sformatf("image %0d: %0d layer-1 outputs", n, l1.size()));
    check(l2.size() == FC_IN, $sformatf("image %0d: %0d layer-2 outputs", n, l2.size()));
    if (l1.size() != P1 * P1 * N1 || l2.size() != FC_IN) return;
    for (int y = 0; y < p1v; y++)
      for (int x = 0; x < p1v; x++)
        for (int f = 0; f < n1v; f++) begin
          longint mx = -(64'sd1 <<< 60);
          real rmx = -1.0e30;
          d1[y][x][f] = l1.pop_front();
          for (int k = 0; k < 4; k++) begin
            longint q;
            real r;
            conv1_at(2 * y + k / 2, 2 * x + k % 2, f, q, r);
            if (q > mx) mx = q;
            if (r > rmx) rmx = r;
          end
          mx = clamp(mx < 0 ? 0 : mx);
          r1[y][x][f] = rmx < 0.0 ? 0.0 : rmx;
          if (d1[y][x][f] - mx > 10 || mx - d1[y][x][f] > 10) bad1++;
        end
    check(bad1 == 0, $sformatf("image %0d: %0d layer-1 outputs off", n, bad1));
    for (int y = 0; y < p2v; y++)
      for (int x = 0; x < p2v; x++)
        for (int f = 0; f < n2v; f++) begin
          longint mx = -(64'sd1 <<< 60);
          real rmx = -1.0e30;
          int i = (y * P2 + x) * N2 + f;
          d2[i] = l2.pop_front();
          for (int k = 0; k < 4; k++) begin
            longint q;
            real r;
            conv2_at(2 * y + k / 2, 2 * x + k % 2, f, q, r);
            if (q > mx) mx = q;
            if (r > rmx) rmx = r;
          end
          mx = clamp(mx < 0 ? 0 : mx);
          r2[i] = rmx < 0.0 ? 0.0 : rmx;
          if (d2[i] - mx > 9 * N1 + 1 || mx - d2[i] > 9 * N1 + 1) bad2++;
        end
    check(bad2 == 0, $sformatf("image %0d: %0d layer-2 outputs off", n, bad2));
    for (int j = 0; j < noutv; j++) begin
      longint s = fb[j];
      real rs = real'(fb[j]) / 65536.0;
      real err;
      for (int i = 0; i < fcv; i++) begin
        s += (d2[i] * fw[i][j]) >>> 16;
        rs += r2[i] * real'(fw[i][j]) / 65536.0;
      end
      s = clamp(s);
      if (scores[j] != s) begin
        bad3++;
        $display("score %0d: got %0d expected %0d", j, scores[j], s);
      end
      err = real'(scores[j]) / 65536.0 - rs;
      if (err < 0.0) err = -err;
      if (err > max_err) max_err = err;
    end
    check(bad3 == 0, $sformatf("image %0d: %0d scores differ", n, bad3));
    check(max_err < 0.05, $sformatf("image %0d: error against full precision %f", n, max_err));
    $display("image %0d: largest score error against full precision %f", n, max_err);
    if (max_err > batch_err) batch_err = max_err;
  endtask

  initial begin
    n1v = N1; n2v = N2; p1v = P1; p2v = P2; fcv = FC_IN; noutv = N_OUT;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_weights();
    for (int n = 0; n < NIMG; n++) begin
      longint t0;
      load_image();
      l1.delete();
      l2.delete();
      @(negedge clk) start = 1'b1;
      t0 = cyc;
      @(negedge clk) start = 1'b0;
      while (!done) @(negedge clk);
      $display("image %0d: %0d cycles from start to done", n, cyc - t0);
      check(cyc - t0 >= LAYER2_CYC && cyc - t0 <= SERIAL_CYC,
            $sformatf("cycles %0d outside [%0d, %0d]", cyc - t0, LAYER2_CYC, SERIAL_CYC));

      // layer 1 may still be finishing rows that layer 2 does not use
      while (busy) @(negedge clk);
      for (int j = 0; j < noutv; j++) begin
        @(negedge clk) out_raddr = O_AW'(j);
        @(negedge clk) scores[j] = longint'(out_rdata);
      end
      check_image(n);
    end
    $display("largest score error over %0d image(s): %f", NIMG, batch_err);
    $display("stalls: reader held by layer 1 %0d, layer 1 held by layer 2 %0d, layer 2 held by FC %0d; zero (ReLU) outputs of layer 1 %0d",
             n_rd_hold, n_l1_hold, n_l2_hold, n_relu);
    check(n_rd_hold > 0, "input reader never held");
    check(n_l1_hold > 0, "layer 1 never held");
    check(n_l2_hold == 0, "FC layer held layer 2");
    check(n_relu > 0, "ReLU never clamped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
