// winograd_kernel_tb - checks the F(2x2,3x3) Winograd tile against a direct
// 3x3 convolution (correlation) computed here from the spatial filter g.
// The Winograd-domain filter U = G g G^T is formed in the testbench with the
// standard matrix G = [1 0 0; 1/2 1/2 1/2; 1/2 -1/2 1/2; 0 0 1].
//  - exact cases: pixels on a 2^-8 grid and g on a 2^-4 grid, so every
//    product is representable and the result must equal the direct sum exactly;
//  - random cases: full-precision Q16 values; the nine truncated products may
//    move the result by at most 9 LSB away from the exact direct sum.
module winograd_kernel_tb;
  import cnn_pkg::*;

  q16_t d [4][4];
  q16_t u [4][4];
  acc_t y [2][2];
  int checks = 0, failures = 0;

  winograd_kernel dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // U = G g G^T, with G scaled by 2 (integer) and the result divided by 4
  task automatic make_u(input longint g [3][3]);
    longint gs [4][3];
    longint t  [4][3];
    longint uu [4][4];
    gs = '{'{2, 0, 0}, '{1, 1, 1}, '{1, -1, 1}, '{0, 0, 2}};
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 3; j++) begin
        t[i][j] = 0;
        for (int k = 0; k < 3; k++) t[i][j] += gs[i][k] * g[k][j];
      end
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        uu[i][j] = 0;
        for (int k = 0; k < 3; k++) uu[i][j] += t[i][k] * gs[j][k];
        u[i][j] = q16_t'(uu[i][j] / 4);
      end
  endtask

  task automatic run(input longint g [3][3], input longint tol, input string what);
    make_u(g);
    #1;
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        longint ref_sum = 0;
        longint err;
        for (int a = 0; a < 3; a++)
          for (int b = 0; b < 3; b++) ref_sum += longint'(d[i+a][j+b]) * g[a][b];
        ref_sum = ref_sum >>> 16;
        err = longint'(y[i][j]) - ref_sum;
        checks++;
        if (err > tol || err < -tol) begin
          failures++;
          $display("FAIL %s y[%0d][%0d]=%0d expected %0d", what, i, j, y[i][j], ref_sum);
        end
      end
  endtask

  initial begin
    longint g [3][3];
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) d[i][j] = q16_t'((int'($urandom_range(2047)) - 1024) <<< 8);
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) g[a][b] = longint'((int'($urandom_range(63)) - 32) <<< 12);
      run(g, 0, "exact");
    end
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) d[i][j] = q16_t'(int'($urandom_range(2**20)) - 2**19);
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) g[a][b] = longint'((int'($urandom_range(2**18)) - 2**17) & ~3);
      run(g, 9, "random");
    end
    // large values: the input transform needs its two extra bits
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) d[i][j] = q16_t'((n % 2) ? 32'h7fff_0000 : 32'h8000_0000) ^ q16_t'(((i + j) % 2) ? 32'hffff_0000 : 0);
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) g[a][b] = longint'(($urandom_range(1) ? 1 : -1) * 65536);
      run(g, 0, "large");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
