// fc_layer_tb - feeds three random input vectors into a small sequential fully
// connected layer and checks the N_OUT results it writes to the output memory
// against sums computed here (each product truncated to Q16, then bias added,
// then clamped to the Q16 range). Vector 1 streams without gaps and checks the
// latency from the first input to `done`, 2*N_IN + N_OUT + 2 cycles; the others
// have random gaps; vector 3 uses large weights so that results saturate. The
// hold towards the previous layer must have stopped an offered input.
module fc_layer_tb;
  import cnn_pkg::*;
  localparam int N_IN = 24;
  localparam int N_OUT = 5;
  localparam int WAW = $clog2(N_IN + 1);
  localparam int OAW = $clog2(N_OUT);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n = 1'b0;
  logic in_valid = 1'b0, in_hold;
  q16_t in_data = '0;
  logic w_re;
  logic [WAW-1:0] w_addr;
  logic [N_OUT-1:0][DATA_W-1:0] w_data;
  logic out_we;
  logic [OAW-1:0] out_addr;
  q16_t out_data;
  logic done;

  fc_layer #(.N_IN(N_IN), .N_OUT(N_OUT)) dut (.*);

  logic [N_OUT-1:0][DATA_W-1:0] wmem [N_IN + 1];
  always_ff @(posedge clk) if (w_re) w_data <= wmem[w_addr];

  q16_t omem [N_OUT];
  int   owrites = 0;
  always_ff @(posedge clk) if (out_we) begin
    omem[out_addr] <= out_data;
    owrites <= owrites + 1;
  end

  q16_t x [N_IN];
  int checks = 0, failures = 0, n_hold = 0, n_sat = 0;
  int cyc = 0, t_first = 0, t_done = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_hold) n_hold++;
    if (done) t_done <= cyc;
  end

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
    for (int v = 0; v < 3; v++) begin
      longint acc [N_OUT];
      for (int i = 0; i <= N_IN; i++)
        for (int j = 0; j < N_OUT; j++)
          wmem[i][j] = (v == 2) ? 32'(int'($urandom_range(2 ** 24)) + 2 ** 24)
                                : 32'(int'($urandom_range(2 ** 17)) - 2 ** 16);
      for (int i = 0; i < N_IN; i++)
        x[i] = (v == 2) ? q16_t'(int'($urandom_range(2 ** 24)) + 2 ** 24)
                        : q16_t'(int'($urandom_range(2 ** 19)) - 2 ** 18);
      for (int j = 0; j < N_OUT; j++) begin
        acc[j] = longint'(q16_t'(wmem[N_IN][j]));
        for (int i = 0; i < N_IN; i++)
          acc[j] += (longint'(x[i]) * longint'(q16_t'(wmem[i][j]))) >>> 16;
      end
      owrites = 0;
      for (int i = 0; i < N_IN; i++) begin
        while (v != 0 && $urandom_range(2) == 0) begin
          in_valid = 1'b0;
          @(negedge clk);
        end
        in_valid = 1'b1;
        in_data  = x[i];
        @(posedge clk);
        while (in_hold) @(posedge clk);
        if (i == 0) t_first = cyc;
        @(negedge clk);
      end
      in_valid = 1'b0;
      repeat (N_OUT + 6) @(negedge clk);
      if (v == 0) begin
        checks++;
        if (t_done - t_first != 2 * N_IN + N_OUT + 2) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", t_done - t_first, 2 * N_IN + N_OUT + 2);
        end
      end
      checks++;
      if (owrites != N_OUT) begin
        failures++;
        $display("FAIL %0d output writes, expected %0d", owrites, N_OUT);
      end
      for (int j = 0; j < N_OUT; j++) begin
        longint e;
        e = acc[j];
        if (e > 64'sd2147483647) begin e = 64'sd2147483647; n_sat++; end
        if (e < -64'sd2147483648) begin e = -64'sd2147483648; n_sat++; end
        checks++;
        if (longint'(omem[j]) != e) begin
          failures++;
          $display("FAIL vector %0d neuron %0d: got %0d expected %0d", v, j, omem[j], e);
        end
      end
    end
    checks++;
    if (n_hold == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL coverage hold=%0d saturation=%0d", n_hold, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
