// max_pool_relu_tb - checks 2x2 max pooling with ReLU and Q16 saturation on
// random, negative-only and oversized inputs, and the RELU=0 variant.
module max_pool_relu_tb;
  import cnn_pkg::*;

  acc_t a [2][2];
  q16_t y, y_lin;
  int checks = 0, failures = 0;
  int n_relu = 0, n_sat = 0;

  max_pool_relu #(.RELU(1'b1)) dut (.a(a), .y(y));
  max_pool_relu #(.RELU(1'b0)) dut_lin (.a(a), .y(y_lin));

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint clamp(input longint v);
    if (v > 64'sd2147483647) return 64'sd2147483647;
    if (v < -64'sd2147483648) return -64'sd2147483648;
    return v;
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      longint mx;
      int mode;
      mode = n % 3;
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) begin
          longint v;
          if (mode == 0)      v = longint'($urandom) - longint'(32'h8000_0000);
          else if (mode == 1) v = -longint'($urandom_range(100000));
          else                v = (longint'($urandom) <<< 4) - (longint'(32'h8000_0000) <<< 4);
          a[i][j] = acc_t'(v);
        end
      #1;
      mx = a[0][0];
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) if (longint'(a[i][j]) > mx) mx = a[i][j];
      checks += 2;
      if (longint'(y_lin) != clamp(mx)) begin
        failures++;
        $display("FAIL no-relu: got %0d expected %0d", y_lin, clamp(mx));
      end
      if (mx < 0) n_relu++;
      if (mx > 64'sd2147483647) n_sat++;
      if (mx < 0) mx = 0;
      if (longint'(y) != clamp(mx)) begin
        failures++;
        $display("FAIL relu: got %0d expected %0d", y, clamp(mx));
      end
    end
    checks++;
    if (n_relu == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL coverage relu=%0d sat=%0d", n_relu, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
