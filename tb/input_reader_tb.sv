// input_reader_tb - reads a random image out of a memory model through the
// input reader, with the consumer holding at random, and checks the order,
// the values, the pixel count, busy, and a second start.
module input_reader_tb;
  import cnn_pkg::*;
  localparam int N = 50;
  localparam int AW = $clog2(N);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst_n = 1'b0, start = 1'b0, busy;
  logic m_re;
  logic [AW-1:0] m_addr;
  q16_t m_data;
  logic out_valid, out_hold = 1'b0;
  q16_t out_data;
  q16_t mem [N];
  int checks = 0, failures = 0, got = 0, holds = 0;

  input_reader #(.N_PIX(N)) dut (.*);

  always_ff @(posedge clk) if (m_re) m_data <= mem[m_addr];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) mem[i] = q16_t'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int img = 0; img < 2; img++) begin
      got = 0;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      while (got < N) begin
        out_hold = ($urandom_range(2) == 0);
        @(posedge clk);
        if (out_valid && out_hold) holds++;
        if (out_valid && !out_hold) begin
          checks++;
          if (out_data !== mem[got]) begin
            failures++;
            $display("FAIL pixel %0d: %h expected %h", got, out_data, mem[got]);
          end
          got++;
        end
        @(negedge clk);
      end
      out_hold = 1'b0;
      repeat (5) @(negedge clk);
      checks++;
      if (busy || out_valid) begin
        failures++;
        $display("FAIL reader still busy after %0d pixels", N);
      end
    end
    checks++;
    if (holds == 0) begin
      failures++;
      $display("FAIL hold never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
