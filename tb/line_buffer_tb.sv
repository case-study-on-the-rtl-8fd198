// line_buffer_tb - pushes a random stream into the delay line with random
// idle cycles and checks that each value comes out exactly LEN shifts later.
module line_buffer_tb;
  localparam int LEN = 7;
  localparam int WIDTH = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             rst_n = 1'b0, shift = 1'b0;
  logic [WIDTH-1:0] din = '0, dout;
  logic [WIDTH-1:0] hist [$];
  int checks = 0, failures = 0;

  line_buffer #(.LEN(LEN), .WIDTH(WIDTH)) dut (.*);

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
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // dout shows the value that entered LEN shifts ago
      if (hist.size() >= LEN) begin
        checks++;
        if (dout !== hist[hist.size() - LEN]) begin
          failures++;
          $display("FAIL at push %0d: dout %h expected %h", n, dout, hist[hist.size() - LEN]);
        end
      end
      shift = ($urandom_range(3) != 0);
      din   = WIDTH'($urandom);
      if (shift) hist.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
