// cnn_ram_tb - checks the simple dual-port RAM: write through port A, read
// back through port B with one cycle of latency, read-enable gating, and that
// a read of the address written in the same cycle returns the old word.
module cnn_ram_tb;
  localparam int DEPTH = 37;
  localparam int WIDTH = 20;
  localparam int AW = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic             a_we = 1'b0, b_re = 1'b0;
  logic [AW-1:0]    a_addr = '0, b_addr = '0;
  logic [WIDTH-1:0] a_wdata = '0, b_rdata;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  cnn_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  task automatic check(input logic [WIDTH-1:0] got, input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = WIDTH'($urandom);
      @(negedge clk);
      a_we = 1'b1; a_addr = AW'(i); a_wdata = model[i];
    end
    @(negedge clk) a_we = 1'b0;
    // read back in random order
    for (int n = 0; n < 200; n++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      @(negedge clk);
      b_re = 1'b1; b_addr = AW'(a);
      @(negedge clk);
      b_re = 1'b0;
      check(b_rdata, model[a], "read");
      // with the read enable low the output keeps its value
      b_addr = AW'($urandom_range(DEPTH - 1));
      @(negedge clk);
      check(b_rdata, model[a], "hold without read enable");
    end
    // simultaneous write and read of one address returns the old word
    for (int n = 0; n < 50; n++) begin
      int a;
      logic [WIDTH-1:0] nv;
      a = $urandom_range(DEPTH - 1);
      nv = WIDTH'($urandom);
      @(negedge clk);
      a_we = 1'b1; a_addr = AW'(a); a_wdata = nv;
      b_re = 1'b1; b_addr = AW'(a);
      @(negedge clk);
      a_we = 1'b0; b_re = 1'b0;
      check(b_rdata, model[a], "read during write");
      model[a] = nv;
      b_re = 1'b1;
      @(negedge clk);
      b_re = 1'b0;
      check(b_rdata, model[a], "read after write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
