// line_buffer - fixed-length delay line that carries the part of an image row
// not held in the window registers from one window row to the row above.
//
// Each `shift` pushes `din` in and moves every stored value one place on; `dout`
// is the value that entered LEN shifts earlier (the one that leaves on the next
// shift). It is built as a circular buffer (an array plus one pointer) rather
// than a register chain, so only one word moves per shift and an FPGA tool can
// map it to distributed RAM. The contents are not reset: the window logic only
// uses a window once the rows it covers have been filled.
module line_buffer #(
  parameter int unsigned LEN   = 24,
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int unsigned PW = (LEN > 1) ? $clog2(LEN) : 1;

  logic [WIDTH-1:0] mem [LEN];
  logic [PW-1:0]    ptr;

  assign dout = mem[ptr];

  always_ff @(posedge clk) begin
    if (shift) mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ptr <= '0;
    else if (shift) ptr <= (32'(ptr) == LEN - 1) ? '0 : ptr + 1'b1;
  end

endmodule
