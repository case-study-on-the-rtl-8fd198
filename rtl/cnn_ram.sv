// cnn_ram - on-chip memory used for every storage block of the accelerator:
// the input image memory, the weight memory of each convolutional layer, the
// weight memory of the fully connected layer and the output memory.
//
// It is a simple dual-port RAM: port A writes (used to load an image and the
// weights before inference, or by the FC layer to store its results), port B
// reads synchronously, so read data appears one clock after the address.
// The memories in the original flow are pre-initialised from files when the
// FPGA is programmed; here the write port plays that role, which keeps the
// contents out of the RTL. Reads and writes of the same address in the same
// cycle return the old word.
module cnn_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  // port A: write
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  // port B: synchronous read
  input  logic             b_re,
  input  logic [AW-1:0]    b_addr,
  output logic [WIDTH-1:0] b_rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we && (32'(a_addr) < DEPTH)) mem[a_addr] <= a_wdata;
  end

  always_ff @(posedge clk) begin
    if (b_re) b_rdata <= mem[b_addr];
  end

endmodule
