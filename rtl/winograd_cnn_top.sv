// winograd_cnn_top - complete inference engine for a small MNIST CNN:
//   28x28x1 image -> conv 3x3 (32 filters) + 2x2 max pool -> 13x13x32
//                 -> conv 3x3 (64 filters) + 2x2 max pool -> 5x5x64
//                 -> fully connected 1600 -> 10 scores.
//
// Each layer has its own processing block and its own weight memory; the
// layers are chained by valid/hold streams, so all three work at the same
// time on different parts of the image and a layer that is busy holds the one
// before it. The image comes from an input memory and the ten scores are
// written to an output memory. Both convolutional layers are Winograd
// F(2x2,3x3) cores whose weight memories hold filters already transformed to
// the Winograd domain (U = G g G^T), plus one bias per filter.
//
// Use: write the image (row-major, Q16) and the three weight memories through
// the load ports, pulse `start`, wait for `done`, then read the scores through
// the output memory read port (one cycle read latency). Another image can be
// started once `done` has been seen. Memory layouts are described in
// winograd_conv_core (convolution weights) and fc_layer (FC weights: row i holds
// the N_OUT weights of input i, row N_IN the biases, neuron j in bits
// [32j+31:32j]).
//
// The structure (input memory, two convolutional layers, FC layer, output
// memory, one weight memory per layer) follows the described design; the load
// ports stand in for the memory initialisation files used on the FPGA.
module winograd_cnn_top
  import cnn_pkg::*;
#(
  parameter int unsigned IMG   = 28,   // input image side
  parameter int unsigned N1    = 32,   // filters of layer 1
  parameter int unsigned N2    = 64,   // filters of layer 2
  parameter int unsigned N_OUT = 10,   // FC neurons
  localparam int unsigned P1   = (IMG - 2) / 2,            // layer 1 output side
  localparam int unsigned P2   = (P1 - 2) / 2,             // layer 2 output side
  localparam int unsigned FC_IN = P2 * P2 * N2,
  localparam int unsigned IN_D  = IMG * IMG,
  localparam int unsigned W1_D  = N1 * (1 + 16),
  localparam int unsigned W2_D  = N2 * (1 + 16 * N1),
  localparam int unsigned FC_D  = FC_IN + 1,
  localparam int unsigned IN_AW = $clog2(IN_D),
  localparam int unsigned W1_AW = $clog2(W1_D),
  localparam int unsigned W2_AW = $clog2(W2_D),
  localparam int unsigned FC_AW = $clog2(FC_D),
  localparam int unsigned O_AW  = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  // load ports
  input  logic                         in_we,
  input  logic [IN_AW-1:0]             in_addr,
  input  q16_t                         in_wdata,
  input  logic                         w1_we,
  input  logic [W1_AW-1:0]             w1_addr,
  input  q16_t                         w1_wdata,
  input  logic                         w2_we,
  input  logic [W2_AW-1:0]             w2_addr,
  input  q16_t                         w2_wdata,
  input  logic                         fcw_we,
  input  logic [FC_AW-1:0]             fcw_addr,
  input  logic [N_OUT-1:0][DATA_W-1:0] fcw_wdata,
  // output memory read port
  input  logic [O_AW-1:0]              out_raddr,
  output q16_t                         out_rdata
);

  // ------------------------------------------------------------- input memory
  logic             im_re;
  logic [IN_AW-1:0] im_addr;
  q16_t             im_data;
  logic             rd_busy;

  cnn_ram #(.DEPTH(IN_D), .WIDTH(DATA_W)) u_input_mem (
    .clk(clk), .a_we(in_we), .a_addr(in_addr), .a_wdata(in_wdata),
    .b_re(im_re), .b_addr(im_addr), .b_rdata(im_data)
  );

  logic s0_valid, s0_hold;
  q16_t s0_data;

  input_reader #(.N_PIX(IN_D)) u_reader (
    .clk(clk), .rst_n(rst_n), .start(start), .busy(rd_busy),
    .m_re(im_re), .m_addr(im_addr), .m_data(im_data),
    .out_valid(s0_valid), .out_data(s0_data), .out_hold(s0_hold)
  );

  // ------------------------------------------------------------------ layer 1
  logic             w1_re;
  logic [W1_AW-1:0] w1_raddr;
  q16_t             w1_rdata;
  logic             s1_valid, s1_hold, c1_busy;
  q16_t             s1_data;

  cnn_ram #(.DEPTH(W1_D), .WIDTH(DATA_W)) u_weight_mem1 (
    .clk(clk), .a_we(w1_we), .a_addr(w1_addr), .a_wdata(w1_wdata),
    .b_re(w1_re), .b_addr(w1_raddr), .b_rdata(w1_rdata)
  );

  winograd_conv_core #(.C_IN(1), .N_FILT(N1), .IMG_W(IMG), .IMG_H(IMG)) u_conv1 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(s0_valid), .in_data(s0_data), .in_hold(s0_hold),
    .out_valid(s1_valid), .out_data(s1_data), .out_hold(s1_hold),
    .w_re(w1_re), .w_addr(w1_raddr), .w_data(w1_rdata),
    .busy(c1_busy)
  );

  // ------------------------------------------------------------------ layer 2
  logic             w2_re;
  logic [W2_AW-1:0] w2_raddr;
  q16_t             w2_rdata;
  logic             s2_valid, s2_hold, c2_busy;
  q16_t             s2_data;

  cnn_ram #(.DEPTH(W2_D), .WIDTH(DATA_W)) u_weight_mem2 (
    .clk(clk), .a_we(w2_we), .a_addr(w2_addr), .a_wdata(w2_wdata),
    .b_re(w2_re), .b_addr(w2_raddr), .b_rdata(w2_rdata)
  );

  winograd_conv_core #(.C_IN(N1), .N_FILT(N2), .IMG_W(P1), .IMG_H(P1)) u_conv2 (
    .clk(clk), .rst_n(rst_n),
    .in_valid(s1_valid), .in_data(s1_data), .in_hold(s1_hold),
    .out_valid(s2_valid), .out_data(s2_data), .out_hold(s2_hold),
    .w_re(w2_re), .w_addr(w2_raddr), .w_data(w2_rdata),
    .busy(c2_busy)
  );

  // ------------------------------------------------------------------ FC layer
  logic                         fcw_re;
  logic [FC_AW-1:0]             fcw_raddr;
  logic [N_OUT-1:0][DATA_W-1:0] fcw_rdata;
  logic                         o_we;
  logic [O_AW-1:0]              o_addr;
  q16_t                         o_data;
  logic                         fc_done;

  cnn_ram #(.DEPTH(FC_D), .WIDTH(N_OUT * DATA_W)) u_fc_weight_mem (
    .clk(clk), .a_we(fcw_we), .a_addr(fcw_addr), .a_wdata(fcw_wdata),
    .b_re(fcw_re), .b_addr(fcw_raddr), .b_rdata(fcw_rdata)
  );

  fc_layer #(.N_IN(FC_IN), .N_OUT(N_OUT)) u_fc (
    .clk(clk), .rst_n(rst_n),
    .in_valid(s2_valid), .in_data(s2_data), .in_hold(s2_hold),
    .w_re(fcw_re), .w_addr(fcw_raddr), .w_data(fcw_rdata),
    .out_we(o_we), .out_addr(o_addr), .out_data(o_data),
    .done(fc_done)
  );

  // ------------------------------------------------------------ output memory
  cnn_ram #(.DEPTH(N_OUT), .WIDTH(DATA_W)) u_output_mem (
    .clk(clk), .a_we(o_we), .a_addr(o_addr), .a_wdata(o_data),
    .b_re(1'b1), .b_addr(out_raddr), .b_rdata(out_rdata)
  );

  // busy from start until the FC layer has written its results
  logic run;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       run <= 1'b0;
    else if (start)   run <= 1'b1;
    else if (fc_done) run <= 1'b0;
  end

  assign busy = run || rd_busy || c1_busy || c2_busy;
  assign done = fc_done;

endmodule
