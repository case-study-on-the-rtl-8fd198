// winograd_conv_core - one convolutional layer (3x3 filters, valid padding)
// followed by 2x2/stride-2 max pooling, computed with Winograd F(2x2,3x3) tiles.
//
// Data flow. The layer input arrives as a stream, pixel by pixel in row-major
// order, with the C_IN channel values of a pixel one after the other. Each
// input channel has its own 4x4 window buffer and its own set of 16 weight
// registers; one winograd_kernel is shared by all channels. The four channel_acc
// registers hold the 2x2 output tile of the filter being computed.
//
// Schedule. When the last channel of a pixel at an odd row and an odd column
// (both >= 3) has been taken in, the windows cover a 4x4 input tile whose 2x2
// output tile is exactly one pooling window. The core then raises `in_hold`
// (it takes no input while computing, since a shift would move the windows) and,
// for every filter f in turn:
//   - streams the filter's words from the layer's weight memory, one per cycle:
//     first the bias, which initialises channel_acc, then 16 Winograd-domain
//     weights per input channel (channel-major, row-major inside the 4x4);
//   - as soon as the 16 weights of channel c sit in its weight registers, runs
//     the kernel on channel c and adds its 2x2 result to channel_acc (this
//     overlaps with loading the next channel);
//   - pools, applies ReLU, saturates to Q16 and places the result in the output
//     register, waiting first if the previous result is still held back by the
//     next layer (`out_hold`).
// The output stream is therefore one pooled pixel per tile, all N_FILT channels
// of a pixel in a row, in row-major order: the same format the core takes in,
// so cores chain directly. Pooled outputs per row: (IMG_W-2)/2, rounded down.
//
// Weight memory layout (one Q16 word per address, 1 cycle read latency):
//   address f*(1+16*C_IN)            bias of filter f
//   address f*(1+16*C_IN)+1+16*c+k   U[k/4][k%4] of filter f, input channel c,
// with U = G g G^T the pre-transformed filter.
//
// Timing: a tile takes N_FILT * (16*C_IN + 4) cycles when the next layer does
// not hold the output. Handshakes: a word moves on in_valid & !in_hold and on
// out_valid & !out_hold; a held output keeps its value.
//
// The window buffers per channel, the weight registers per channel, the single
// kernel, the four channel_acc registers, pooling after the Winograd tile and
// pre-transformed weights follow the described architecture. The stream format,
// the memory layout, the bias, the ReLU, the saturation and the cycle-level
// schedule are this design's own choices.
module winograd_conv_core
  import cnn_pkg::*;
#(
  parameter int unsigned C_IN   = 1,
  parameter int unsigned N_FILT = 32,
  parameter int unsigned IMG_W  = 28,
  parameter int unsigned IMG_H  = 28,
  parameter bit          RELU   = 1'b1,
  localparam int unsigned WPF   = 1 + 16 * C_IN,             // words per filter
  localparam int unsigned WAW   = $clog2(N_FILT * WPF)       // weight address bits
) (
  input  logic           clk,
  input  logic           rst_n,
  // input stream
  input  logic           in_valid,
  input  q16_t           in_data,
  output logic           in_hold,
  // output stream
  output logic           out_valid,
  output q16_t           out_data,
  input  logic           out_hold,
  // weight memory read port
  output logic           w_re,
  output logic [WAW-1:0] w_addr,
  input  q16_t           w_data,
  // status
  output logic           busy        // computing a tile
);

  localparam int unsigned CW = (C_IN > 1) ? $clog2(C_IN) : 1;
  localparam int unsigned XW = $clog2(IMG_W);
  localparam int unsigned YW = $clog2(IMG_H);
  localparam int unsigned FW = (N_FILT > 1) ? $clog2(N_FILT) : 1;
  localparam int unsigned JW = $clog2(WPF);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_OUT} state_t;
  state_t state;

  // ---------------------------------------------------------------- input side
  logic          accept;
  logic [CW-1:0] ch;
  logic [XW-1:0] px;
  logic [YW-1:0] py;
  logic          tile_ready;

  assign in_hold = (state != S_IDLE);
  assign accept  = in_valid && !in_hold;
  assign busy    = (state != S_IDLE);

  // last channel of a pixel at odd row and column, both >= 3: a full 4x4 tile
  assign tile_ready = accept && (32'(ch) == C_IN - 1) &&
                      (px >= 3) && px[0] && (py >= 3) && py[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ch <= '0;
      px <= '0;
      py <= '0;
    end else if (accept) begin
      if (32'(ch) == C_IN - 1) begin
        ch <= '0;
        if (32'(px) == IMG_W - 1) begin
          px <= '0;
          py <= (32'(py) == IMG_H - 1) ? '0 : py + 1'b1;
        end else begin
          px <= px + 1'b1;
        end
      end else begin
        ch <= ch + 1'b1;
      end
    end
  end

  q16_t win [C_IN][4][4];

  for (genvar c = 0; c < C_IN; c++) begin : g_win
    window_buffer #(.K(4), .IMG_W(IMG_W)) u_wb (
      .clk   (clk),
      .rst_n (rst_n),
      .shift (accept && (32'(ch) == c)),
      .din   (in_data),
      .window(win[c])
    );
  end

  // ------------------------------------------------------------ weight loading
  logic [FW-1:0]  filt;       // filter being computed
  logic [WAW-1:0] fbase;      // its first weight address
  logic [JW-1:0]  rd_j;       // word index of the next read
  logic           rd_vld;     // a word arrives this cycle
  logic [JW-1:0]  rd_vj;      // its index
  logic           kern_go;    // run the kernel this cycle
  logic [CW-1:0]  kern_ch;    // on this channel

  q16_t wreg [C_IN][4][4];
  acc_t cacc [2][2];          // channel_acc

  assign w_re   = (state == S_LOAD);
  assign w_addr = fbase + WAW'(rd_j);

  // word index j >= 1 -> channel (j-1)/16, position (j-1)%16
  logic [JW-1:0] vj_m1;
  logic [CW-1:0] vj_ch;
  logic [3:0]    vj_k;
  assign vj_m1 = rd_vj - 1'b1;
  assign vj_k  = vj_m1[3:0];
  if (C_IN > 1) begin : g_vch
    assign vj_ch = CW'(vj_m1 >> 4);
  end else begin : g_vch1
    assign vj_ch = '0;
  end

  always_ff @(posedge clk) begin
    if (rd_vld && rd_vj != '0) wreg[vj_ch][vj_k[3:2]][vj_k[1:0]] <= w_data;
  end

  // --------------------------------------------------------------- the kernel
  acc_t kern_y [2][2];

  winograd_kernel u_kernel (
    .d(win[kern_ch]),
    .u(wreg[kern_ch]),
    .y(kern_y)
  );

  // ----------------------------------------------------------- pooling output
  q16_t pooled;

  max_pool_relu #(.RELU(RELU)) u_pool (
    .a(cacc),
    .y(pooled)
  );

  logic out_free;
  assign out_free = !out_valid || !out_hold;

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      filt      <= '0;
      fbase     <= '0;
      rd_j      <= '0;
      rd_vld    <= 1'b0;
      rd_vj     <= '0;
      kern_go   <= 1'b0;
      kern_ch   <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int i = 0; i < 2; i++)
        for (int j = 0; j < 2; j++) cacc[i][j] <= '0;
    end else begin
      // read pipeline: the word addressed now arrives next cycle
      rd_vld  <= (state == S_LOAD);
      rd_vj   <= rd_j;
      kern_go <= rd_vld && (rd_vj != '0) && (vj_k == 4'd15);
      kern_ch <= vj_ch;

      if (rd_vld && rd_vj == '0) begin
        for (int i = 0; i < 2; i++)
          for (int j = 0; j < 2; j++) cacc[i][j] <= acc_t'(w_data);
      end else if (kern_go) begin
        for (int i = 0; i < 2; i++)
          for (int j = 0; j < 2; j++) cacc[i][j] <= cacc[i][j] + kern_y[i][j];
      end

      if (out_valid && !out_hold) out_valid <= 1'b0;

      unique case (state)
        S_IDLE: begin
          if (tile_ready) begin
            state <= S_LOAD;
            filt  <= '0;
            fbase <= '0;
            rd_j  <= '0;
          end
        end
        S_LOAD: begin
          if (32'(rd_j) == WPF - 1) begin
            state <= S_OUT;
            rd_j  <= '0;
          end else begin
            rd_j <= rd_j + 1'b1;
          end
        end
        S_OUT: begin
          // wait for the last accumulation and for the output register
          if (!rd_vld && !kern_go && out_free) begin
            out_valid <= 1'b1;
            out_data  <= pooled;
            if (32'(filt) == N_FILT - 1) begin
              state <= S_IDLE;
            end else begin
              state <= S_LOAD;
              filt  <= filt + 1'b1;
              fbase <= fbase + WAW'(WPF);
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a held output must stay valid and unchanged
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && out_hold |=> out_valid && $stable(out_data));

endmodule
