// fc_layer - sequential fully connected layer: N_IN inputs, N_OUT neurons,
// no activation (the soft-max of the trained network is left to software).
//
// The inputs arrive one at a time on a valid/hold stream, in the order the
// previous layer produces them (pixel-major, channel-minor, which is the
// flattening order of a channels-last network). For input i the layer reads
// row i of its weight memory, which holds the weights of all N_OUT neurons for
// that input side by side, and updates all N_OUT accumulators at once with
// N_OUT parallel multipliers. After the last input it reads row N_IN (the
// biases), adds them, and writes the N_OUT results, saturated to Q16, to the
// output memory at addresses 0..N_OUT-1, then pulses `done`.
//
// Timing: an input is taken in the cycle in_valid is high and in_hold low; the
// layer then holds for one cycle while the weight row arrives, so it takes at
// most one input every two cycles. Closing an image takes N_OUT + 3 cycles.
//
// A sequential layer (instead of a fully combinational one, far too large for
// the target FPGA) and the `hold` back-pressure signal follow the described
// design. One wide weight row per input, with all neurons updated in parallel,
// the bias row and the output memory layout are this design's own choices.
module fc_layer
  import cnn_pkg::*;
#(
  parameter int unsigned N_IN  = 1600,
  parameter int unsigned N_OUT = 10,
  localparam int unsigned WAW  = $clog2(N_IN + 1),
  localparam int unsigned OAW  = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // input stream
  input  logic                           in_valid,
  input  q16_t                           in_data,
  output logic                           in_hold,
  // weight memory read port (row = N_OUT weights)
  output logic                           w_re,
  output logic [WAW-1:0]                 w_addr,
  input  logic [N_OUT-1:0][DATA_W-1:0]   w_data,
  // output memory write port
  output logic                           out_we,
  output logic [OAW-1:0]                 out_addr,
  output q16_t                           out_data,
  output logic                           done
);

  typedef enum logic [2:0] {S_IN, S_MAC, S_BIAS_RD, S_BIAS_ADD, S_WRITE} state_t;
  state_t state;

  logic [WAW-1:0] idx;      // index of the current input
  q16_t           x_reg;
  acc_t           acc [N_OUT];
  logic [OAW-1:0] wr_idx;
  logic           accept;

  assign in_hold = (state != S_IN);
  assign accept  = in_valid && !in_hold;
  assign w_re    = accept || (state == S_BIAS_RD);
  assign w_addr  = (state == S_BIAS_RD) ? WAW'(N_IN) : idx;

  assign out_we   = (state == S_WRITE);
  assign out_addr = wr_idx;
  assign out_data = sat_q16(acc[wr_idx]);

  // N_OUT parallel Q16 multipliers: input times the weight row
  acc_t prod [N_OUT];
  always_comb begin
    for (int j = 0; j < N_OUT; j++) begin
      logic signed [2*DATA_W-1:0] p;
      p = x_reg * q16_t'(w_data[j]);
      prod[j] = acc_t'(p >>> FRAC_W);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IN;
      idx    <= '0;
      x_reg  <= '0;
      wr_idx <= '0;
      done   <= 1'b0;
      for (int j = 0; j < N_OUT; j++) acc[j] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IN: begin
          if (accept) begin
            x_reg <= in_data;
            state <= S_MAC;
          end
        end
        S_MAC: begin
          for (int j = 0; j < N_OUT; j++) acc[j] <= acc[j] + prod[j];
          if (32'(idx) == N_IN - 1) begin
            idx   <= '0;
            state <= S_BIAS_RD;
          end else begin
            idx   <= idx + 1'b1;
            state <= S_IN;
          end
        end
        S_BIAS_RD: state <= S_BIAS_ADD;
        S_BIAS_ADD: begin
          for (int j = 0; j < N_OUT; j++) acc[j] <= acc[j] + acc_t'(q16_t'(w_data[j]));
          wr_idx <= '0;
          state  <= S_WRITE;
        end
        S_WRITE: begin
          if (32'(wr_idx) == N_OUT - 1) begin
            for (int j = 0; j < N_OUT; j++) acc[j] <= '0;
            done  <= 1'b1;
            state <= S_IN;
          end else begin
            wr_idx <= wr_idx + 1'b1;
          end
        end
        default: state <= S_IN;
      endcase
    end
  end

endmodule
