// input_reader - streams one image from the input memory into the first
// convolutional layer.
//
// A `start` pulse makes it read addresses 0..N_PIX-1 of the input memory in
// order and offer each word on a valid/hold stream. The memory has one cycle of
// read latency, so a word is requested, arrives in the output register and is
// held there (out_valid high) until the layer takes it (out_hold low); then the
// next address is requested. This gives at most one pixel every two cycles,
// which is far faster than the first layer consumes them. `busy` is high from
// start until the last pixel has been taken. The reading scheme is this
// design's own; the design only states that the image sits in an input memory
// that feeds the first layer.
module input_reader
  import cnn_pkg::*;
#(
  parameter int unsigned N_PIX = 784,
  localparam int unsigned AW   = $clog2(N_PIX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  // input memory read port
  output logic          m_re,
  output logic [AW-1:0] m_addr,
  input  q16_t          m_data,
  // output stream
  output logic          out_valid,
  output q16_t          out_data,
  input  logic          out_hold
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_OFFER} state_t;
  state_t state;

  assign m_re      = (state == S_REQ);
  assign out_valid = (state == S_OFFER);
  assign busy      = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      m_addr   <= '0;
      out_data <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          m_addr <= '0;
          state  <= S_REQ;
        end
        S_REQ:  state <= S_WAIT;
        S_WAIT: begin
          out_data <= m_data;
          state    <= S_OFFER;
        end
        S_OFFER: if (!out_hold) begin
          if (32'(m_addr) == N_PIX - 1) begin
            state <= S_IDLE;
          end else begin
            m_addr <= m_addr + 1'b1;
            state  <= S_REQ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
