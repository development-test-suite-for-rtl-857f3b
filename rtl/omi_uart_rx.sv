// omi_uart_rx: RS232 receiver with a 16-byte queue.
//
// Receives the frame of the design: a start bit, eight data bits least
// significant first, no parity, one stop bit, at the rate set by en_16x
// (sixteen pulses per bit). The line is synchronized, a falling edge
// starts a frame, the start bit is checked at its middle (eight pulses
// later) and every following bit is sampled sixteen pulses apart, at its
// middle. A byte whose stop bit reads 1 is pushed into a 16-byte FIFO;
// one with a bad stop bit is dropped. The reader sees the oldest byte on
// dout and removes it with pop, which the top drives from the PicoBlaze
// read strobe: the receive queue is the one input that uses read_strobe.
// Frame and baud rate follow the design description; oversampling,
// framing check and queue depth are this implementation's choices.
module omi_uart_rx
  import omi_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en_16x,
  input  logic  rx,
  input  logic  pop,
  output byte_t dout,
  output logic  data_present,
  output logic  half_full,
  output logic  full
);

  logic rx_s;
  omi_sync #(.W(1), .RESET_VAL(1'b1)) u_sync (.clk, .rst, .d(rx), .q(rx_s));

  typedef enum logic [1:0] {RX_IDLE, RX_START, RX_DATA, RX_STOP} rx_state_e;
  rx_state_e   state;
  logic [3:0]  tick;
  logic [2:0]  bit_idx;
  byte_t       shreg;
  logic        push;
  logic        rx_prev;

  omi_fifo #(.DEPTH(16)) u_fifo (
    .clk, .rst, .push, .din(shreg),
    .pop, .dout, .data_present, .half_full, .full
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= RX_IDLE;
      tick    <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      push    <= 1'b0;
      rx_prev <= 1'b1;
    end else begin
      push    <= 1'b0;
      rx_prev <= rx_s;
      unique case (state)
        RX_IDLE: begin
          tick <= '0;
          if (rx_prev && !rx_s) state <= RX_START;   // falling edge only
        end
        RX_START: if (en_16x) begin
          tick <= tick + 1'b1;
          if (tick == 4'd7) begin
            tick <= '0;
            if (rx_s) state <= RX_IDLE;            // glitch, not a start bit
            else begin
              state   <= RX_DATA;
              bit_idx <= '0;
            end
          end
        end
        RX_DATA: if (en_16x) begin
          tick <= tick + 1'b1;
          if (tick == 4'd15) begin
            shreg <= {rx_s, shreg[7:1]};
            if (bit_idx == 3'd7) state <= RX_STOP;
            bit_idx <= bit_idx + 1'b1;
          end
        end
        RX_STOP: if (en_16x) begin
          tick <= tick + 1'b1;
          if (tick == 4'd15) begin
            push  <= rx_s;
            state <= RX_IDLE;
          end
        end
        default: state <= RX_IDLE;
      endcase
    end
  end

endmodule
