// omi_uart_tx: RS232 transmitter with a 16-byte buffer.
//
// Sends bytes in the fixed frame of the design: one start bit (0), eight
// data bits least significant first, no parity, one stop bit (1). The
// line idles high. push queues din in a 16-byte FIFO; the shifter takes
// the next byte as soon as the previous frame has ended, so frames go out
// back to back. Bit timing comes from en_16x (see omi_baud_gen): every
// bit lasts sixteen en_16x pulses, i.e. one frame is 160 pulses. The
// frame and baud rate follow the design description; buffering, status
// flags and state encoding are this implementation's.
// An assertion checks that the line is high whenever no frame is sent.
module omi_uart_tx
  import omi_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en_16x,
  input  logic  push,
  input  byte_t din,
  output logic  tx,
  output logic  busy,       // a frame is on the line or bytes wait
  output logic  half_full,
  output logic  full
);

  byte_t fifo_dout;
  logic  fifo_present, fifo_pop;

  omi_fifo #(.DEPTH(16)) u_fifo (
    .clk, .rst, .push, .din,
    .pop(fifo_pop), .dout(fifo_dout),
    .data_present(fifo_present), .half_full, .full
  );

  typedef enum logic [1:0] {TX_IDLE, TX_START, TX_DATA, TX_STOP} tx_state_e;
  tx_state_e   state;
  logic [3:0]  tick;      // en_16x pulses within the current bit
  logic [2:0]  bit_idx;
  byte_t       shreg;

  // A frame starts on an en_16x pulse, so every bit is exactly sixteen
  // pulses long; a queued byte follows the stop bit without a gap.
  logic frame_end;
  assign frame_end = (state == TX_STOP) && en_16x && (tick == 4'd15);
  assign fifo_pop  = fifo_present && en_16x && ((state == TX_IDLE) || frame_end);
  assign busy     = (state != TX_IDLE) || fifo_present;

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= TX_IDLE;
      tick    <= '0;
      bit_idx <= '0;
      shreg   <= '0;
      tx      <= 1'b1;
    end else begin
      unique case (state)
        TX_IDLE: begin
          tx <= 1'b1;
          if (fifo_pop) begin
            shreg <= fifo_dout;
            state <= TX_START;
            tick  <= '0;
            tx    <= 1'b0;
          end
        end
        TX_START, TX_DATA, TX_STOP: begin
          if (en_16x) begin
            tick <= tick + 1'b1;
            if (tick == 4'd15) begin
              unique case (state)
                TX_START: begin
                  state   <= TX_DATA;
                  bit_idx <= '0;
                  tx      <= shreg[0];
                end
                TX_DATA: begin
                  if (bit_idx == 3'd7) begin
                    state <= TX_STOP;
                    tx    <= 1'b1;
                  end else begin
                    bit_idx <= bit_idx + 1'b1;
                    tx      <= shreg[bit_idx + 3'd1];
                  end
                end
                default: begin          // end of the stop bit
                  if (fifo_pop) begin
                    shreg <= fifo_dout;
                    state <= TX_START;
                    tx    <= 1'b0;
                  end else begin
                    state <= TX_IDLE;
                    tx    <= 1'b1;
                  end
                end
              endcase
            end
          end
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

  // the line idles at the stop level between frames
  a_idle_high: assert property (@(posedge clk) disable iff (rst) (state == TX_IDLE) |-> tx);

endmodule
