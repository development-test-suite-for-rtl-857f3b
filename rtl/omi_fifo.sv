// omi_fifo: small byte FIFO that queues UART data.
//
// DEPTH (16) bytes of first-in first-out storage. push writes din at the
// tail unless the FIFO is full; pop discards the head unless it is empty.
// dout always shows the head byte (first-word fall-through), so a reader
// looks at dout and pops it in the same clock. data_present, half_full
// and full report the fill level. The 16 x 8 size follows the design's
// buffer; all behaviour beyond that is this implementation's choice.
// Assertions check that the fill count stays within DEPTH and agrees with
// the read and write pointers.
module omi_fifo
  import omi_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  push,
  input  byte_t din,
  input  logic  pop,
  output byte_t dout,
  output logic  data_present,
  output logic  half_full,
  output logic  full
);

  localparam int unsigned AW = $clog2(DEPTH);

  byte_t           mem [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;
  logic [AW:0]     count;
  logic            do_push, do_pop;

  assign full         = count == (AW+1)'(DEPTH);
  assign data_present = count != '0;
  assign half_full    = count >= (AW+1)'(DEPTH / 2);
  assign do_push      = push && !full;
  assign do_pop       = pop && data_present;
  assign dout         = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= rd_ptr + 1'b1;
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // the fill level never exceeds the storage and always matches the pointers
  a_count_range: assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH));
  a_count_ptrs:  assert property (@(posedge clk) disable iff (rst)
                                  AW'(wr_ptr - rd_ptr) == count[AW-1:0]);

endmodule
