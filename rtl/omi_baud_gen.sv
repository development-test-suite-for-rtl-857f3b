// omi_baud_gen: 16x baud-rate enable for the UARTs.
//
// Produces a one-clock pulse, en_16x, sixteen times per bit period:
// every DIV clocks, with DIV = CLK_HZ / (16 * BAUD) rounded. At 100 MHz
// and 38400 baud DIV is 163 (38344 baud, 0.15 % slow), well inside what
// an 8N1 receiver tolerates. The clock and baud rate follow the design
// description; the 16x oversampling scheme is this implementation's.
module omi_baud_gen #(
  parameter int unsigned CLK_HZ = 100_000_000,
  parameter int unsigned BAUD   = 38_400
) (
  input  logic clk,
  input  logic rst,
  output logic en_16x
);

  localparam int unsigned DIV = (CLK_HZ + 8 * BAUD) / (16 * BAUD);
  localparam int unsigned CW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      en_16x <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt    <= '0;
      en_16x <= 1'b1;
    end else begin
      cnt    <= cnt + 1'b1;
      en_16x <= 1'b0;
    end
  end

endmodule
