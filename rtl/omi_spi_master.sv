// omi_spi_master: SPI master for the serial flash (EEPROM).
//
// Mode 3 master, most significant bit first, as the design specifies:
// SCLK idles high, MOSI changes on the falling edge and MISO is sampled
// on the rising edge. SCLK is the system clock divided by CLK_DIV (8, so
// 12.5 MHz from 100 MHz): each bit is CLK_DIV/2 clocks low, then CLK_DIV/2
// clocks high. start (a write to the SPI transmit port) launches one
// 8-bit exchange; busy is high for the 8 * CLK_DIV clocks it takes and
// rx_data holds the byte read once busy falls. A start while busy is
// ignored. Chip select and reset of the flash are plain output-register
// bits, driven by the program, not by this block.
// An assertion checks that SCLK idles high outside a transfer.
module omi_spi_master
  import omi_pkg::*;
#(
  parameter int unsigned CLK_DIV = 8
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  byte_t tx_data,
  output byte_t rx_data,
  output logic  busy,
  output logic  sclk,
  output logic  mosi,
  input  logic  miso
);

  localparam int unsigned HALF = CLK_DIV / 2;
  localparam int unsigned PW   = $clog2(CLK_DIV);

  logic [PW-1:0] phase;
  logic [2:0]    bit_idx;
  byte_t         tx_sh, rx_sh;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy    <= 1'b0;
      sclk    <= 1'b1;
      mosi    <= 1'b1;
      phase   <= '0;
      bit_idx <= '0;
      tx_sh   <= '0;
      rx_sh   <= '0;
      rx_data <= '0;
    end else if (!busy) begin
      sclk <= 1'b1;
      if (start) begin
        busy    <= 1'b1;
        sclk    <= 1'b0;               // falling edge: first bit out
        mosi    <= tx_data[7];
        tx_sh   <= {tx_data[6:0], 1'b0};
        phase   <= '0;
        bit_idx <= '0;
      end
    end else begin
      phase <= phase + 1'b1;
      if (phase == PW'(HALF - 1)) begin
        sclk  <= 1'b1;                 // rising edge: sample MISO
        rx_sh <= {rx_sh[6:0], miso};
      end else if (phase == PW'(CLK_DIV - 1)) begin
        phase <= '0;
        if (bit_idx == 3'd7) begin
          busy    <= 1'b0;
          rx_data <= rx_sh;
        end else begin
          bit_idx <= bit_idx + 1'b1;
          sclk    <= 1'b0;
          mosi    <= tx_sh[7];
          tx_sh   <= {tx_sh[6:0], 1'b0};
        end
      end
    end
  end

  // mode 3: the clock idles high whenever no transfer is running
  a_sclk_idle_high: assert property (@(posedge clk) disable iff (rst) !busy |-> sclk);

endmodule
