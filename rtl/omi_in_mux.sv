// omi_in_mux: OMICRON input multiplexer.
//
// Chooses, by port_id, which byte the PicoBlaze reads on in_port: push
// buttons, UART receive data and status, SPI receive data and status, the
// data ROM, the four bytes and the flag bits of the current testbench
// vector, the four testbench inputs I1..I4, the IR receiver, the eight
// user I/O bytes, the PS/2 lines and the SDRAM data bus. The selection
// by port_id follows the design description; the address of each source
// (see omi_pkg) is this implementation's choice, and unused addresses
// read as zero.
//
// Timing: the selected byte is registered, so in_port shows the source
// one clock after port_id is set. The PicoBlaze holds port_id for the two
// clocks of an INPUT instruction and samples at the end of the second.
module omi_in_mux
  import omi_pkg::*;
(
  input  logic        clk,
  input  byte_t       port_id,
  input  in_sources_t src,
  output byte_t       in_port
);

  byte_t sel;

  always_comb begin
    sel = '0;
    case (port_id)
      IP_BUTTONS:   sel = {4'b0, src.buttons};
      IP_UART_RX:   sel = src.uart_rx_data;
      IP_UART_STAT: sel = src.uart_status;
      IP_SPI_RX:    sel = src.spi_rx;
      IP_SPI_STAT:  sel = {7'b0, src.spi_busy};
      IP_DATA_ROM:  sel = src.data_rom;
      IP_VEC1:      sel = src.vector[31:24];
      IP_VEC1 + 1:  sel = src.vector[23:16];
      IP_VEC1 + 2:  sel = src.vector[15:8];
      IP_VEC1 + 3:  sel = src.vector[7:0];
      IP_VEC_FLAGS: sel = {4'b0, src.vector[35:32]};
      IP_TB_IN1:    sel = src.tb_in[31:24];
      IP_TB_IN1 + 1: sel = src.tb_in[23:16];
      IP_TB_IN1 + 2: sel = src.tb_in[15:8];
      IP_TB_IN1 + 3: sel = src.tb_in[7:0];
      IP_IR_RX:     sel = {7'b0, src.ir_rx};
      IP_PS2:       sel = {6'b0, src.ps2_in};
      IP_SD_DQL:    sel = src.sd_dq_in[7:0];
      IP_SD_DQH:    sel = src.sd_dq_in[15:8];
      default: begin
        if (port_id[7:3] == IP_UIO0[7:3])
          sel = src.uio_in[8*port_id[2:0] +: 8];
      end
    endcase
  end

  always_ff @(posedge clk) in_port <= sel;

endmodule
