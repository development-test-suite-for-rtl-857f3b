// omi_pkg: port map and shared constants of the OMICRON test core.
//
// The PicoBlaze microcontroller reaches every peripheral through one
// 8-bit port_id: a write to an output port lands in the data output
// register with that address, a read returns the byte the input
// multiplexer selects for that address. The instruction width (18), the
// program address width (10), the ROM sizes and the 8-bit ports follow
// the design description; the individual port numbers and the bit
// layout of the control bytes below are this implementation's choice.
package omi_pkg;

  localparam int unsigned PORT_W   = 8;
  localparam int unsigned INSTR_W  = 18;
  localparam int unsigned PADDR_W  = 10;
  localparam int unsigned VEC_W    = 36;   // 32 vector bits + 4 flag bits
  localparam int unsigned VEC_AW   = 9;    // 512 vectors per vector ROM

  typedef logic [PORT_W-1:0] byte_t;

  // Program ROM selector held in the control register.
  typedef enum logic [1:0] {
    ROM_MAIN = 2'd0,
    ROM_AUX  = 2'd1,
    ROM_TB   = 2'd2
  } rom_sel_e;

  // ---- output ports (PicoBlaze OUTPUT) ----
  localparam byte_t OP_CTRL       = 8'h00; // [1:0] rom_sel, [2] tb_strobe
  localparam byte_t OP_LED        = 8'h01;
  localparam byte_t OP_LCD_DATA   = 8'h02;
  localparam byte_t OP_LCD_CTRL   = 8'h03; // [0] rs, [1] enable
  localparam byte_t OP_ADDR_DL    = 8'h04; // data ROM address [7:0]
  localparam byte_t OP_ADDR_DH    = 8'h05; // data ROM address [10:8]
  localparam byte_t OP_ADDR_VL    = 8'h06; // vector address [7:0]
  localparam byte_t OP_ADDR_VH    = 8'h07; // vector address [15:8]
  localparam byte_t OP_NEXT1      = 8'h08; // next outputs N1..N4 at 08..0B
  localparam byte_t OP_UART_TX    = 8'h0C;
  localparam byte_t OP_SPI_TX     = 8'h0D;
  localparam byte_t OP_EEP_CTRL   = 8'h0E; // [0] cs_n, [1] reset_n
  localparam byte_t OP_IR_CTRL    = 8'h0F; // [0] burst enable
  localparam byte_t OP_UIO0       = 8'h10; // user I/O bytes 0..7 at 10..17
  localparam byte_t OP_UIO_DIR    = 8'h18; // [0] port A drives, [1] port B drives
  localparam byte_t OP_PS2        = 8'h19; // [0] data, [1] clk, [2] data_oe, [3] clk_oe
  localparam byte_t OP_SD_DQL     = 8'h1A;
  localparam byte_t OP_SD_DQH     = 8'h1B;
  localparam byte_t OP_SD_AL      = 8'h1C;
  localparam byte_t OP_SD_AH      = 8'h1D; // [3:0] A11..A8, [5:4] BA, [6] dq_oe
  localparam byte_t OP_SD_CTRL    = 8'h1E; // [0] cs_n [1] ras_n [2] cas_n [3] we_n
                                           // [4] cke [5] clk [6] dqml [7] dqmh

  // ---- input ports (PicoBlaze INPUT) ----
  localparam byte_t IP_BUTTONS    = 8'h00; // [3:0] S4..S1, active low as on the pins
  localparam byte_t IP_UART_RX    = 8'h01; // read pops the receive queue
  localparam byte_t IP_UART_STAT  = 8'h02;
  localparam byte_t IP_SPI_RX     = 8'h03;
  localparam byte_t IP_SPI_STAT   = 8'h04; // [0] busy
  localparam byte_t IP_DATA_ROM   = 8'h05;
  localparam byte_t IP_VEC1       = 8'h06; // vector bytes for tb_out1..tb_out4 at 06..09
  localparam byte_t IP_VEC_FLAGS  = 8'h0A; // [3:0] flag bits, [0] = last vector
  localparam byte_t IP_TB_IN1     = 8'h0B; // testbench inputs I1..I4 at 0B..0E
  localparam byte_t IP_IR_RX      = 8'h0F; // [0] receiver output (active low)
  localparam byte_t IP_UIO0       = 8'h10; // user I/O bytes 0..7 at 10..17
  localparam byte_t IP_PS2        = 8'h18; // [0] data, [1] clk
  localparam byte_t IP_SD_DQL     = 8'h19;
  localparam byte_t IP_SD_DQH     = 8'h1A;

  // Control register bit positions.
  localparam int unsigned CTRL_TB_STROBE = 2;

  // Everything the input multiplexer can select.
  typedef struct packed {
    logic [3:0]      buttons;
    byte_t           uart_rx_data;
    byte_t           uart_status;
    byte_t           spi_rx;
    logic            spi_busy;
    byte_t           data_rom;
    logic [VEC_W-1:0] vector;
    logic [31:0]     tb_in;      // {I1, I2, I3, I4}
    logic            ir_rx;
    logic [63:0]     uio_in;     // byte k at [8k+7:8k]
    logic [1:0]      ps2_in;     // {clk, data}
    logic [15:0]     sd_dq_in;
  } in_sources_t;

endpackage
