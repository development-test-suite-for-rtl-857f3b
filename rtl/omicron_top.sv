// omicron_top: OMICRON board test core with its hardware testbench
// debugger.
//
// OMICRON is the FPGA configuration that tests its own circuit board:
// a PicoBlaze 8-bit microcontroller runs a test program and reaches every
// peripheral through 8-bit I/O ports. This module is everything around the
// microcontroller. The PicoBlaze itself is an external core; its bus
// (address, instruction, port_id, out_port, in_port, write_strobe,
// read_strobe) is brought out as the pb_* ports, so a PicoBlaze instance
// is connected one to one.
//
//  * Program memory: main, auxiliary and testbench ROMs of 1024 x 18,
//    chosen by the rom_sel field of the control register (omi_prog_mem).
//  * Data output registers (omi_out_reg), one per output port, each
//    loading out_port when port_id matches and write_strobe is high. They
//    drive the LEDs, the LCD, the data and vector ROM addresses, the SPI
//    flash, the IR transmitter, the user I/O, the PS/2 lines and the
//    SDRAM pins, which the program operates directly.
//  * Input multiplexer (omi_in_mux): buttons, UART, SPI, data ROM,
//    testbench vectors, testbench inputs, IR receiver, user I/O, PS/2
//    and SDRAM data back to in_port.
//  * UART transmitter and receiver, 8N1 at 38400 baud (omi_uart_tx/rx);
//    the receiver's queue is popped by read_strobe.
//  * SPI master, mode 3, SCLK = clk / 8 (omi_spi_master).
//  * IR: the auxiliary clock divided by 16 into the 38 kHz carrier
//    (omi_clk_div) and gated into bursts of 16 periods (omi_ir_burst).
//  * Testbench debugger: four next-output registers N1..N4 (output ports
//    08..0B) feed four testbench output registers O1..O4 (omi_tb_reg)
//    that all load together while the tb_strobe bit of the control
//    register is high. tb_out = {O1, O2, O3, O4}. The inputs I1..I4 are
//    read through the input multiplexer. A vector ROM (omi_vector_rom)
//    supplies stored vectors for continuous runs.
//  * With USE_EXAMPLE_MODULE = 1 the example module of the debugger
//    walk-through (omi_test_module) is built in and wired to O1..O4 and
//    I1..I4; with 0, I1..I4 come from the tb_in_ext port instead and the
//    debugger tests whatever the user connects to tb_out.
//
// Block structure, sizes and the debugger register chain follow the
// design description. Port addresses and control-bit layouts (omi_pkg),
// the bit-level hookup of the SDRAM, PS/2 and user I/O pins, and the
// synchronizers are this implementation's choices. Bidirectional pins are
// split into _out, _oe and _in ports; the pull-ups that the user I/O and
// PS/2 tests rely on belong to the pads, outside this module.
//
// Clocks: clk is the 100 MHz system clock; clk_aux is the auxiliary
// oscillator (607.6 kHz for the IR test). rst is synchronous to clk and
// is synchronized into the clk_aux domain here. The same rst also clears
// the example tested module asynchronously, because that module's own
// clock is a debugger output (O1 bit 0) that does not run during reset;
// lint therefore sees rst used both ways, which is intended. An assertion
// checks the bus rule that write_strobe and read_strobe never coincide.
module omicron_top
  import omi_pkg::*;
#(
  parameter int unsigned CLK_HZ             = 100_000_000,
  parameter int unsigned BAUD               = 38_400,
  parameter int unsigned SPI_CLK_DIV        = 8,
  parameter int unsigned NUM_VEC_ROMS       = 128,
  parameter string       VEC_INIT           = "rtl/vector_rom_example.hex",
  parameter string       MAIN_INIT          = "",
  parameter string       AUX_INIT           = "",
  parameter string       TB_INIT            = "",
  parameter string       DATA_INIT          = "",
  parameter bit          USE_EXAMPLE_MODULE = 1'b1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                clk_aux,

  // PicoBlaze bus
  input  logic [PADDR_W-1:0]  pb_address,
  output logic [INSTR_W-1:0]  pb_instruction,
  input  byte_t               pb_port_id,
  input  byte_t               pb_out_port,
  input  logic                pb_write_strobe,
  input  logic                pb_read_strobe,
  output byte_t               pb_in_port,

  // LEDs (active high) and push buttons S4..S1 (active low)
  output byte_t               led,
  input  logic [3:0]          btn_n,

  // HD44780 LCD, write only
  output logic                lcd_rs,
  output logic                lcd_e,
  output byte_t               lcd_d,

  // RS232
  output logic                uart_txd,
  input  logic                uart_rxd,

  // PS/2: index 0 data, 1 clock
  output logic [1:0]          ps2_out,
  output logic [1:0]          ps2_oe,
  input  logic [1:0]          ps2_in,

  // IR transmitter FET gate and receiver output
  output logic                ir_tx,
  input  logic                ir_rx,

  // SPI serial flash
  output logic                eep_sclk,
  output logic                eep_si,
  input  logic                eep_so,
  output logic                eep_cs_n,
  output logic                eep_reset_n,

  // 64 user I/O pins: virtual port A = [31:0], B = [63:32]
  output logic [63:0]         uio_out,
  output logic [63:0]         uio_oe,
  input  logic [63:0]         uio_in,

  // SDRAM pins
  output logic [15:0]         sd_dq_out,
  output logic                sd_dq_oe,
  input  logic [15:0]         sd_dq_in,
  output logic [11:0]         sd_a,
  output logic [1:0]          sd_ba,
  output logic                sd_cs_n,
  output logic                sd_ras_n,
  output logic                sd_cas_n,
  output logic                sd_we_n,
  output logic                sd_cke,
  output logic                sd_clk,
  output logic                sd_dqml,
  output logic                sd_dqmh,

  // Testbench debugger: {O1, O2, O3, O4} and external {I1, I2, I3, I4}
  output logic [31:0]         tb_out,
  input  logic [31:0]         tb_in_ext
);

  // ---------------------------------------------------------------
  // Data output registers
  // ---------------------------------------------------------------
  byte_t ctrl_q, lcd_ctrl_q, addr_dl_q, addr_dh_q, addr_vl_q, addr_vh_q;
  byte_t eep_ctrl_q, ir_ctrl_q, uio_dir_q, ps2_q;
  byte_t sd_dql_q, sd_dqh_q, sd_al_q, sd_ah_q, sd_ctrl_q;
  byte_t next_q [4];
  byte_t uio_q  [8];

  `define OMI_OUT_REG(NAME, ADDR, RV) \
    omi_out_reg #(.PORT_ID(ADDR), .RESET_VAL(RV)) u_``NAME ( \
      .clk, .rst, .port_id(pb_port_id), .write_strobe(pb_write_strobe), \
      .d(pb_out_port), .q(NAME) );

  `OMI_OUT_REG(ctrl_q,     OP_CTRL,     8'h00)
  `OMI_OUT_REG(led,        OP_LED,      8'h00)
  `OMI_OUT_REG(lcd_d,      OP_LCD_DATA, 8'h00)
  `OMI_OUT_REG(lcd_ctrl_q, OP_LCD_CTRL, 8'h00)
  `OMI_OUT_REG(addr_dl_q,  OP_ADDR_DL,  8'h00)
  `OMI_OUT_REG(addr_dh_q,  OP_ADDR_DH,  8'h00)
  `OMI_OUT_REG(addr_vl_q,  OP_ADDR_VL,  8'h00)
  `OMI_OUT_REG(addr_vh_q,  OP_ADDR_VH,  8'h00)
  `OMI_OUT_REG(eep_ctrl_q, OP_EEP_CTRL, 8'h03)   // deselected, out of reset
  `OMI_OUT_REG(ir_ctrl_q,  OP_IR_CTRL,  8'h00)
  `OMI_OUT_REG(uio_dir_q,  OP_UIO_DIR,  8'h00)   // both virtual ports input
  `OMI_OUT_REG(ps2_q,      OP_PS2,      8'h03)   // lines released
  `OMI_OUT_REG(sd_dql_q,   OP_SD_DQL,   8'h00)
  `OMI_OUT_REG(sd_dqh_q,   OP_SD_DQH,   8'h00)
  `OMI_OUT_REG(sd_al_q,    OP_SD_AL,    8'h00)
  `OMI_OUT_REG(sd_ah_q,    OP_SD_AH,    8'h00)
  `OMI_OUT_REG(sd_ctrl_q,  OP_SD_CTRL,  8'h0F)   // deselected, NOP

  `undef OMI_OUT_REG

  for (genvar i = 0; i < 4; i++) begin : g_next
    omi_out_reg #(.PORT_ID(OP_NEXT1 + byte_t'(i))) u_next (
      .clk, .rst, .port_id(pb_port_id), .write_strobe(pb_write_strobe),
      .d(pb_out_port), .q(next_q[i]));
  end

  for (genvar i = 0; i < 8; i++) begin : g_uio
    omi_out_reg #(.PORT_ID(OP_UIO0 + byte_t'(i))) u_uio (
      .clk, .rst, .port_id(pb_port_id), .write_strobe(pb_write_strobe),
      .d(pb_out_port), .q(uio_q[i]));
  end

  // ---------------------------------------------------------------
  // Program memory
  // ---------------------------------------------------------------
  omi_prog_mem #(
    .MAIN_INIT(MAIN_INIT), .AUX_INIT(AUX_INIT), .TB_INIT(TB_INIT)
  ) u_prog_mem (
    .clk,
    .address(pb_address),
    .rom_sel(rom_sel_e'(ctrl_q[1:0])),
    .instruction(pb_instruction)
  );

  // ---------------------------------------------------------------
  // Data ROM and testbench vector ROM
  // ---------------------------------------------------------------
  byte_t            data_rom_q;
  logic [VEC_W-1:0] vector_q;

  omi_data_rom #(.INIT(DATA_INIT)) u_data_rom (
    .clk, .address({addr_dh_q[2:0], addr_dl_q}), .data(data_rom_q));

  omi_vector_rom #(.NUM_ROMS(NUM_VEC_ROMS), .INIT(VEC_INIT)) u_vector_rom (
    .clk, .address({addr_vh_q, addr_vl_q}), .data(vector_q));

  // ---------------------------------------------------------------
  // Testbench debugger output registers
  // ---------------------------------------------------------------
  byte_t tb_q [4];
  logic  tb_strobe;
  assign tb_strobe = ctrl_q[CTRL_TB_STROBE];

  for (genvar i = 0; i < 4; i++) begin : g_tb
    omi_tb_reg u_tb (.clk, .rst, .tb_strobe, .d(next_q[i]), .q(tb_q[i]));
  end

  assign tb_out = {tb_q[0], tb_q[1], tb_q[2], tb_q[3]};

  logic [31:0] tb_in;

  if (USE_EXAMPLE_MODULE) begin : g_example
    byte_t ex_y, ex_or, ex_ns, ex_ps;
    omi_test_module u_test_module (
      .clk(tb_q[0][0]), .rst, .load(tb_q[0][1]),
      .a(tb_q[1]), .b(tb_q[2]), .c(tb_q[3]),
      .y(ex_y), .or_sig(ex_or), .reg_ns(ex_ns), .reg_ps(ex_ps));
    assign tb_in = {ex_or, ex_ns, ex_ps, ex_y};
  end else begin : g_external
    assign tb_in = tb_in_ext;
  end

  // ---------------------------------------------------------------
  // UART
  // ---------------------------------------------------------------
  logic  en_16x;
  byte_t uart_rx_data;
  logic  rx_present, rx_half, rx_full, tx_busy, tx_half, tx_full;

  omi_baud_gen #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_baud (.clk, .rst, .en_16x);

  omi_uart_tx u_uart_tx (
    .clk, .rst, .en_16x,
    .push(pb_write_strobe && pb_port_id == OP_UART_TX),
    .din(pb_out_port), .tx(uart_txd),
    .busy(tx_busy), .half_full(tx_half), .full(tx_full));

  omi_uart_rx u_uart_rx (
    .clk, .rst, .en_16x, .rx(uart_rxd),
    .pop(pb_read_strobe && pb_port_id == IP_UART_RX),
    .dout(uart_rx_data), .data_present(rx_present),
    .half_full(rx_half), .full(rx_full));

  // ---------------------------------------------------------------
  // SPI flash
  // ---------------------------------------------------------------
  byte_t spi_rx;
  logic  spi_busy;

  omi_spi_master #(.CLK_DIV(SPI_CLK_DIV)) u_spi (
    .clk, .rst,
    .start(pb_write_strobe && pb_port_id == OP_SPI_TX),
    .tx_data(pb_out_port), .rx_data(spi_rx), .busy(spi_busy),
    .sclk(eep_sclk), .mosi(eep_si), .miso(eep_so));

  assign eep_cs_n    = eep_ctrl_q[0];
  assign eep_reset_n = eep_ctrl_q[1];

  // ---------------------------------------------------------------
  // IR transmitter (auxiliary clock domain)
  // ---------------------------------------------------------------
  logic rst_aux, carrier, period_end;

  omi_sync #(.W(1), .RESET_VAL(1'b1)) u_rst_aux (
    .clk(clk_aux), .rst(1'b0), .d(rst), .q(rst_aux));

  omi_clk_div u_clk_div (.clk_aux, .rst(rst_aux), .carrier, .period_end);

  omi_ir_burst u_ir_burst (
    .clk_aux, .rst(rst_aux), .enable(ir_ctrl_q[0]),
    .carrier, .period_end, .ir_tx);

  // ---------------------------------------------------------------
  // Pins driven straight from output registers
  // ---------------------------------------------------------------
  assign lcd_rs = lcd_ctrl_q[0];
  assign lcd_e  = lcd_ctrl_q[1];

  for (genvar i = 0; i < 8; i++) begin : g_uio_pins
    assign uio_out[8*i +: 8] = uio_q[i];
    assign uio_oe[8*i +: 8]  = {8{uio_dir_q[i / 4]}};
  end

  assign ps2_out = ps2_q[1:0];
  assign ps2_oe  = ps2_q[3:2];

  assign sd_dq_out = {sd_dqh_q, sd_dql_q};
  assign sd_a      = {sd_ah_q[3:0], sd_al_q};
  assign sd_ba     = sd_ah_q[5:4];
  assign sd_dq_oe  = sd_ah_q[6];
  assign sd_cs_n   = sd_ctrl_q[0];
  assign sd_ras_n  = sd_ctrl_q[1];
  assign sd_cas_n  = sd_ctrl_q[2];
  assign sd_we_n   = sd_ctrl_q[3];
  assign sd_cke    = sd_ctrl_q[4];
  assign sd_clk    = sd_ctrl_q[5];
  assign sd_dqml   = sd_ctrl_q[6];
  assign sd_dqmh   = sd_ctrl_q[7];

  // ---------------------------------------------------------------
  // Input side
  // ---------------------------------------------------------------
  logic [3:0] btn_s;
  logic [1:0] ps2_s;
  logic       ir_rx_s;

  omi_sync #(.W(4), .RESET_VAL(4'hF)) u_btn_sync (.clk, .rst, .d(btn_n), .q(btn_s));
  omi_sync #(.W(2), .RESET_VAL(2'b11)) u_ps2_sync (.clk, .rst, .d(ps2_in), .q(ps2_s));
  omi_sync #(.W(1), .RESET_VAL(1'b1)) u_ir_sync (.clk, .rst, .d(ir_rx), .q(ir_rx_s));

  in_sources_t src;
  always_comb begin
    src.buttons      = btn_s;
    src.uart_rx_data = uart_rx_data;
    src.uart_status  = {3'b0, tx_full, tx_half, rx_full, rx_half, rx_present};
    src.spi_rx       = spi_rx;
    src.spi_busy     = spi_busy;
    src.data_rom     = data_rom_q;
    src.vector       = vector_q;
    src.tb_in        = tb_in;
    src.ir_rx        = ir_rx_s;
    src.uio_in       = uio_in;
    src.ps2_in       = ps2_s;
    src.sd_dq_in     = sd_dq_in;
  end

  omi_in_mux u_in_mux (.clk, .port_id(pb_port_id), .src, .in_port(pb_in_port));

  // The transmitter's busy flag is not read by the program; the status
  // byte reports its FIFO level instead.
  logic unused_ok;
  assign unused_ok = &{1'b0, tx_busy, tb_in_ext, lcd_ctrl_q[7:2], eep_ctrl_q[7:2],
                       ir_ctrl_q[7:1], uio_dir_q[7:2], ps2_q[7:4],
                       sd_ah_q[7], addr_dh_q[7:3], ctrl_q[7:3]};

  // PicoBlaze bus rule: an instruction is either an OUTPUT or an INPUT,
  // so the two strobes are never high together
  a_strobes_exclusive: assert property (@(posedge clk) disable iff (rst)
                                        !(pb_write_strobe && pb_read_strobe));

endmodule
