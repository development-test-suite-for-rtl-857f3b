// tb_omicron_top: end-to-end test of the OMICRON core at its default
// parameters (100 MHz, 38400 baud, one vector ROM holding the walk-through
// vectors, the example module built in).
//
// The testbench plays the PicoBlaze: out_port / port_id / write_strobe
// for OUTPUT, port_id / read_strobe / in_port for INPUT, two clocks each,
// and runs the steps of the test program through them. Around the core it
// models the board as the production test sets it up: serial TX looped
// to RX, a user I/O feedback connector pairing virtual port A with B
// under pull-ups, a PS/2 loop wire between data and clock, a sheet of
// paper that reflects the IR LED into the receiver, an SPI flash that
// echoes the previous byte, a minimal SDRAM and an LCD.
//
// The central check replays the debugger's LOAD VECTORS run: nine
// vectors from the vector ROM go through N1..N4 into O1..O4 one commit
// at a time, and after every commit the inputs I1..I4 from the example
// module must equal the values of the documented status dump
// (00 00 00 00, ..., FE FE FE 3E). The serial test also fills the
// transmit queue until it refuses a byte and lets the receive queue
// overflow. Each mechanism of the core is counted and must occur at least
// once.
module tb_omicron_top;
  import omi_pkg::*;

  logic clk = 0, clk_aux = 0, rst = 0;
  always #5 clk = ~clk;            // 100 MHz
  always #823 clk_aux = ~clk_aux;  // 607.5 kHz auxiliary oscillator

  logic [PADDR_W-1:0] pb_address = '0;
  logic [INSTR_W-1:0] pb_instruction;
  byte_t pb_port_id = '0, pb_out_port = '0, pb_in_port;
  logic  pb_write_strobe = 0, pb_read_strobe = 0;

  byte_t led, lcd_d;
  logic [3:0] btn_n = 4'hF;
  logic lcd_rs, lcd_e, uart_txd, ir_tx;
  logic ir_rx;
  logic [1:0] ps2_out, ps2_oe, ps2_in;
  logic eep_sclk, eep_si, eep_so, eep_cs_n, eep_reset_n;
  logic [63:0] uio_out, uio_oe, uio_in;
  logic [15:0] sd_dq_out, sd_dq_in;
  logic sd_dq_oe;
  logic [11:0] sd_a;
  logic [1:0] sd_ba;
  logic sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_cke, sd_clk, sd_dqml, sd_dqmh;
  logic [31:0] tb_out;

  omicron_top dut (
    .clk, .rst, .clk_aux,
    .pb_address, .pb_instruction, .pb_port_id, .pb_out_port,
    .pb_write_strobe, .pb_read_strobe, .pb_in_port,
    .led, .btn_n, .lcd_rs, .lcd_e, .lcd_d,
    .uart_txd, .uart_rxd(uart_txd),
    .ps2_out, .ps2_oe, .ps2_in,
    .ir_tx, .ir_rx,
    .eep_sclk, .eep_si, .eep_so, .eep_cs_n, .eep_reset_n,
    .uio_out, .uio_oe, .uio_in,
    .sd_dq_out, .sd_dq_oe, .sd_dq_in, .sd_a, .sd_ba,
    .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_cke, .sd_clk, .sd_dqml, .sd_dqmh,
    .tb_out, .tb_in_ext(32'h0)
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- board models ----------------
  // user I/O feedback connector: pin i of port A tied to pin i of port B,
  // pull-ups on both
  for (genvar i = 0; i < 32; i++) begin : g_fb
    wire net = (uio_oe[i] ? uio_out[i] : 1'b1) & (uio_oe[32+i] ? uio_out[32+i] : 1'b1);
    assign uio_in[i] = net;
    assign uio_in[32+i] = net;
  end
  // PS/2 loop wire between data and clock, pulled up
  wire ps2_net = (ps2_oe[0] ? ps2_out[0] : 1'b1) & (ps2_oe[1] ? ps2_out[1] : 1'b1);
  assign ps2_in = {ps2_net, ps2_net};
  // IR: reflected light; the receiver output goes low while it sees carrier
  logic ir_seen = 0;
  int   ir_pulses = 0;
  always @(posedge ir_tx) begin ir_pulses++; ir_seen = 1; end
  assign ir_rx = ~ir_seen;
  initial forever begin #100us; ir_seen = 0; end
  // SPI flash model: mode 3, shifts in on rising SCLK, returns the byte it
  // received in the previous transfer
  byte_t fl_in = 0, fl_last = 0;
  int fl_bits = 0;
  always @(posedge eep_sclk) if (!eep_cs_n) begin
    fl_in = {fl_in[6:0], eep_si}; fl_bits++;
    if (fl_bits % 8 == 0) fl_last = fl_in;
  end
  // the first falling SCLK edge of a transfer presents the MSB
  byte_t fl_out = 0;
  logic  fl_so = 1;
  always @(negedge eep_cs_n) fl_out = fl_last;
  always @(negedge eep_sclk) if (!eep_cs_n) begin
    fl_so = fl_out[7]; fl_out = {fl_out[6:0], 1'b0};
  end
  assign eep_so = fl_so;
  // SDRAM model: a WRITE command on the rising SDRAM clock stores the
  // data bus; the data bus reads back the word at the current address
  logic [15:0] sd_mem [logic [13:0]];
  always @(posedge sd_clk)
    if (!sd_cs_n && sd_ras_n && !sd_cas_n && !sd_we_n && sd_dq_oe)
      sd_mem[{sd_ba, sd_a}] = sd_dq_out;
  assign sd_dq_in = sd_mem.exists({sd_ba, sd_a}) ? sd_mem[{sd_ba, sd_a}] : 16'hFFFF;
  // LCD model: latch the data bus on the falling edge of enable
  byte_t lcd_last = 0;
  int lcd_writes = 0;
  always @(negedge lcd_e) begin lcd_last = lcd_d; lcd_writes++; end

  // ---------------- PicoBlaze bus tasks ----------------
  task automatic pb_out(byte_t id, byte_t d);
    @(posedge clk); #1;
    pb_port_id = id; pb_out_port = d;
    @(posedge clk); #1;
    pb_write_strobe = 1;
    @(posedge clk); #1;
    pb_write_strobe = 0;
  endtask

  task automatic pb_in(byte_t id, output byte_t d);
    @(posedge clk); #1;
    pb_port_id = id;
    @(posedge clk); #1;
    pb_read_strobe = 1;
    d = pb_in_port;
    @(posedge clk); #1;
    pb_read_strobe = 0;
  endtask

  // ---------------- mechanism counters ----------------
  int n_rom_switch = 0, n_data_rom = 0, n_vec_read = 0, n_end_marker = 0;
  int n_commit = 0, n_multi_commit = 0, n_uart_tx = 0, n_uart_rx = 0;
  int n_spi = 0, n_ir = 0, n_uio = 0, n_ps2 = 0, n_sdram = 0, n_lcd = 0;
  int n_button = 0, n_led = 0, n_sdram_addr = 0, n_tx_full = 0, n_rx_overflow = 0;

  // all outputs that change on a commit change on the same clock edge
  logic [31:0] tb_out_prev;
  always @(posedge clk) begin
    #2;
    if (tb_out !== tb_out_prev) begin
      int changed;
      changed = 0;
      for (int i = 0; i < 4; i++)
        if (tb_out[8*i +: 8] !== tb_out_prev[8*i +: 8]) changed++;
      if (changed > 1) n_multi_commit++;
    end
    tb_out_prev = tb_out;
  end

  // documented status dump of the walk-through: I1..I4 after each commit
  localparam logic [31:0] EXP_I [10] = '{
    32'h00000000, 32'h00000000, 32'h00000000, 32'h76760000, 32'h76767654,
    32'hDEDE7614, 32'hDEDEDE9C, 32'hFEFEDE1E, 32'hFEFEFE3E, 32'hFEFEFE3E };
  localparam logic [31:0] VECS [9] = '{
    32'h02000000, 32'h03000000, 32'h025672D5, 32'h035672D5, 32'h02DA569D,
    32'h03DA569D, 32'h02F00E3F, 32'h03F00E3F, 32'h02F00E3F };

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t d;
    int lcd_base;
    // load the three program ROMs and the data ROM with marker words
    for (int a = 0; a < 16; a++) begin
      dut.u_prog_mem.rom_main[a] = 18'(32'h10000 + a);
      dut.u_prog_mem.rom_aux[a]  = 18'(32'h20000 + a);
      dut.u_prog_mem.rom_tb[a]   = 18'(32'h30000 + a);
    end
    for (int a = 0; a < 2048; a += 97) dut.u_data_rom.rom[a] = byte_t'(a * 7 + 3);

    #1 rst = 1;                    // rising edge resets the example module too
    repeat (4) @(posedge clk); #1;
    rst = 0;
    repeat (4) @(posedge clk); #1;

    // ---- program ROM switching ----
    for (int r = 0; r < 3; r++) begin
      pb_out(OP_CTRL, byte_t'(r));
      pb_address = 10'(5 + r);
      @(posedge clk); #1;
      check(pb_instruction == 18'(32'h10000 * (r + 1) + 5 + r), $sformatf("ROM %0d word", r));
      n_rom_switch++;
    end
    pb_out(OP_CTRL, 8'h00);

    // ---- data ROM ----
    for (int a = 0; a < 2048; a += 97) begin
      pb_out(OP_ADDR_DL, byte_t'(a));
      pb_out(OP_ADDR_DH, byte_t'(a >> 8));
      pb_in(IP_DATA_ROM, d);
      check(d == byte_t'(a * 7 + 3), $sformatf("data ROM %0d", a));
      n_data_rom++;
    end

    // ---- LEDs, buttons, LCD ----
    pb_out(OP_LED, 8'hA5);
    check(led == 8'hA5, "LED register"); n_led++;
    btn_n = 4'b1010;
    repeat (3) @(posedge clk);
    pb_in(IP_BUTTONS, d);
    check(d == 8'h0A, "buttons"); n_button++;
    btn_n = 4'hF;
    lcd_base = lcd_writes;
    pb_out(OP_LCD_DATA, 8'h4F);
    pb_out(OP_LCD_CTRL, 8'h03);    // rs = 1, e = 1
    pb_out(OP_LCD_CTRL, 8'h01);    // e falls
    check(lcd_writes == lcd_base + 1 && lcd_last == 8'h4F && lcd_rs, "LCD write"); n_lcd++;

    // ---- debugger: LOAD VECTORS run ----
    begin
      int last;
      logic [31:0] vec, status_i;
      last = -1;
      for (int k = 0; k < 10; k++) begin
        if (last < 0) begin
          pb_out(OP_ADDR_VL, byte_t'(k));
          pb_out(OP_ADDR_VH, 8'h00);
          for (int b = 0; b < 4; b++) begin
            pb_in(IP_VEC1 + byte_t'(b), d);
            vec[31 - 8*b -: 8] = d;
            pb_out(OP_NEXT1 + byte_t'(b), d);   // becomes next output Nb
          end
          n_vec_read++;
          check(vec == VECS[k], $sformatf("vector %0d = %h", k, vec));
          pb_in(IP_VEC_FLAGS, d);
          if (d[0]) begin last = k; n_end_marker++; end
        end
        // STATUS
        for (int b = 0; b < 4; b++) begin
          pb_in(IP_TB_IN1 + byte_t'(b), d);
          status_i[31 - 8*b -: 8] = d;
        end
        check(status_i == EXP_I[k], $sformatf("status %05d: I = %h, expected %h", k, status_i, EXP_I[k]));
        check(tb_out == ((k == 0) ? 32'h0 : VECS[k - 1]), $sformatf("status %05d: O = %h", k, tb_out));
        // CLK OUTPUT: commit N1..N4
        pb_out(OP_CTRL, 8'h04);
        pb_out(OP_CTRL, 8'h00);
        n_commit++;
        check(tb_out == VECS[(k > 8) ? 8 : k], $sformatf("commit %0d", k));
      end
      check(last == 8, "end marker on the ninth vector");
    end

    // ---- UART: TX looped to RX ----
    begin
      automatic byte_t msg [4] = '{8'h4F, 8'h4B, 8'h0D, 8'h0A};
      foreach (msg[i]) begin pb_out(OP_UART_TX, msg[i]); n_uart_tx++; end
      foreach (msg[i]) begin
        int guard;
        guard = 0;
        do begin
          pb_in(IP_UART_STAT, d);
          guard++;
        end while (!d[0] && guard < 100000);
        pb_in(IP_UART_RX, d);          // read_strobe pops the queue
        check(d == msg[i], $sformatf("UART byte %0d = %h", i, d));
        n_uart_rx++;
      end
      repeat (3) @(posedge clk);
      pb_in(IP_UART_STAT, d);
      check(d[0] == 1'b0, "UART queue empty after reads");
    end

    // ---- UART queues: transmit queue full, receive queue overflow ----
    begin
      int guard;
      // 18 bytes in a burst: one goes straight into the shifter, 16 fill
      // the queue and the last is refused
      for (int i = 0; i < 18; i++) pb_out(OP_UART_TX, byte_t'(32'h30 + i));
      pb_in(IP_UART_STAT, d);
      check(d[4] && d[3], $sformatf("transmit queue full and half full, status %h", d));
      if (d[4]) n_tx_full++;
      // 17 frames arrive while nobody reads: the receive queue fills and
      // the 17th byte is lost
      guard = 0;
      do begin #100us; pb_in(IP_UART_STAT, d); guard++; end
      while ((d[4] || d[3] || !d[2]) && guard < 100);
      #600us;
      pb_in(IP_UART_STAT, d);
      check(d[2] && d[1] && d[0], $sformatf("receive queue full, status %h", d));
      if (d[2]) n_rx_overflow++;
      for (int i = 0; i < 16; i++) begin
        pb_in(IP_UART_RX, d);
        check(d == byte_t'(32'h30 + i), $sformatf("queued byte %0d = %h", i, d));
      end
      repeat (3) @(posedge clk);
      pb_in(IP_UART_STAT, d);
      check(d[0] == 1'b0, "receive queue empty, the overflowing byte was dropped");
    end

    // ---- SPI flash ----
    pb_out(OP_EEP_CTRL, 8'h02);        // select
    pb_out(OP_SPI_TX, 8'hD7);
    do pb_in(IP_SPI_STAT, d); while (d[0]);
    pb_out(OP_EEP_CTRL, 8'h03);
    pb_out(OP_EEP_CTRL, 8'h02);
    pb_out(OP_SPI_TX, 8'h00);
    do pb_in(IP_SPI_STAT, d); while (d[0]);
    pb_in(IP_SPI_RX, d);
    pb_out(OP_EEP_CTRL, 8'h03);
    check(d == 8'hD7 && fl_last == 8'h00, $sformatf("SPI echo %h", d));
    n_spi++;

    // ---- IR transmitter / receiver ----
    pb_out(OP_IR_CTRL, 8'h01);
    begin
      int guard;
      guard = 0;
      do begin pb_in(IP_IR_RX, d); guard++; end while (d[0] && guard < 20000);
      check(d[0] == 1'b0, "IR signal received");
      n_ir++;
    end
    #1ms;
    pb_out(OP_IR_CTRL, 8'h00);
    check(ir_pulses >= 16, $sformatf("IR pulses %0d", ir_pulses));

    // ---- user I/O: each virtual port drives the other low ----
    for (int dir = 0; dir < 2; dir++) begin
      for (int b = 0; b < 8; b++) pb_out(OP_UIO0 + byte_t'(b), 8'h00);
      pb_out(OP_UIO_DIR, byte_t'(dir != 0 ? 1 : 2));
      for (int b = 0; b < 4; b++) begin
        pb_in(IP_UIO0 + byte_t'(dir != 0 ? b + 4 : b), d);
        check(d == 8'h00, $sformatf("user I/O dir %0d byte %0d = %h", dir, b, d));
      end
      pb_out(OP_UIO_DIR, 8'h00);
      pb_in(IP_UIO0 + byte_t'(dir != 0 ? 4 : 0), d);
      check(d == 8'hFF, "user I/O released reads pull-up");
      n_uio++;
    end

    // ---- PS/2: each line drives the other low ----
    pb_out(OP_PS2, 8'h06);             // data driven low, clock released
    repeat (3) @(posedge clk);
    pb_in(IP_PS2, d);
    check(d[1:0] == 2'b00, "PS/2 data drives clock");
    pb_out(OP_PS2, 8'h09);             // clock driven low
    repeat (3) @(posedge clk);
    pb_in(IP_PS2, d);
    check(d[1:0] == 2'b00, "PS/2 clock drives data");
    pb_out(OP_PS2, 8'h03);
    repeat (3) @(posedge clk);
    pb_in(IP_PS2, d);
    check(d[1:0] == 2'b11, "PS/2 released");
    n_ps2++;

    // ---- SDRAM data bus: walking ones and zeros at address 0 ----
    pb_out(OP_SD_AL, 8'h00);
    for (int i = 0; i < 32; i++) begin
      logic [15:0] pat;
      byte_t lo, hi;
      pat = (i < 16) ? (16'h1 << i) : ~(16'h1 << (i - 16));
      pb_out(OP_SD_DQL, pat[7:0]);
      pb_out(OP_SD_DQH, pat[15:8]);
      pb_out(OP_SD_AH, 8'h40);                 // drive the data bus
      pb_out(OP_SD_CTRL, 8'b0001_0010);        // WRITE: cs ras=1 cas=0 we=0, cke
      pb_out(OP_SD_CTRL, 8'b0011_0010);        // SDRAM clock rises
      pb_out(OP_SD_CTRL, 8'b0001_1111);        // NOP, clock low
      pb_out(OP_SD_AH, 8'h00);                 // release the bus
      pb_in(IP_SD_DQL, lo);
      pb_in(IP_SD_DQH, hi);
      check({hi, lo} == pat, $sformatf("SDRAM pattern %h read %h", pat, {hi, lo}));
      n_sdram++;
    end

    // ---- SDRAM address bus: pseudo-random data at sampled addresses ----
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 48; i++) begin
        logic [13:0] ad;
        logic [15:0] pat;
        byte_t lo, hi;
        ad  = 14'(i * 14'd2731 + 14'd5);        // spans all banks and A11..A0
        pat = 16'(ad * 16'd40503 + 16'd77);
        pb_out(OP_SD_AL, ad[7:0]);
        if (pass == 0) begin
          pb_out(OP_SD_DQL, pat[7:0]);
          pb_out(OP_SD_DQH, pat[15:8]);
          pb_out(OP_SD_AH, {2'b01, ad[13:12], ad[11:8]});
          pb_out(OP_SD_CTRL, 8'b0001_0010);
          pb_out(OP_SD_CTRL, 8'b0011_0010);
          pb_out(OP_SD_CTRL, 8'b0001_1111);
        end else begin
          pb_out(OP_SD_AH, {2'b00, ad[13:12], ad[11:8]});
          pb_in(IP_SD_DQL, lo);
          pb_in(IP_SD_DQH, hi);
          check({hi, lo} == pat, $sformatf("SDRAM address %h read %h", ad, {hi, lo}));
          n_sdram_addr++;
        end
      end
    end

    // ---- every mechanism must have happened ----
    check(n_rom_switch > 0,   "program ROM switch");
    check(n_data_rom > 0,     "data ROM read");
    check(n_vec_read > 0,     "vector ROM read");
    check(n_end_marker > 0,   "vector end marker");
    check(n_commit > 0,       "testbench commit");
    check(n_multi_commit > 0, "simultaneous change of several outputs");
    check(n_uart_tx > 0 && n_uart_rx > 0, "UART transfer");
    check(n_tx_full > 0,      "UART transmit queue full");
    check(n_rx_overflow > 0,  "UART receive queue overflow");
    check(n_spi > 0,          "SPI transfer");
    check(n_ir > 0,           "IR burst");
    check(n_uio > 0,          "user I/O loop");
    check(n_ps2 > 0,          "PS/2 loop");
    check(n_sdram > 0,        "SDRAM data bus");
    check(n_sdram_addr > 0,   "SDRAM address bus");
    check(n_lcd > 0 && n_led > 0 && n_button > 0, "LCD, LEDs, buttons");
    $display("mechanisms: rom_switch=%0d data_rom=%0d vec_read=%0d end_marker=%0d commit=%0d multi_commit=%0d",
             n_rom_switch, n_data_rom, n_vec_read, n_end_marker, n_commit, n_multi_commit);
    $display("mechanisms: uart_tx_full=%0d uart_rx_overflow=%0d", n_tx_full, n_rx_overflow);
    $display("mechanisms: uart_tx=%0d uart_rx=%0d spi=%0d ir=%0d (pulses %0d) uio=%0d ps2=%0d sdram=%0d lcd=%0d",
             n_uart_tx, n_uart_rx, n_spi, n_ir, ir_pulses, n_uio, n_ps2, n_sdram, n_lcd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
