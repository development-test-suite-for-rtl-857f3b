// tb_omicron_longrun: the longest continuous debugger run the core
// supports, 65536 vectors from all 128 chained vector ROMs, at the
// default parameters of omicron_top.
//
// The vector ROMs are filled with pseudo-random vectors for the built-in
// example module, generated in pairs so that A, B, C and load are steady
// around each rising clock bit: vector 2p has O1 = {load, 0}, vector 2p+1
// the same with O1 bit 0 set. Only the very last vector carries the end
// marker. The testbench plays the test program's LOAD VECTORS loop over
// the PicoBlaze bus (vector to N1..N4, report I1..I4, commit with
// tb_strobe) until it sees the marker, and compares every report with a
// reference model of the module:
//   I1 = A | B, I2 = load ? A | B : reg, I3 = reg, I4 = reg & C,
// where reg takes A | B on a clock bit rising with load set.
module tb_omicron_longrun;
  import omi_pkg::*;

  localparam int NVEC = 65536;

  logic clk = 0, clk_aux = 0, rst = 0;
  always #5 clk = ~clk;
  always #823 clk_aux = ~clk_aux;

  byte_t pb_port_id = '0, pb_out_port = '0, pb_in_port;
  logic  pb_write_strobe = 0, pb_read_strobe = 0;
  logic [INSTR_W-1:0] pb_instruction;
  byte_t led, lcd_d;
  logic lcd_rs, lcd_e, uart_txd, ir_tx;
  logic [1:0] ps2_out, ps2_oe;
  logic eep_sclk, eep_si, eep_cs_n, eep_reset_n;
  logic [63:0] uio_out, uio_oe;
  logic [15:0] sd_dq_out;
  logic sd_dq_oe;
  logic [11:0] sd_a;
  logic [1:0] sd_ba;
  logic sd_cs_n, sd_ras_n, sd_cas_n, sd_we_n, sd_cke, sd_clk, sd_dqml, sd_dqmh;
  logic [31:0] tb_out;

  omicron_top dut (
    .clk, .rst, .clk_aux,
    .pb_address(10'd0), .pb_instruction, .pb_port_id, .pb_out_port,
    .pb_write_strobe, .pb_read_strobe, .pb_in_port,
    .led, .btn_n(4'hF), .lcd_rs, .lcd_e, .lcd_d,
    .uart_txd, .uart_rxd(uart_txd),
    .ps2_out, .ps2_oe, .ps2_in(2'b11),
    .ir_tx, .ir_rx(1'b1),
    .eep_sclk, .eep_si, .eep_so(1'b1), .eep_cs_n, .eep_reset_n,
    .uio_out, .uio_oe, .uio_in(64'hFFFF_FFFF_FFFF_FFFF),
    .sd_dq_out, .sd_dq_oe, .sd_dq_in(16'h0), .sd_a, .sd_ba,
    .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_cke, .sd_clk, .sd_dqml, .sd_dqmh,
    .tb_out, .tb_in_ext(32'h0)
  );

  int checks = 0, failures = 0;

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

  // vector p-th pair from a fixed 32-bit LCG
  function automatic logic [31:0] pair_word(int p);
    logic [31:0] x;
    x = 32'(p) * 32'd1664525 + 32'd1013904223;
    x = x ^ (x >> 13);
    x = x * 32'd22695477 + 32'd1;
    return x;
  endfunction

  function automatic logic [35:0] vec_word(int k);
    logic [31:0] r;
    logic load;
    r = pair_word(k / 2);
    load = r[31] | r[30];                // load high three times in four
    return {3'b0, k == NVEC - 1, 6'b0, load, 1'(k % 2), r[23:0]};
  endfunction

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t d;
    logic [31:0] o_model, n_word, i_read, i_exp;
    byte_t reg_model;
    int k, status_n, markers;
    logic last_seen;

    for (int i = 0; i < NVEC; i++) dut.u_vector_rom.rom[i] = vec_word(i);

    #1 rst = 1;
    repeat (4) @(posedge clk); #1;
    rst = 0;

    o_model = '0; reg_model = '0; markers = 0; status_n = 0;
    last_seen = 0;
    k = 0;
    while (status_n <= NVEC) begin
      if (!last_seen) begin
        pb_out(OP_ADDR_VL, byte_t'(k));
        if (k % 256 == 0) pb_out(OP_ADDR_VH, byte_t'(k >> 8));
        for (int b = 0; b < 4; b++) begin
          pb_in(IP_VEC1 + byte_t'(b), d);
          n_word[31 - 8*b -: 8] = d;
          pb_out(OP_NEXT1 + byte_t'(b), d);
        end
        pb_in(IP_VEC_FLAGS, d);
        if (d[0]) begin last_seen = 1; markers++; end
        checks++;
        if (n_word != vec_word(k)[31:0] || d[0] != (k == NVEC - 1)) begin
          failures++;
          if (failures < 10) $display("vector %0d read %h flags %h", k, n_word, d);
        end
      end
      // STATUS
      for (int b = 0; b < 4; b++) begin
        pb_in(IP_TB_IN1 + byte_t'(b), d);
        i_read[31 - 8*b -: 8] = d;
      end
      i_exp[31:24] = o_model[23:16] | o_model[15:8];
      i_exp[23:16] = o_model[25] ? i_exp[31:24] : reg_model;
      i_exp[15:8]  = reg_model;
      i_exp[7:0]   = reg_model & o_model[7:0];
      checks++;
      if (i_read != i_exp || tb_out != o_model) begin
        failures++;
        if (failures < 10)
          $display("status %05d: O %h (exp %h) I %h (exp %h)", status_n, tb_out, o_model, i_read, i_exp);
      end
      status_n++;
      // CLK OUTPUT
      pb_out(OP_CTRL, 8'h04);
      pb_out(OP_CTRL, 8'h00);
      if (n_word[24] && !o_model[24] && n_word[25]) reg_model = n_word[23:16] | n_word[15:8];
      o_model = n_word;
      k++;
    end
    checks++;
    if (markers != 1 || k != NVEC + 1) begin
      failures++;
      $display("markers %0d, vectors %0d", markers, k);
    end
    $display("vectors applied %0d, status reports %0d", NVEC, status_n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
