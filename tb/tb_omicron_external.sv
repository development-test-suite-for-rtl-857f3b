// tb_omicron_external: the debugger driving a circuit outside the core,
// e.g. on a daughterboard. omicron_top is built with USE_EXAMPLE_MODULE = 0,
// so I1..I4 come from the tb_in_ext port. The external circuit modelled
// here is combinational: I1 = O2 + O3, I2 = O2 ^ O4, I3 = O1, I4 = ~O4.
// For 200 random vectors the testbench writes N1..N4, checks that O1..O4
// keep their old values until the tb_strobe commit, commits, and checks
// O1..O4 and the returned I1..I4. It also checks that the fourth ROM
// select code falls back to the main program ROM.
module tb_omicron_external;
  import omi_pkg::*;

  logic clk = 0, clk_aux = 0, rst = 1;
  always #5 clk = ~clk;
  always #823 clk_aux = ~clk_aux;

  byte_t pb_port_id = '0, pb_out_port = '0, pb_in_port;
  logic  pb_write_strobe = 0, pb_read_strobe = 0;
  logic [PADDR_W-1:0] pb_address = '0;
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
  logic [31:0] tb_out, tb_in_ext;

  // external circuit under test
  always_comb begin
    tb_in_ext[31:24] = tb_out[23:16] + tb_out[15:8];
    tb_in_ext[23:16] = tb_out[23:16] ^ tb_out[7:0];
    tb_in_ext[15:8]  = tb_out[31:24];
    tb_in_ext[7:0]   = ~tb_out[7:0];
  end

  omicron_top #(.USE_EXAMPLE_MODULE(1'b0)) dut (
    .clk, .rst, .clk_aux,
    .pb_address, .pb_instruction, .pb_port_id, .pb_out_port,
    .pb_write_strobe, .pb_read_strobe, .pb_in_port,
    .led, .btn_n(4'hF), .lcd_rs, .lcd_e, .lcd_d,
    .uart_txd, .uart_rxd(uart_txd),
    .ps2_out, .ps2_oe, .ps2_in(2'b11),
    .ir_tx, .ir_rx(1'b1),
    .eep_sclk, .eep_si, .eep_so(1'b1), .eep_cs_n, .eep_reset_n,
    .uio_out, .uio_oe, .uio_in(64'hFFFF_FFFF_FFFF_FFFF),
    .sd_dq_out, .sd_dq_oe, .sd_dq_in(16'h0), .sd_a, .sd_ba,
    .sd_cs_n, .sd_ras_n, .sd_cas_n, .sd_we_n, .sd_cke, .sd_clk, .sd_dqml, .sd_dqmh,
    .tb_out, .tb_in_ext
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

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

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte_t d;
    logic [31:0] o_prev, o_new, i_read, i_exp;
    dut.u_prog_mem.rom_main[10] = 18'h2AB5C;
    dut.u_prog_mem.rom_aux[10]  = 18'h11111;
    repeat (4) @(posedge clk); #1;
    rst = 0;

    // select code 3 reads the main ROM
    pb_out(OP_CTRL, 8'h03);
    pb_address = 10'd10;
    @(posedge clk); #1;
    check(pb_instruction == 18'h2AB5C, $sformatf("select 3 gives %h", pb_instruction));
    pb_out(OP_CTRL, 8'h00);

    o_prev = '0;
    for (int n = 0; n < 200; n++) begin
      o_new = $urandom;
      for (int b = 0; b < 4; b++) pb_out(OP_NEXT1 + byte_t'(b), o_new[31 - 8*b -: 8]);
      check(tb_out == o_prev, $sformatf("outputs changed before commit: %h", tb_out));
      pb_out(OP_CTRL, 8'h04);
      pb_out(OP_CTRL, 8'h00);
      check(tb_out == o_new, $sformatf("committed %h, expected %h", tb_out, o_new));
      for (int b = 0; b < 4; b++) begin
        pb_in(IP_TB_IN1 + byte_t'(b), d);
        i_read[31 - 8*b -: 8] = d;
      end
      i_exp = {o_new[23:16] + o_new[15:8], o_new[23:16] ^ o_new[7:0], o_new[31:24], ~o_new[7:0]};
      check(i_read == i_exp, $sformatf("I = %h, expected %h", i_read, i_exp));
      o_prev = o_new;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
