// tb_omi_spi_master: checks the SPI master against a mode-3 slave model
// written from the SPI rules: the slave shifts MOSI in on rising SCLK
// and presents its next MISO bit after falling SCLK, MSB first. Random
// bytes are exchanged both ways; SCLK must idle high, have a period of
// 8 clocks (12.5 MHz at 100 MHz) and busy must last 8 * 8 = 64 clocks.
module tb_omi_spi_master;
  import omi_pkg::*;
  logic clk = 0, rst = 1, start = 0, busy, sclk, mosi, miso;
  byte_t tx_data = 0, rx_data;
  byte_t slave_in, slave_out;
  int bit_cnt;
  int checks = 0, failures = 0;
  longint last_rise, period_ns;

  omi_spi_master dut (.clk, .rst, .start, .tx_data, .rx_data, .busy, .sclk, .mosi, .miso);

  always #5 clk = ~clk;

  // slave model
  always @(posedge sclk) begin
    slave_in = {slave_in[6:0], mosi};
    if (last_rise != 0) period_ns = $time - last_rise;
    last_rise = $time;
  end
  always @(negedge sclk) begin
    miso = slave_out[7 - bit_cnt];
    bit_cnt++;
  end

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    miso = 1; last_rise = 0;
    repeat (2) @(posedge clk); #1; rst = 0;
    @(posedge clk); #1;
    checks++; if (sclk !== 1'b1 || busy) failures++;
    for (int i = 0; i < 50; i++) begin
      int cycles;
      tx_data = byte_t'($urandom);
      slave_out = byte_t'($urandom);
      slave_in = 0; bit_cnt = 0; last_rise = 0;
      start = 1; @(posedge clk); #1; start = 0; tx_data = ~tx_data;
      cycles = 1;
      while (busy) begin @(posedge clk); #1; cycles++; end
      checks += 4;
      if (cycles != 65) begin failures++; $display("busy for %0d clocks", cycles - 1); end
      if (slave_in !== ~tx_data) begin failures++; $display("slave got %h exp %h", slave_in, ~tx_data); end
      if (rx_data !== slave_out) begin failures++; $display("master got %h exp %h", rx_data, slave_out); end
      if (period_ns != 80 || sclk !== 1'b1) begin failures++; $display("sclk period %0d", period_ns); end
      // a start while busy must be ignored
      if (i == 10) begin
        slave_in = 0; bit_cnt = 0; tx_data = 8'hC3;
        start = 1; @(posedge clk); #1; start = 0;
        repeat (3) @(posedge clk); #1;
        start = 1; tx_data = 8'h00; @(posedge clk); #1; start = 0;
        while (busy) @(posedge clk);
        #1;
        checks++;
        if (bit_cnt != 8 || slave_in !== 8'hC3) begin
          failures++; $display("restart while busy: %0d bits, %h", bit_cnt, slave_in);
        end
      end
      repeat ($urandom % 5) @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
