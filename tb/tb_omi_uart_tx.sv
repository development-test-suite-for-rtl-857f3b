// tb_omi_uart_tx: checks the transmitter at 100 MHz / 38400 baud. Bytes
// are queued in bursts (up to the 16-byte buffer); a line monitor that
// knows nothing of the design decodes each frame: start bit 0, eight
// data bits LSB first, stop bit 1, and measures the bit time, which must
// be 16 * 163 = 2608 clocks (the 16x enable period is rounded from
// 100e6 / (16 * 38400) = 162.8).
module tb_omi_uart_tx;
  import omi_pkg::*;
  logic clk = 0, rst = 1, push = 0, en_16x, tx, busy, half, full;
  byte_t din = 0;
  byte_t sent [$];
  int checks = 0, failures = 0, frames = 0;
  localparam int BIT_CLKS = 2608;

  omi_baud_gen #(.CLK_HZ(100_000_000), .BAUD(38_400)) u_baud (.clk, .rst, .en_16x);
  omi_uart_tx dut (.clk, .rst, .en_16x, .push, .din, .tx, .busy, .half_full(half), .full);

  always #5 clk = ~clk;

  initial begin
    #20ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // line monitor: samples each bit at its middle, measured from the
  // falling edge of the start bit
  localparam longint BIT_NS = BIT_CLKS * 10;
  initial begin
    longint t0;
    bit chained;
    byte_t b;
    chained = 0;
    wait (rst == 1'b0);
    forever begin
      if (!chained) begin
        wait (tx === 1'b0);
        t0 = $time;
      end
      #(t0 + BIT_NS / 2 - $time);
      checks++; if (tx !== 1'b0) begin failures++; $display("bad start bit"); end
      for (int i = 0; i < 8; i++) begin
        #(BIT_NS);
        b[i] = tx;
      end
      #(BIT_NS);
      checks++; if (tx !== 1'b1) begin failures++; $display("bad stop bit"); end
      frames++;
      checks++;
      if (sent.size() == 0 || b !== sent[0]) begin
        failures++; $display("frame %h, expected %h", b, sent.size() ? sent[0] : 8'hxx);
      end
      if (sent.size() != 0) void'(sent.pop_front());
      #(t0 + 10 * BIT_NS - 10 - $time);
      checks++; if (tx !== 1'b1) begin failures++; $display("stop bit too short"); end
      #20;
      // a queued byte starts exactly 10 bit times after the last start
      chained = busy;
      if (chained) begin
        checks++;
        if (tx !== 1'b0) begin failures++; $display("next frame not back to back at %0t", $time); end
        t0 = t0 + 10 * BIT_NS;
      end
    end
  end

  task automatic queue_byte(byte_t b);
    din = b; push = 1; sent.push_back(b);
    @(posedge clk); #1; push = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); #1; rst = 0;
    checks++; if (tx !== 1'b1 || busy) failures++;
    for (int i = 0; i < 12; i++) queue_byte(byte_t'($urandom));
    checks++; if (!half || full) begin failures++; $display("flags after 12 pushes"); end
    wait (!busy);
    queue_byte(8'h55); queue_byte(8'h00); queue_byte(8'hFF);
    wait (!busy);
    #(BIT_CLKS * 20);
    checks++; if (frames != 15) begin failures++; $display("frames %0d", frames); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
