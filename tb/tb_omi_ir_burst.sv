// tb_omi_ir_burst: checks the IR burst modulator driven by the carrier
// divider. While enabled, the transmitter must show bursts of exactly
// 16 carrier pulses, each followed by a 16-period silence; disabled, it
// must stay low.
module tb_omi_ir_burst;
  logic clk_aux = 0, rst = 1, enable = 0, carrier, period_end, ir_tx;
  int checks = 0, failures = 0, pulses = 0, bursts = 0;
  longint last_pulse;

  omi_clk_div u_div (.clk_aux, .rst, .carrier, .period_end);
  omi_ir_burst dut (.clk_aux, .rst, .enable, .carrier, .period_end, .ir_tx);

  always #823 clk_aux = ~clk_aux;
  localparam longint PERIOD_NS = 16 * 1646;

  initial begin
    #100ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // pulse counter: a gap longer than 2 carrier periods ends a burst
  always @(posedge ir_tx) begin
    if (pulses != 0 && $time - last_pulse > 2 * PERIOD_NS) begin
      checks++; bursts++;
      if (pulses != 16) begin failures++; $display("burst of %0d pulses", pulses); end
      checks++;
      if ($time - last_pulse != 17 * PERIOD_NS) begin
        failures++; $display("gap %0d ns", $time - last_pulse);
      end
      pulses = 0;
    end
    // pulses inside a burst are one carrier period apart
    if (pulses != 0 && $time - last_pulse <= 2 * PERIOD_NS) begin
      checks++;
      if ($time - last_pulse != PERIOD_NS) begin failures++; $display("pulse spacing"); end
    end
    pulses++;
    last_pulse = $time;
  end

  // the carrier high time inside a burst is 6 input cycles
  always @(negedge ir_tx) begin
    checks++;
    if ($time - last_pulse != 6 * 1646) begin failures++; $display("pulse width %0d", $time - last_pulse); end
  end

  initial begin
    repeat (4) @(posedge clk_aux); #1; rst = 0;
    repeat (200) @(posedge clk_aux);
    checks++; if (pulses != 0) failures++;
    enable = 1;
    #(PERIOD_NS * 32 * 6);
    enable = 0;
    #(PERIOD_NS * 40);
    checks++; if (bursts < 4) begin failures++; $display("only %0d bursts", bursts); end
    begin
      int n_before;
      n_before = pulses;
      #(PERIOD_NS * 40);
      checks++; if (pulses != n_before) begin failures++; $display("pulses while disabled"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
