// tb_omi_clk_div: checks the IR carrier divider on a 607.6 kHz clock: the
// carrier period must be 16 input cycles (38 kHz), high for 6 of them
// (37.5 %), and period_end must mark the last cycle of each period.
module tb_omi_clk_div;
  logic clk_aux = 0, rst = 1, carrier, period_end;
  int checks = 0, failures = 0;

  omi_clk_div dut (.clk_aux, .rst, .carrier, .period_end);

  always #823 clk_aux = ~clk_aux;      // 1646 ns period = 607.5 kHz

  initial begin
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int high, pos;
    @(posedge clk_aux); #1; rst = 0;
    // after reset the count starts at 0: carrier high for cycles 0..5
    for (int p = 0; p < 100; p++) begin
      high = 0;
      for (pos = 0; pos < 16; pos++) begin
        checks++;
        if (carrier !== (pos < 6)) begin failures++; $display("period %0d pos %0d carrier %b", p, pos, carrier); end
        if (period_end !== (pos == 15)) begin failures++; $display("period_end at %0d", pos); end
        high += carrier;
        @(posedge clk_aux); #1;
      end
      checks++; if (high * 1000 / 16 != 375) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
