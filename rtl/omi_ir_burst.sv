// omi_ir_burst: burst modulator for the IR transmitter test.
//
// While enable is high the IR LED is driven with the 38 kHz carrier in
// bursts of BURST (16) carrier periods, each followed by GAP carrier
// periods of silence, over and over. The program then checks the
// receiver at chosen points to see that the burst came back. Bursts of
// 16 periods follow the design description; the gap length (16 periods)
// and the restart at a period boundary are this implementation's
// choices. enable comes from an output register in the system clock
// domain and is synchronized here; everything else runs on clk_aux.
// ir_tx drives the gate of the LED's FET, active high.
module omi_ir_burst #(
  parameter int unsigned BURST = 16,
  parameter int unsigned GAP   = 16
) (
  input  logic clk_aux,
  input  logic rst,
  input  logic enable,      // from the system clock domain
  input  logic carrier,
  input  logic period_end,
  output logic ir_tx
);

  localparam int unsigned CW = $clog2(BURST + GAP);

  logic          en_s;
  logic          running;
  logic [CW-1:0] period_cnt;

  omi_sync #(.W(1)) u_sync (.clk(clk_aux), .rst, .d(enable), .q(en_s));

  always_ff @(posedge clk_aux) begin
    if (rst) begin
      running    <= 1'b0;
      period_cnt <= '0;
    end else if (period_end) begin
      running <= en_s;
      if (!en_s || period_cnt == CW'(BURST + GAP - 1)) period_cnt <= '0;
      else if (running) period_cnt <= period_cnt + 1'b1;
    end
  end

  assign ir_tx = running && (period_cnt < CW'(BURST)) && carrier;

endmodule
