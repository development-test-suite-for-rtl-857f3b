// omi_clk_div: IR carrier generator.
//
// Divides the auxiliary oscillator clock (607.6 kHz with its jumper in
// the middle position) by DIV = 16 to make the 38 kHz carrier the IR
// receiver is tuned to. The output is high for HIGH = 6 of every 16
// input cycles, a 37.5 % duty cycle; period_end pulses for one input
// cycle at the last count of each carrier period so that the burst logic
// can count periods. Division by 16 and the 38 kHz target follow the
// design description. The design gives 37.5 % as the duty cycle of the
// pulsed IR signal; putting it into the carrier (6 of 16 counts) is this
// implementation's reading.
//
// Runs entirely in the auxiliary clock domain; rst must be synchronous to
// clk_aux.
module omi_clk_div #(
  parameter int unsigned DIV  = 16,
  parameter int unsigned HIGH = 6
) (
  input  logic clk_aux,
  input  logic rst,
  output logic carrier,
  output logic period_end
);

  localparam int unsigned CW = $clog2(DIV);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk_aux) begin
    if (rst) cnt <= '0;
    else if (cnt == CW'(DIV - 1)) cnt <= '0;
    else cnt <= cnt + 1'b1;
  end

  assign carrier    = cnt < CW'(HIGH);
  assign period_end = cnt == CW'(DIV - 1);

endmodule
