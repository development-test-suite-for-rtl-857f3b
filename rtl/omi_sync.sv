// omi_sync: two-flop synchronizer for signals from another clock domain
// or from pins (buttons, serial and IR receive lines, PS/2 and user I/O).
// q follows d two clocks later. Parameter W sets the width; RESET_VAL is
// the value held during reset. The whole module is this implementation's
// choice: the design description does not cover metastability.
module omi_sync #(
  parameter int unsigned W         = 1,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] meta;

  always_ff @(posedge clk) begin
    if (rst) begin
      meta <= RESET_VAL;
      q    <= RESET_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end

endmodule
