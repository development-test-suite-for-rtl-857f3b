// omi_tb_reg: OMICRON testbench output register.
//
// One of the four registers that drive the tested module. It loads its
// input (the matching next-output register) on every clock edge while
// tb_strobe is high and holds otherwise, so that all four testbench
// outputs change on the same edge when the debugger commits. The reset
// to zero is this implementation's choice and matches the FPGA's
// power-up state.
module omi_tb_reg
  import omi_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  tb_strobe,
  input  byte_t d,
  output byte_t q
);

  always_ff @(posedge clk) begin
    if (rst)            q <= '0;
    else if (tb_strobe) q <= d;
  end

endmodule
