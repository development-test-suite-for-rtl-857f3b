// omi_out_reg: OMICRON data output register.
//
// An 8-bit register on the PicoBlaze output bus. It captures out_port on
// a rising clock edge only when port_id equals its own address PORT_ID
// and write_strobe is high; otherwise it keeps its value. This is the
// compare / AND / recirculating-MUX structure of the design description.
// The synchronous reset to RESET_VAL is this implementation's choice (the
// FPGA starts every register at zero).
//
// Timing: q changes on the clock edge that samples write_strobe = 1.
module omi_out_reg
  import omi_pkg::*;
#(
  parameter byte_t PORT_ID   = 8'h00,
  parameter byte_t RESET_VAL = 8'h00
) (
  input  logic  clk,
  input  logic  rst,
  input  byte_t port_id,
  input  logic  write_strobe,
  input  byte_t d,
  output byte_t q
);

  logic load;
  assign load = (port_id == PORT_ID) && write_strobe;

  always_ff @(posedge clk) begin
    if (rst)       q <= RESET_VAL;
    else if (load) q <= d;
  end

endmodule
