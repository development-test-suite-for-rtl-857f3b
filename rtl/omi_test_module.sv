// omi_test_module: the example module tested with the debugger.
//
// A small Mealy circuit used to show the hardware testbench flow. The
// byte inputs a and b are ORed into or_sig; when load is high the next
// register value reg_ns is or_sig, otherwise the register keeps reg_ps;
// the register loads reg_ns on the rising edge of clk; the output y is
// reg_ps ANDed with c. The circuit and its signal names follow the
// design description. In the debugger wiring, a, b, c come from
// tb_out2..tb_out4, load and clk from bits 1 and 0 of tb_out1, and
// or_sig, reg_ns, reg_ps, y go to tb_in1..tb_in4, so clk is a register
// bit that the debugger toggles one commit at a time.
// The asynchronous reset stands for the FPGA's power-up clear, which
// starts reg_ps at zero.
module omi_test_module
  import omi_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  load,
  input  byte_t a,
  input  byte_t b,
  input  byte_t c,
  output byte_t y,
  output byte_t or_sig,
  output byte_t reg_ns,
  output byte_t reg_ps
);

  assign or_sig = a | b;
  assign reg_ns = load ? or_sig : reg_ps;
  assign y      = reg_ps & c;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) reg_ps <= '0;
    else     reg_ps <= reg_ns;
  end

endmodule
