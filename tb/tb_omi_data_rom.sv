// tb_omi_data_rom: checks the 2048-byte data ROM. The first 256 bytes are
// loaded with (37*a + 11) mod 256, the rest must read zero; data is
// expected one clock after the address.
module tb_omi_data_rom;
  import omi_pkg::*;
  logic clk = 0;
  logic [10:0] addr = 0;
  byte_t data;
  int checks = 0, failures = 0;

  omi_data_rom #(.INIT("tb/data_rom_test.hex")) dut (.clk, .address(addr), .data);

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 2048; a += ((a < 256) ? 1 : 7)) begin
      byte_t exp;
      addr = 11'(a);
      exp = (a < 256) ? byte_t'(37 * a + 11) : 8'h00;
      @(posedge clk); #1;
      checks++;
      if (data !== exp) begin failures++; $display("addr %0d got %h exp %h", a, data, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
