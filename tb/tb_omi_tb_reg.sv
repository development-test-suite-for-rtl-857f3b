// tb_omi_tb_reg: checks the testbench output register: it follows d
// only on clocks where tb_strobe is high and holds otherwise.
module tb_omi_tb_reg;
  import omi_pkg::*;
  logic clk = 0, rst = 1, st = 0;
  byte_t d = 0, q, model;
  int checks = 0, failures = 0;

  omi_tb_reg dut (.clk, .rst, .tb_strobe(st), .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    d = 8'hA5;
    @(posedge clk); #1;
    checks++; if (q !== 8'h00) failures++;
    rst = 0; model = 0;
    for (int i = 0; i < 2000; i++) begin
      st = ($urandom % 3 == 0);
      d  = byte_t'($urandom);
      @(posedge clk); #1;
      if (st) model = d;
      checks++;
      if (q !== model) begin failures++; $display("mismatch q=%h exp=%h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
