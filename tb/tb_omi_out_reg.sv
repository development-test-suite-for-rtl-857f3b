// tb_omi_out_reg: checks the data output register. Random bus traffic is
// applied; a reference model updates only when port_id matches and
// write_strobe is high, and q is compared after every clock.
module tb_omi_out_reg;
  import omi_pkg::*;
  logic clk = 0, rst = 1, ws = 0;
  byte_t pid = 0, d = 0, q, model;
  int checks = 0, failures = 0, hits = 0;
  localparam byte_t ID = 8'h2B;

  omi_out_reg #(.PORT_ID(ID), .RESET_VAL(8'h5A)) dut (
    .clk, .rst, .port_id(pid), .write_strobe(ws), .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1;
    @(posedge clk); #1;
    checks++; if (q !== 8'h5A) begin failures++; $display("reset value %h", q); end
    rst = 0; model = 8'h5A;
    for (int i = 0; i < 2000; i++) begin
      pid = ($urandom % 4 == 0) ? ID : byte_t'($urandom);
      ws  = $urandom % 2;
      d   = byte_t'($urandom);
      @(posedge clk); #1;
      if (pid == ID && ws) begin model = d; hits++; end
      checks++;
      if (q !== model) begin failures++; $display("mismatch q=%h exp=%h", q, model); end
    end
    checks++; if (hits < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
