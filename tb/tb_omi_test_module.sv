// tb_omi_test_module: checks the example module with the four input
// vectors of the walk-through and then random traffic, against
// y = reg & c, reg <= load ? (a | b) : reg.
module tb_omi_test_module;
  import omi_pkg::*;
  logic clk = 0, rst = 0, load = 1;
  byte_t a = 0, b = 0, c = 0, y, or_sig, reg_ns, reg_ps, model;
  int checks = 0, failures = 0;

  omi_test_module dut (.clk, .rst, .load, .a, .b, .c, .y, .or_sig, .reg_ns, .reg_ps);

  initial begin
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check();
    checks++;
    if (or_sig !== (a | b) || reg_ns !== (load ? (a | b) : model) ||
        reg_ps !== model || y !== (model & c)) begin
      failures++;
      $display("a=%h b=%h c=%h load=%b: or=%h ns=%h ps=%h y=%h model=%h",
               a, b, c, load, or_sig, reg_ns, reg_ps, y, model);
    end
  endtask

  task automatic pulse();
    #5 clk = 1; if (load) model = a | b; #5 clk = 0; #1;
  endtask

  initial begin
    model = 0;
    #1 rst = 1; #2 rst = 0; #1;
    check();
    // walk-through inputs: expected y after each rising edge 00, 54, 14, 9C
    // appears on the following vector (see the debugger example)
    a = 8'h56; b = 8'h72; c = 8'hD5; #1; check(); pulse(); check();
    checks++; if (y !== 8'h54) failures++;
    a = 8'hDA; b = 8'h56; c = 8'h9D; #1; check();
    checks++; if (y !== 8'h14) failures++;
    pulse(); check();
    checks++; if (y !== 8'h9C) failures++;
    a = 8'hF0; b = 8'h0E; c = 8'h3F; #1; check();
    checks++; if (y !== 8'h1E) failures++;
    pulse(); check();
    checks++; if (y !== 8'h3E) failures++;
    for (int i = 0; i < 500; i++) begin
      a = byte_t'($urandom); b = byte_t'($urandom); c = byte_t'($urandom);
      load = $urandom % 2; #1; check();
      pulse(); check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
