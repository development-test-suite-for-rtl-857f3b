// tb_omi_fifo: checks the 16-byte FIFO against a queue model under random
// push and pop traffic, including pushes when full and pops when empty,
// and checks the data_present, half_full and full flags.
module tb_omi_fifo;
  import omi_pkg::*;
  logic clk = 0, rst = 1, push = 0, pop = 0;
  byte_t din = 0, dout;
  logic present, half, full;
  byte_t model [$];
  int checks = 0, failures = 0, n_full = 0, n_empty_pop = 0;

  omi_fifo dut (.clk, .rst, .push, .din, .pop, .dout,
                .data_present(present), .half_full(half), .full);

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 4000; i++) begin
      int bias;
      bias = (i / 500) % 2;           // phases that fill and that drain
      push = ($urandom % 4) < (bias ? 3 : 1);
      pop  = ($urandom % 4) < (bias ? 1 : 3);
      din  = byte_t'($urandom);
      #1;
      checks++;
      if (present !== (model.size() != 0) || full !== (model.size() == 16) ||
          half !== (model.size() >= 8)) begin
        failures++; $display("flags wrong at size %0d", model.size());
      end
      if (model.size() != 0) begin
        checks++;
        if (dout !== model[0]) begin failures++; $display("head %h exp %h", dout, model[0]); end
      end
      if (model.size() == 16 && push) n_full++;
      if (model.size() == 0 && pop) n_empty_pop++;
      begin
        bit can_push, can_pop;
        can_push = model.size() < 16;
        can_pop  = model.size() != 0;
        @(posedge clk);
        if (pop && can_pop) void'(model.pop_front());
        if (push && can_push) model.push_back(din);
      end
      #1;
    end
    checks++; if (n_full == 0 || n_empty_pop == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
