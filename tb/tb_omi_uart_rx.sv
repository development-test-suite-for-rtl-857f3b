// tb_omi_uart_rx: checks the receiver at 100 MHz / 38400 baud. A serial
// driver sends random 8N1 frames at the exact bit time of 26041 ns, one
// at 2 % slower, and one with a broken stop bit that must be dropped.
// Bytes are read back from the queue (look at dout, pop) and compared.
module tb_omi_uart_rx;
  import omi_pkg::*;
  logic clk = 0, rst = 1, rx = 1, pop = 0, en_16x;
  byte_t dout;
  logic present, half, full;
  byte_t sent [$];
  int checks = 0, failures = 0;

  omi_baud_gen #(.CLK_HZ(100_000_000), .BAUD(38_400)) u_baud (.clk, .rst, .en_16x);
  omi_uart_rx dut (.clk, .rst, .en_16x, .rx, .pop, .dout, .data_present(present),
                   .half_full(half), .full);

  always #5 clk = ~clk;

  initial begin
    #50ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(byte_t b, int bit_ns, bit good_stop);
    rx = 0; #(bit_ns);
    for (int i = 0; i < 8; i++) begin rx = b[i]; #(bit_ns); end
    rx = good_stop; #(bit_ns);
    rx = 1; #(bit_ns);
  endtask

  task automatic drain();
    while (sent.size() != 0) begin
      @(posedge clk); #1;
      checks++;
      if (!present) begin failures++; $display("queue empty, %0d missing", sent.size()); break; end
      if (dout !== sent[0]) begin failures++; $display("got %h exp %h", dout, sent[0]); end
      void'(sent.pop_front());
      pop = 1; @(posedge clk); #1; pop = 0;
    end
    @(posedge clk); #1;
    checks++; if (present) begin failures++; $display("extra byte %h", dout); end
  endtask

  initial begin
    repeat (3) @(posedge clk); #1; rst = 0;
    for (int i = 0; i < 10; i++) begin
      byte_t b; b = byte_t'($urandom); sent.push_back(b); send(b, 26041, 1);
    end
    checks++; if (!half) begin failures++; $display("half_full not set"); end
    drain();
    sent.push_back(8'hA7); send(8'hA7, 26562, 1);        // 2 % slow sender
    send(8'h3C, 26041, 0);                              // framing error: dropped
    sent.push_back(8'h00); send(8'h00, 26041, 1);
    drain();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
