// tb_omi_vector_rom: checks the vector ROM with its default contents, the
// nine vectors of the debugger walk-through, with the end marker on the
// ninth; addresses past the last vector read zero. At the default of 128
// chained ROMs, words written into far ROMs (up to address FFFF) must come
// back from exactly their address. A second instance with two ROMs checks
// that addresses past its last ROM read zero.
module tb_omi_vector_rom;
  import omi_pkg::*;
  logic clk = 0;
  logic [15:0] addr = 0;
  logic [35:0] data, data2;
  int checks = 0, failures = 0;

  localparam logic [35:0] EXP [9] = '{
    36'h002000000, 36'h003000000, 36'h0025672D5, 36'h0035672D5,
    36'h002DA569D, 36'h003DA569D, 36'h002F00E3F, 36'h003F00E3F,
    36'h102F00E3F };

  omi_vector_rom dut (.clk, .address(addr), .data);
  omi_vector_rom #(.NUM_ROMS(2)) dut2 (.clk, .address(addr), .data(data2));

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int n;
    logic done;
    n = 0;
    done = 1'b0;
    // walk the list the way the debugger does: until the marker
    while (!done && n < 512) begin
      addr = 16'(n);
      @(posedge clk); #1;
      checks++;
      if (n < 9 && (data !== EXP[n] || data2 !== EXP[n])) begin
        failures++; $display("vec %0d got %h exp %h", n, data, EXP[n]);
      end
      done = data[32];
      n = n + 1;
    end
    checks++;
    if (n != 9) begin failures++; $display("list length %0d", n); end
    foreach (addr_list[i]) begin
      addr = addr_list[i];
      @(posedge clk); #1;
      checks++;
      if (data !== '0 || data2 !== '0) begin failures++; $display("addr %h not zero", addr); end
    end
    // far ROMs of the default instance: word = f(address)
    foreach (far[i]) dut.rom[far[i]] = {4'h0, 16'hA5C3, far[i]};
    dut2.rom[512 + 7] = 36'h0_1234_5678;
    foreach (far[i]) begin
      addr = far[i];
      @(posedge clk); #1;
      checks++;
      if (data !== {4'h0, 16'hA5C3, far[i]}) begin failures++; $display("far %h got %h", addr, data); end
      addr = far[i] ^ 16'h0200;        // neighbouring ROM, same word
      @(posedge clk); #1;
      checks++;
      if (data === {4'h0, 16'hA5C3, far[i]}) begin failures++; $display("ROM select ignored at %h", addr); end
    end
    addr = 16'd519;
    @(posedge clk); #1;
    checks++;
    if (data2 !== 36'h0_1234_5678) begin failures++; $display("second ROM of dut2 got %h", data2); end
    addr = 16'd1024 + 16'd7;
    @(posedge clk); #1;
    checks++;
    if (data2 !== '0) begin failures++; $display("past two ROMs got %h", data2); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] far [5] = '{16'd512, 16'd4660, 16'd33333, 16'hFE01, 16'hFFFF};

  logic [15:0] addr_list [4] = '{16'd9, 16'd511, 16'd512, 16'hFFFF};
endmodule
