// tb_omi_prog_mem: checks the three program ROMs and the instruction MUX.
// Each ROM is loaded with 64 words following
//   w(rom, a) = ((rom*0x1B3 + a*0x2F5 + (a>>3)*0x11) ^ (rom << 14)) mod 2^18;
// the test reads random addresses from random ROMs and expects the word
// one clock later. Addresses above 63 must read zero.
module tb_omi_prog_mem;
  import omi_pkg::*;
  logic clk = 0;
  logic [PADDR_W-1:0] addr = 0;
  rom_sel_e sel = ROM_MAIN;
  logic [INSTR_W-1:0] instr;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};

  omi_prog_mem #(
    .MAIN_INIT("tb/prog_main.hex"), .AUX_INIT("tb/prog_aux.hex"),
    .TB_INIT("tb/prog_tb.hex")
  ) dut (.clk, .address(addr), .rom_sel(sel), .instruction(instr));

  function automatic logic [17:0] w(int rom, int a);
    if (a > 63) return '0;
    return 18'(((rom*32'h1B3 + a*32'h2F5 + (a>>3)*32'h11) ^ (rom << 14)));
  endfunction

  always #5 clk = ~clk;

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int r, a;
      r = $urandom % 3;
      a = ($urandom % 4 == 0) ? 64 + $urandom % 960 : $urandom % 64;
      addr = PADDR_W'(a);
      sel = rom_sel_e'(r);
      @(posedge clk); #1;
      checks++; seen[r]++;
      if (instr !== w(r, a)) begin
        failures++; $display("rom %0d addr %0d got %h exp %h", r, a, instr, w(r, a));
      end
    end
    // ROM switch without a new address: same read data, other ROM
    addr = 10'd5; sel = ROM_MAIN; @(posedge clk); #1;
    sel = ROM_TB; #1;
    checks++; if (instr !== w(2, 5)) failures++;
    for (int r = 0; r < 3; r++) begin checks++; if (seen[r] == 0) failures++; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
