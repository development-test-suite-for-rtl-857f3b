// omi_data_rom: OMICRON data ROM.
//
// A 2048 x 8 read-only memory that holds the text OMICRON prints: a
// vocabulary of compressed syllables in the first 256 bytes, the rest free
// for user data. The program sets the 11-bit address through two output
// registers and reads the byte through the input multiplexer. Size and
// use follow the design description; the synchronous read (data valid
// one clock after the address) is this implementation's choice, as for a
// block RAM. Contents come from the hex file INIT (one byte per line);
// an empty name leaves the ROM at zero.
module omi_data_rom
  import omi_pkg::*;
#(
  parameter int unsigned DEPTH = 2048,
  parameter string       INIT  = ""
) (
  input  logic                     clk,
  input  logic [$clog2(DEPTH)-1:0] address,
  output byte_t                    data
);

  byte_t rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) rom[i] = '0;
    if (INIT != "") $readmemh(INIT, rom);
  end

  always_ff @(posedge clk) data <= rom[address];

endmodule
