// omi_vector_rom: testbench vector ROMs of the OMICRON debugger.
//
// Each vector ROM is a 512 x 36 block RAM. Bits [31:0] of a word are one
// cycle of testbench outputs, most significant byte for tb_out1, then
// tb_out2, tb_out3 and tb_out4. The four upper bits are flags; bit 32 set
// marks the last stored vector, so the program knows where the list ends.
// NUM_ROMS ROMs (at most 128, i.e. 65536 vectors) are chained: the low 9
// bits of the 16-bit vector address pick the word and the upper 7 bits
// the ROM. The word size, per-ROM depth, byte order, chaining limit and
// the end marker follow the design description; the placement of the
// marker in bit 32 of the last word is this implementation's reading of
// it. Read is synchronous (one clock).
//
// The default contents, vector_rom_example.hex, are the nine vectors of
// the walk-through example (a Mealy module driven by tb_out1..tb_out4).
module omi_vector_rom
  import omi_pkg::*;
#(
  parameter int unsigned NUM_ROMS = 128,
  parameter string       INIT     = "rtl/vector_rom_example.hex"
) (
  input  logic              clk,
  input  logic [15:0]       address,
  output logic [VEC_W-1:0]  data
);

  localparam int unsigned DEPTH = NUM_ROMS * (2 ** VEC_AW);
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [VEC_W-1:0] rom [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) rom[i] = '0;
    if (INIT != "") $readmemh(INIT, rom);
  end

  // Addresses beyond the fitted ROMs read as zero (no end marker).
  logic in_range;
  assign in_range = 32'(address) < DEPTH;

  always_ff @(posedge clk) begin
    if (in_range) data <= rom[address[AW-1:0]];
    else          data <= '0;
  end

endmodule
