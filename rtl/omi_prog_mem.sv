// omi_prog_mem: the three OMICRON program ROMs and the instruction MUX.
//
// The OMICRON program is larger than the 1024 instructions one PicoBlaze
// program ROM holds, so it is split over a main, an auxiliary and a
// testbench ROM, each 1024 x 18 bits. All three are read at the same
// 10-bit address; a multiplexer driven by the rom_sel field of the control
// register picks which one feeds the core, so the program can switch ROMs
// while it runs. The ROM sizes and the MUX follow the design description;
// the encoding of rom_sel (0 main, 1 auxiliary, 2 testbench, 3 reads as
// main) is this implementation's choice.
//
// Each ROM reads synchronously, as a block RAM does: instruction is valid
// one clock after address. Contents come from hex files named by the
// *_INIT parameters ($readmemh, one 18-bit word per line); an empty name
// leaves the ROM at zero.
module omi_prog_mem
  import omi_pkg::*;
#(
  parameter int unsigned DEPTH     = 1024,
  parameter string       MAIN_INIT = "",
  parameter string       AUX_INIT  = "",
  parameter string       TB_INIT   = ""
) (
  input  logic                 clk,
  input  logic [PADDR_W-1:0]   address,
  input  rom_sel_e             rom_sel,
  output logic [INSTR_W-1:0]   instruction
);

  logic [INSTR_W-1:0] rom_main [DEPTH];
  logic [INSTR_W-1:0] rom_aux  [DEPTH];
  logic [INSTR_W-1:0] rom_tb   [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) begin
      rom_main[i] = '0;
      rom_aux[i]  = '0;
      rom_tb[i]   = '0;
    end
    if (MAIN_INIT != "") $readmemh(MAIN_INIT, rom_main);
    if (AUX_INIT  != "") $readmemh(AUX_INIT,  rom_aux);
    if (TB_INIT   != "") $readmemh(TB_INIT,   rom_tb);
  end

  logic [INSTR_W-1:0] q_main, q_aux, q_tb;

  always_ff @(posedge clk) begin
    q_main <= rom_main[address];
    q_aux  <= rom_aux[address];
    q_tb   <= rom_tb[address];
  end

  always_comb begin
    unique case (rom_sel)
      ROM_AUX: instruction = q_aux;
      ROM_TB:  instruction = q_tb;
      default: instruction = q_main;
    endcase
  end

endmodule
