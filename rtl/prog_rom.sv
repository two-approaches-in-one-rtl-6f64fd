// prog_rom - program memory of the Ims8NI core: ROM_WORDS words of IW bits.
//
// Read asynchronously from the program counter; because the PC only changes
// on the rising clock edge, the instruction word stays stable for the whole
// instruction cycle, which is what lets the core do without an instruction
// register. Memory map: 000h reset vector, 001h interrupt vector, program
// code up to 2FFh, tables or code in 300h-3FFh.
// Words not set by INIT_FILE (a $readmemh image, path relative to the
// directory the tools run in) are 0, i.e. JMP 000h. The default image,
// rtl/ims8ni_demo.hex, is a small button-sampling, seven-segment display and
// actuator program; its source and behaviour are in the README. An empty
// INIT_FILE gives an all-zero ROM. The 1K-word size and memory map follow
// the architecture; the 13-bit word follows from the instruction encoding
// (see ims8ni_pkg); the demo program is this design's own.
module prog_rom
  import ims8ni_pkg::*;
#(
  parameter string INIT_FILE = "rtl/ims8ni_demo.hex"
)(
  input  pc_t    addr,
  output instr_t data
);

  instr_t mem [ROM_WORDS];

  initial begin
    for (int i = 0; i < ROM_WORDS; i++) mem[i] = '0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign data = mem[addr];

endmodule
