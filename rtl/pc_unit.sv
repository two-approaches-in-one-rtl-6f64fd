// pc_unit - program counter of the Ims8NI core.
//
// A PC_W-bit register clocked on the rising edge, the event that starts the
// fetch of the next instruction; the program ROM is read straight from it,
// so the instruction stays stable for the whole cycle and no instruction
// register is needed. The control unit's C_PC selects the next value:
//   PC_INC  pc + 1            PC_SKIP pc + 2 (skip taken)
//   PC_JUMP addr10            PC_ACC  {pc[9:8], acc} (LDPC)
//   PC_POP  top of stack      PC_INT  interrupt vector 001h
//   PC_HOLD pc (halted)
// Reset (asynchronous, active high) loads the reset vector 000h. Addresses
// wrap modulo 1K. The vectors come from the program memory map; keeping the
// upper two PC bits on LDPC is this design's choice (the 8-bit accumulator
// then selects a word inside the current 256-word page, e.g. a table in
// page 300h-3FFh).
module pc_unit
  import ims8ni_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  pc_op_e op,        // C_PC
  input  pc_t    jump_addr, // direct address field
  input  byte_t  acc,
  input  pc_t    tos,
  output pc_t    pc,
  output pc_t    pc_plus1   // return address for CALL
);

  pc_t pc_next;

  assign pc_plus1 = pc + 1'b1;

  always_comb begin
    unique case (op)
      PC_SKIP: pc_next = pc + PC_W'(2);
      PC_JUMP: pc_next = jump_addr;
      PC_ACC:  pc_next = {pc[PC_W-1:DATA_W], acc};
      PC_POP:  pc_next = tos;
      PC_INT:  pc_next = INT_VECTOR;
      PC_HOLD: pc_next = pc;
      default: pc_next = pc_plus1;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) pc <= RESET_VECTOR;
    else       pc <= pc_next;
  end

endmodule
