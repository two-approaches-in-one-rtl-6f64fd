// ims8ni_pkg - shared widths, instruction encoding and control types of the
// Ims8NI 8-bit microcontroller core.
//
// Widths: 10-bit program counter (1K-word program space), 8-bit data words,
// 256-byte data address space with the PSW at FFh, a 3-level return stack.
// These follow the architecture description.
//
// Instruction word: 13 bits. The instruction set (JMP/CALL with a 10-bit
// address, six direct-address operations with an 8-bit address, two 8-bit
// immediate operations, three bit operations, seven implied operations)
// needs more than 4096 codes, so it cannot be packed into 12 bits; 13 bits is
// the smallest word that holds it. The encoding below is this design's own:
//
//   12 11 10 | 9 .................. 0
//    0  0  0 | addr10                    JMP  addr10
//    0  0  1 | addr10                    CALL addr10
//    0  1 | op3 [10:8] | operand [7:0]   op3: 000 AND, 001 OR, 010 XOR,
//                                             011 ADD, 100 ST, 101 LD dir,
//                                             110 LD #imm, 111 RET #imm
//    1  0 | bop [10:9] | byte [8:3] | bit [2:0]
//                                        bop: 00 SETB, 01 CLRB, 10 SB,
//                                             11 reserved (executes as NOP)
//    1  1 | ........ | iop [2:0]         iop: 000 NOP, 001 LDPC, 010 RRC,
//                                             011 RLC, 100 SC, 101 SZ,
//                                             110 RET, 111 HCF
//
// Bit operations reach bytes 00h-3Fh, the bit-addressable part of the data
// memory.
package ims8ni_pkg;

  localparam int unsigned PC_W     = 10;
  localparam int unsigned DATA_W   = 8;
  localparam int unsigned IW       = 13;
  localparam int unsigned ROM_WORDS = 1 << PC_W;
  localparam int unsigned STACK_LEVELS = 3;

  localparam logic [PC_W-1:0]   RESET_VECTOR = 10'h000;
  localparam logic [PC_W-1:0]   INT_VECTOR   = 10'h001;
  localparam logic [DATA_W-1:0] PSW_ADDR     = 8'hFF;

  // PSW bit positions
  localparam int unsigned PSW_C = 0;  // carry
  localparam int unsigned PSW_Z = 1;  // zero
  localparam int unsigned PSW_N = 2;  // negative (result bit 7)

  typedef logic [IW-1:0]     instr_t;
  typedef logic [PC_W-1:0]   pc_t;
  typedef logic [DATA_W-1:0] byte_t;

  // direct / immediate group (instr[10:8] when instr[12:11] == 2'b01)
  typedef enum logic [2:0] {
    DOP_AND  = 3'b000,
    DOP_OR   = 3'b001,
    DOP_XOR  = 3'b010,
    DOP_ADD  = 3'b011,
    DOP_ST   = 3'b100,
    DOP_LD   = 3'b101,
    DOP_LDI  = 3'b110,
    DOP_RETI = 3'b111
  } dop_e;

  // bit group (instr[10:9] when instr[12:11] == 2'b10)
  typedef enum logic [1:0] {
    BOP_SETB = 2'b00,
    BOP_CLRB = 2'b01,
    BOP_SB   = 2'b10,
    BOP_RSVD = 2'b11
  } bop_e;

  // implied group (instr[2:0] when instr[12:11] == 2'b11)
  typedef enum logic [2:0] {
    IOP_NOP  = 3'b000,
    IOP_LDPC = 3'b001,
    IOP_RRC  = 3'b010,
    IOP_RLC  = 3'b011,
    IOP_SC   = 3'b100,
    IOP_SZ   = 3'b101,
    IOP_RET  = 3'b110,
    IOP_HCF  = 3'b111
  } iop_e;

  // ALU operation (3-bit control from the control unit)
  typedef enum logic [2:0] {
    ALU_AND  = 3'b000,
    ALU_OR   = 3'b001,
    ALU_XOR  = 3'b010,
    ALU_ADD  = 3'b011,
    ALU_PASS = 3'b100,   // result = data bus operand (LD direct)
    ALU_RRC  = 3'b101,
    ALU_RLC  = 3'b110,
    ALU_NONE = 3'b111    // result = accumulator, no flag change
  } alu_op_e;

  // next-PC selection (C_PC)
  typedef enum logic [2:0] {
    PC_INC  = 3'b000,
    PC_SKIP = 3'b001,
    PC_JUMP = 3'b010,
    PC_ACC  = 3'b011,
    PC_POP  = 3'b100,
    PC_INT  = 3'b101,
    PC_HOLD = 3'b110
  } pc_op_e;

  // stack operation (C_STACK)
  typedef enum logic [1:0] {
    STK_NONE = 2'b00,
    STK_PUSH = 2'b01,
    STK_POP  = 2'b10
  } stk_op_e;

  // Boolean processor operation (C_BOOL)
  typedef enum logic [1:0] {
    BP_NONE = 2'b00,
    BP_SET  = 2'b01,
    BP_CLR  = 2'b10,
    BP_TEST = 2'b11
  } bp_op_e;

  // data memory address source
  typedef enum logic [1:0] {
    DA_DIRECT = 2'b00,   // instr[7:0]
    DA_BIT    = 2'b01    // {2'b00, instr[8:3]}
  } daddr_sel_e;

  // bundle of control lines decoded from one instruction
  typedef struct packed {
    alu_op_e   alu_op;
    logic      acc_load;    // C_ACC: load accumulator on the write edge
    logic      acc_imm;     // accumulator source: 1 = immediate field
    logic      flags_we;    // write Z and N from the ALU
    logic      carry_we;    // write C from the ALU
    logic      mem_we;      // write the data bus on the write edge
    logic      mem_wbool;   // write data: 1 = Boolean processor, 0 = ACC
    bp_op_e    bp_op;       // C_BOOL
    pc_op_e    pc_op;       // C_PC
    stk_op_e   stk_op;      // C_STACK
    logic      push_cur;    // push the current PC (interrupt) instead of PC+1
  } ctrl_t;

endpackage
