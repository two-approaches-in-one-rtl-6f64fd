// control_unit - fixed-logic (hard-wired) control unit of the Ims8NI core.
//
// Decodes the instruction word read straight from the program ROM into the
// control lines of the datapath: C_ACC (accumulator load and source), the
// ALU operation, flag and data-memory writes, C_BOOL (Boolean processor),
// C_PC (next program counter) and C_STACK. The decoder is combinational:
// with the rising clock edge starting fetch/decode/execute and the falling
// edge writing the results, every instruction takes one clock period, and
// skip instructions become PC+2 in that same cycle.
//
// Three small state bits sit beside the decoder, clocked on the rising edge:
//  * halted     - set by HCF; the PC holds and nothing is written until
//                 RESET; reported on the hcf output.
//  * irq_q      - INT sampled on the rising edge (level sensitive).
//  * in_service - set on interrupt entry, cleared by the plain RET that pops
//                 the interrupt's return address: a RET clears it when the
//                 stack depth is at most one above the depth recorded at
//                 entry, so nested subroutine returns inside the handler do
//                 not end it. While set, further requests wait.
// An interrupt is taken as one cycle of its own in place of the instruction
// at the PC: that PC is pushed, the PC is loaded with 001h and nothing is
// written, so the suppressed instruction runs after the return.
// The instruction set, the fixed-logic choice, the one-cycle timing and the
// RESET/INT/HCF lines follow the architecture; the encoding, the interrupt
// entry cycle, level-sensitive INT and the in-service rule are this design's
// choices.
module control_unit
  import ims8ni_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       int_req,     // INT
  input  instr_t     instr,
  input  logic [2:0] flags,       // {N, Z, C} from the PSW
  input  logic       bit_val,     // tested bit from the Boolean processor
  input  logic [1:0] stk_depth,
  output ctrl_t      ctrl,
  output daddr_sel_e daddr_sel,   // depends on the instruction only
  output logic       hcf,         // HCF: core halted
  output logic       int_taken,   // this cycle is an interrupt entry
  output logic       in_service
);

  logic       halted, irq_q;
  logic [1:0] isr_depth;
  logic       is_ret;

  assign int_taken = irq_q && !in_service && !halted;
  assign hcf       = halted;

  assign daddr_sel = (instr[12:11] == 2'b10) ? DA_BIT : DA_DIRECT;

  always_comb begin
    ctrl           = '0;
    ctrl.alu_op    = ALU_NONE;
    ctrl.bp_op     = BP_NONE;
    ctrl.pc_op     = PC_INC;
    ctrl.stk_op    = STK_NONE;
    is_ret         = 1'b0;

    if (halted) begin
      ctrl.pc_op = PC_HOLD;
    end else if (int_taken) begin
      ctrl.pc_op    = PC_INT;
      ctrl.stk_op   = STK_PUSH;
      ctrl.push_cur = 1'b1;
    end else begin
      unique case (instr[12:11])
        2'b00: begin                                   // JMP / CALL
          ctrl.pc_op = PC_JUMP;
          if (instr[10]) ctrl.stk_op = STK_PUSH;
        end
        2'b01: begin                                   // direct / immediate
          unique case (dop_e'(instr[10:8]))
            DOP_AND, DOP_OR, DOP_XOR, DOP_ADD: begin
              ctrl.alu_op   = alu_op_e'(instr[10:8]);
              ctrl.acc_load = 1'b1;
              ctrl.flags_we = 1'b1;
              ctrl.carry_we = (dop_e'(instr[10:8]) == DOP_ADD);
            end
            DOP_ST: ctrl.mem_we = 1'b1;
            DOP_LD: begin
              ctrl.alu_op   = ALU_PASS;
              ctrl.acc_load = 1'b1;
              ctrl.flags_we = 1'b1;
            end
            DOP_LDI: begin
              ctrl.acc_load = 1'b1;
              ctrl.acc_imm  = 1'b1;
            end
            default: begin                             // RET #imm
              ctrl.acc_load = 1'b1;
              ctrl.acc_imm  = 1'b1;
              ctrl.pc_op    = PC_POP;
              ctrl.stk_op   = STK_POP;
            end
          endcase
        end
        2'b10: begin                                   // bit operations
          unique case (bop_e'(instr[10:9]))
            BOP_SETB: begin
              ctrl.bp_op     = BP_SET;
              ctrl.mem_we    = 1'b1;
              ctrl.mem_wbool = 1'b1;
            end
            BOP_CLRB: begin
              ctrl.bp_op     = BP_CLR;
              ctrl.mem_we    = 1'b1;
              ctrl.mem_wbool = 1'b1;
            end
            BOP_SB: begin
              ctrl.bp_op = BP_TEST;
              if (bit_val) ctrl.pc_op = PC_SKIP;
            end
            default: ;                                 // reserved: NOP
          endcase
        end
        default: begin                                 // implied
          unique case (iop_e'(instr[2:0]))
            IOP_LDPC: ctrl.pc_op = PC_ACC;
            IOP_RRC, IOP_RLC: begin
              ctrl.alu_op   = (iop_e'(instr[2:0]) == IOP_RRC) ? ALU_RRC : ALU_RLC;
              ctrl.acc_load = 1'b1;
              ctrl.flags_we = 1'b1;
              ctrl.carry_we = 1'b1;
            end
            IOP_SC: if (flags[PSW_C]) ctrl.pc_op = PC_SKIP;
            IOP_SZ: if (flags[PSW_Z]) ctrl.pc_op = PC_SKIP;
            IOP_RET: begin
              ctrl.pc_op  = PC_POP;
              ctrl.stk_op = STK_POP;
              is_ret      = 1'b1;
            end
            IOP_HCF: ctrl.pc_op = PC_HOLD;
            default: ;                                 // NOP
          endcase
        end
      endcase
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      halted     <= 1'b0;
      irq_q      <= 1'b0;
      in_service <= 1'b0;
      isr_depth  <= '0;
    end else begin
      irq_q <= int_req;
      if (!halted && !int_taken && instr[12:11] == 2'b11
          && iop_e'(instr[2:0]) == IOP_HCF)
        halted <= 1'b1;
      if (int_taken) begin
        in_service <= 1'b1;
        isr_depth  <= stk_depth;
      end else if (is_ret && in_service && ({1'b0, stk_depth} <= {1'b0, isr_depth} + 3'd1)) begin
        in_service <= 1'b0;
      end
    end
  end

endmodule
