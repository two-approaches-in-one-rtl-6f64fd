// ims8ni - the Ims8NI 8-bit microcontroller core with its program ROM and
// data memory.
//
// A small Harvard accumulator machine meant to sit inside a larger chip:
// 1K words of program ROM read straight from a 10-bit program counter, a
// 256-byte data space (RAM, a peripheral window, the PSW at FFh), an 8-bit
// accumulator, a combinational ALU, a Boolean processor for single-bit
// operations on bytes 00h-3Fh, a hidden 3-level return stack and a
// fixed-logic control unit. There is no index register and no instruction
// register.
//
// Timing: every instruction takes one clock period. The rising edge updates
// the PC and the stack and so starts fetch, decode and execute, which are
// combinational; the falling edge writes the result into the accumulator,
// the PSW or the data memory (and the peripheral window). Peripherals see
// per_addr/per_wdata/per_we during the clock-low half and must take a write
// on the falling edge; per_rdata is read combinationally.
//
// Assertions at the end check the data-bus rules on every write edge.
//
// The program ROM holds a demonstration program by default (INIT_FILE).
//
// Interface: clk, reset (asynchronous, active high), int_req (level
// sensitive, vector 001h), hcf (halted after HCF), the peripheral window,
// psw_out (PSW[7:4]) and the PC and accumulator for observation.
module ims8ni
  import ims8ni_pkg::*;
#(
  parameter string       INIT_FILE   = "rtl/ims8ni_demo.hex",
  parameter int unsigned PERIPH_BASE = 'hF0
)(
  input  logic       clk,
  input  logic       reset,
  input  logic       int_req,
  output logic       hcf,
  // peripheral window of the data bus
  output logic       per_sel,
  output logic       per_we,
  output byte_t      per_addr,
  output byte_t      per_wdata,
  input  byte_t      per_rdata,
  output logic [3:0] psw_out,
  // observation
  output pc_t        pc,
  output byte_t      acc,
  output logic       int_taken
);

  instr_t     instr;
  ctrl_t      ctrl;
  logic [2:0] flags;
  logic       bit_val;
  logic [1:0] stk_depth;
  daddr_sel_e daddr_sel;
  pc_t        pc_plus1, tos, push_val;
  byte_t      alu_y, daddr, dbus_rd, dbus_wr, dmem_rd, psw, bp_wdata;
  logic       alu_c, alu_z, alu_n;
  logic       psw_sel;

  // ---------------------------------------------------------------- fetch
  prog_rom #(.INIT_FILE(INIT_FILE)) u_rom (
    .addr (pc),
    .data (instr)
  );

  pc_unit u_pc (
    .clk       (clk),
    .reset     (reset),
    .op        (ctrl.pc_op),
    .jump_addr (instr[PC_W-1:0]),
    .acc       (acc),
    .tos       (tos),
    .pc        (pc),
    .pc_plus1  (pc_plus1)
  );

  assign push_val = ctrl.push_cur ? pc : pc_plus1;

  hw_stack u_stack (
    .clk       (clk),
    .reset     (reset),
    .op        (ctrl.stk_op),
    .din       (push_val),
    .tos       (tos),
    .depth     (stk_depth),
    .overflow  (),
    .underflow ()
  );

  control_unit u_ctrl (
    .clk        (clk),
    .reset      (reset),
    .int_req    (int_req),
    .instr      (instr),
    .flags      (flags),
    .bit_val    (bit_val),
    .stk_depth  (stk_depth),
    .ctrl       (ctrl),
    .daddr_sel  (daddr_sel),
    .hcf        (hcf),
    .int_taken  (int_taken),
    .in_service ()
  );

  // -------------------------------------------------------------- data bus
  assign daddr   = (daddr_sel == DA_BIT) ? {2'b00, instr[8:3]} : instr[7:0];
  assign psw_sel = (daddr == PSW_ADDR);
  assign dbus_rd = psw_sel ? psw : dmem_rd;
  assign dbus_wr = ctrl.mem_wbool ? bp_wdata : acc;

  data_mem #(.PERIPH_BASE(PERIPH_BASE)) u_dmem (
    .clk       (clk),
    .addr      (daddr),
    .wdata     (dbus_wr),
    .we        (ctrl.mem_we && !psw_sel),
    .rdata     (dmem_rd),
    .per_sel   (per_sel),
    .per_we    (per_we),
    .per_rdata (per_rdata)
  );

  assign per_addr  = daddr;
  assign per_wdata = dbus_wr;

  // -------------------------------------------------------------- execute
  alu u_alu (
    .op    (ctrl.alu_op),
    .a     (acc),
    .b     (dbus_rd),
    .c_in  (flags[PSW_C]),
    .y     (alu_y),
    .c_out (alu_c),
    .z_out (alu_z),
    .n_out (alu_n)
  );

  accumulator u_acc (
    .clk     (clk),
    .reset   (reset),
    .load    (ctrl.acc_load),
    .sel_imm (ctrl.acc_imm),
    .alu_y   (alu_y),
    .imm     (instr[7:0]),
    .acc     (acc)
  );

  psw_reg u_psw (
    .clk       (clk),
    .reset     (reset),
    .bus_we    (ctrl.mem_we && psw_sel),
    .bus_wdata (dbus_wr),
    .flags_we  (ctrl.flags_we),
    .carry_we  (ctrl.carry_we),
    .c_in      (alu_c),
    .z_in      (alu_z),
    .n_in      (alu_n),
    .psw       (psw),
    .flags     (flags),
    .user_out  (psw_out)
  );

  bool_proc u_bool (
    .op      (ctrl.bp_op),
    .bit_sel (instr[2:0]),
    .rdata   (dbus_rd),
    .wdata   (bp_wdata),
    .bit_val (bit_val)
  );

  // ------------------------------------------------------------ bus rules
  // checked on the write edge, where the data bus is used
  a_per_we_in_window: assert property (@(negedge clk) disable iff (reset)
    per_we |-> per_sel)
    else $error("peripheral write outside the window");
  a_psw_single_writer: assert property (@(negedge clk) disable iff (reset)
    (ctrl.mem_we && psw_sel) |-> !(ctrl.flags_we || ctrl.carry_we))
    else $error("PSW written by the bus and the ALU in one cycle");
  a_bit_ops_in_range: assert property (@(negedge clk) disable iff (reset)
    (ctrl.bp_op != BP_NONE) |-> (daddr < 8'h40))
    else $error("bit operation outside 00h-3Fh");
  a_halt_is_quiet: assert property (@(negedge clk) disable iff (reset)
    hcf |-> !(ctrl.mem_we || ctrl.acc_load || ctrl.stk_op != STK_NONE))
    else $error("halted core still writes");

endmodule
