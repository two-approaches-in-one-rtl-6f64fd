// tb_control_unit - self-checking test of the fixed-logic control unit.
// Part 1 feeds every 13-bit instruction word with random flags and tested
// bit and compares the control lines with a reference decoder written from
// the instruction table. Part 2 checks the state bits: interrupt entry
// (push of the current PC, jump to 001h, masked while in service), the end
// of service on the RET that pops the interrupt frame but not on a nested
// subroutine RET, and the halt after HCF that only reset clears.
module tb_control_unit;
  import ims8ni_pkg::*;

  logic       clk = 1'b0, reset, int_req, bit_val;
  instr_t     instr;
  logic [2:0] flags;
  logic [1:0] stk_depth;
  ctrl_t      ctrl;
  daddr_sel_e daddr_sel;
  logic       hcf, int_taken, in_service;
  int         checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  // reference decode: returns {pc_op, stk_op, acc_load, acc_imm, mem_we,
  // mem_wbool, flags_we, carry_we, alu_op, bp_op}
  function automatic logic [18:0] ref_dec(instr_t i, logic [2:0] f, logic bv);
    pc_op_e pc = PC_INC; stk_op_e st = STK_NONE; alu_op_e al = ALU_NONE;
    bp_op_e bp = BP_NONE;
    logic al_ld = 0, imm = 0, mwe = 0, mwb = 0, fwe = 0, cwe = 0;
    if (i[12:10] == 3'b000) pc = PC_JUMP;
    else if (i[12:10] == 3'b001) begin pc = PC_JUMP; st = STK_PUSH; end
    else if (i[12:11] == 2'b01) begin
      case (i[10:8])
        0: begin al = ALU_AND; al_ld = 1; fwe = 1; end
        1: begin al = ALU_OR;  al_ld = 1; fwe = 1; end
        2: begin al = ALU_XOR; al_ld = 1; fwe = 1; end
        3: begin al = ALU_ADD; al_ld = 1; fwe = 1; cwe = 1; end
        4: mwe = 1;
        5: begin al = ALU_PASS; al_ld = 1; fwe = 1; end
        6: begin al_ld = 1; imm = 1; end
        7: begin al_ld = 1; imm = 1; pc = PC_POP; st = STK_POP; end
      endcase
    end else if (i[12:11] == 2'b10) begin
      case (i[10:9])
        0: begin bp = BP_SET; mwe = 1; mwb = 1; end
        1: begin bp = BP_CLR; mwe = 1; mwb = 1; end
        2: begin bp = BP_TEST; if (bv) pc = PC_SKIP; end
        default: ;
      endcase
    end else begin
      case (i[2:0])
        1: pc = PC_ACC;
        2: begin al = ALU_RRC; al_ld = 1; fwe = 1; cwe = 1; end
        3: begin al = ALU_RLC; al_ld = 1; fwe = 1; cwe = 1; end
        4: if (f[0]) pc = PC_SKIP;
        5: if (f[1]) pc = PC_SKIP;
        6: begin pc = PC_POP; st = STK_POP; end
        7: pc = PC_HOLD;
        default: ;
      endcase
    end
    return {pc, st, al_ld, imm, mwe, mwb, fwe, cwe, al, bp};
  endfunction

  function automatic logic [18:0] got();
    return {ctrl.pc_op, ctrl.stk_op, ctrl.acc_load, ctrl.acc_imm, ctrl.mem_we,
            ctrl.mem_wbool, ctrl.flags_we, ctrl.carry_we, ctrl.alu_op, ctrl.bp_op};
  endfunction

  task automatic expect_bit(string what, logic v, logic e);
    checks++;
    if (v !== e) begin failures++; $display("FAIL %s = %b, expected %b", what, v, e); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam instr_t I_NOP  = 13'h1800;
  localparam instr_t I_RET  = 13'h1806;
  localparam instr_t I_HCF  = 13'h1807;

  initial begin
    reset = 1; int_req = 0; instr = I_NOP; flags = 0; bit_val = 0; stk_depth = 0;
    #12;
    // ---- part 1: decode of every instruction word, state held in reset
    for (int w = 0; w < 8192; w++) begin
      instr = instr_t'(w); flags = 3'($urandom); bit_val = 1'($urandom);
      #1;
      checks++;
      if (got() !== ref_dec(instr, flags, bit_val) ||
          daddr_sel !== ((instr[12:11] == 2'b10) ? DA_BIT : DA_DIRECT) ||
          ctrl.push_cur !== 1'b0) begin
        failures++;
        $display("FAIL decode %h: %h exp %h", instr, got(), ref_dec(instr, flags, bit_val));
      end
    end
    reset = 0;
    // ---- part 2: interrupt
    instr = I_NOP; stk_depth = 2'd1;
    @(negedge clk) int_req = 1;
    @(negedge clk);                         // INT sampled at this rising edge
    expect_bit("int_taken", int_taken, 1'b1);
    checks++;
    if (ctrl.pc_op !== PC_INT || ctrl.stk_op !== STK_PUSH || !ctrl.push_cur || ctrl.mem_we) begin
      failures++; $display("FAIL interrupt entry lines");
    end
    @(negedge clk); stk_depth = 2'd2;       // stack now holds the return address
    expect_bit("in_service", in_service, 1'b1);
    expect_bit("int masked", int_taken, 1'b0);
    int_req = 0;
    // nested subroutine return at depth 3 -> 2 must not end service
    stk_depth = 2'd3; instr = I_RET;
    @(negedge clk); stk_depth = 2'd2;
    expect_bit("in_service after nested RET", in_service, 1'b1);
    // the RET that pops the interrupt frame (2 -> 1)
    instr = I_RET;
    @(negedge clk); stk_depth = 2'd1; instr = I_NOP;
    expect_bit("in_service after RETI", in_service, 1'b0);
    // ---- part 2: HCF
    instr = I_HCF;
    @(negedge clk); instr = I_NOP;
    expect_bit("hcf", hcf, 1'b1);
    checks++;
    if (ctrl.pc_op !== PC_HOLD || ctrl.acc_load || ctrl.mem_we) begin
      failures++; $display("FAIL halted core still active");
    end
    int_req = 1;
    @(negedge clk); @(negedge clk);
    expect_bit("no interrupt while halted", int_taken, 1'b0);
    reset = 1; #2 reset = 0; int_req = 0;
    expect_bit("hcf after reset", hcf, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
