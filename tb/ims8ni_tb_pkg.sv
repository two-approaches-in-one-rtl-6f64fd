// ims8ni_tb_pkg - testbench helpers for the Ims8NI core.
//
// * Assembler functions that return the 13-bit instruction words of the
//   core's encoding (see ims8ni_pkg), e.g. LDI(8'h12), CALL(10'h040).
// * iss: an instruction-level reference model written from the instruction
//   definitions. step() executes one instruction cycle: the interrupt entry
//   cycle if a sampled request is pending, otherwise the instruction at pc.
//   It keeps its own RAM, PSW, stack and a copy of the test peripherals so
//   that a testbench can run it in lockstep with the RTL.
// * Test peripherals at the window addresses: F0h input port (read only,
//   driven by the testbench), F1h output latch, F2h interrupt acknowledge
//   (a write clears the pending request), F3h write counter; any other
//   window address reads back (address XOR A5h).
package ims8ni_tb_pkg;
  import ims8ni_pkg::*;

  // ------------------------------------------------------------ assembler
  function automatic instr_t JMP (int a); return {3'b000, 10'(a)}; endfunction
  function automatic instr_t CALL(int a); return {3'b001, 10'(a)}; endfunction
  function automatic instr_t AND_(int d); return {2'b01, 3'd0, 8'(d)}; endfunction
  function automatic instr_t OR_ (int d); return {2'b01, 3'd1, 8'(d)}; endfunction
  function automatic instr_t XOR_(int d); return {2'b01, 3'd2, 8'(d)}; endfunction
  function automatic instr_t ADD (int d); return {2'b01, 3'd3, 8'(d)}; endfunction
  function automatic instr_t ST  (int d); return {2'b01, 3'd4, 8'(d)}; endfunction
  function automatic instr_t LD  (int d); return {2'b01, 3'd5, 8'(d)}; endfunction
  function automatic instr_t LDI (int k); return {2'b01, 3'd6, 8'(k)}; endfunction
  function automatic instr_t RETK(int k); return {2'b01, 3'd7, 8'(k)}; endfunction
  function automatic instr_t SETB(int a, int b); return {2'b10, 2'd0, 6'(a), 3'(b)}; endfunction
  function automatic instr_t CLRB(int a, int b); return {2'b10, 2'd1, 6'(a), 3'(b)}; endfunction
  function automatic instr_t SB  (int a, int b); return {2'b10, 2'd2, 6'(a), 3'(b)}; endfunction
  localparam instr_t NOP  = 13'h1800;
  localparam instr_t LDPC = 13'h1801;
  localparam instr_t RRC  = 13'h1802;
  localparam instr_t RLC  = 13'h1803;
  localparam instr_t SC   = 13'h1804;
  localparam instr_t SZ   = 13'h1805;
  localparam instr_t RET  = 13'h1806;
  localparam instr_t HCF  = 13'h1807;

  localparam byte_t P_IN   = 8'hF0;
  localparam byte_t P_OUT  = 8'hF1;
  localparam byte_t P_ACK  = 8'hF2;
  localparam byte_t P_CNT  = 8'hF3;

  // ------------------------------------------------------ reference model
  class iss;
    instr_t rom [1024];
    bit [9:0] pc;
    bit [7:0] acc;
    bit       c, z, n;
    bit [3:0] user;
    bit [7:0] ram [240];
    bit [9:0] stk [3];
    int       depth;
    bit       halted, irq_q, in_service;
    int       isr_depth;
    // peripherals
    bit [7:0] p_in, p_out, p_cnt;
    bit       ack;          // set by a write to F2h during the last step
    // last bus write, for comparison with the RTL
    bit       wr_valid;
    bit [7:0] wr_addr, wr_data;
    int       instr_count;

    function void reset();
      pc = 0; acc = 0; c = 0; z = 0; n = 0; user = 0;
      foreach (stk[i]) stk[i] = 0;
      depth = 0; halted = 0; irq_q = 0; in_service = 0; isr_depth = 0;
      p_out = 0; p_cnt = 0; instr_count = 0;
    endfunction

    function bit [7:0] psw();
      return {user, 1'b0, n, z, c};
    endfunction

    function bit [7:0] rd(bit [7:0] a);
      if (a < 8'hF0)     return ram[a];
      if (a == 8'hFF)    return psw();
      if (a == P_IN)     return p_in;
      if (a == P_OUT)    return p_out;
      if (a == P_CNT)    return p_cnt;
      return a ^ 8'hA5;
    endfunction

    function void wr(bit [7:0] a, bit [7:0] d);
      wr_valid = 1; wr_addr = a; wr_data = d;
      if (a < 8'hF0) ram[a] = d;
      else if (a == 8'hFF) begin user = d[7:4]; n = d[2]; z = d[1]; c = d[0]; end
      else if (a == P_OUT) p_out = d;
      else if (a == P_ACK) ack = 1;
      else if (a == P_CNT) p_cnt = p_cnt + 1;
    endfunction

    function void push(bit [9:0] v);
      stk[2] = stk[1]; stk[1] = stk[0]; stk[0] = v;
      if (depth < 3) depth++;
    endfunction

    function bit [9:0] pop();
      bit [9:0] v = stk[0];
      stk[0] = stk[1]; stk[1] = stk[2]; stk[2] = 0;
      if (depth > 0) depth--;
      return v;
    endfunction

    function void setzn(bit [7:0] r);
      z = (r == 0); n = r[7];
    endfunction

    // one instruction cycle
    function void step();
      instr_t   i = rom[pc];
      bit [9:0] npc = pc + 1;
      bit [8:0] sum;
      bit [7:0] b, a6;
      wr_valid = 0; ack = 0;
      if (halted) return;
      if (irq_q && !in_service) begin
        isr_depth = depth;
        push(pc);
        in_service = 1;
        pc = 10'h001;
        return;
      end
      instr_count++;
      case (i[12:11])
        2'b00: begin
          if (i[10]) push(npc);
          npc = i[9:0];
        end
        2'b01: begin
          b = rd(i[7:0]);
          case (i[10:8])
            0: begin acc = acc & b; setzn(acc); end
            1: begin acc = acc | b; setzn(acc); end
            2: begin acc = acc ^ b; setzn(acc); end
            3: begin sum = acc + b; acc = sum[7:0]; c = sum[8]; setzn(acc); end
            4: wr(i[7:0], acc);
            5: begin acc = b; setzn(acc); end
            6: acc = i[7:0];
            7: begin acc = i[7:0]; npc = pop(); end
          endcase
        end
        2'b10: begin
          a6 = {2'b00, i[8:3]};
          b  = rd(a6);
          case (i[10:9])
            0: begin b[i[2:0]] = 1'b1; wr(a6, b); end
            1: begin b[i[2:0]] = 1'b0; wr(a6, b); end
            2: if (b[i[2:0]]) npc = pc + 2;
            default: ;
          endcase
        end
        default: begin
          case (i[2:0])
            1: npc = {pc[9:8], acc};
            2: begin {acc, c} = {c, acc}; setzn(acc); end
            3: begin {c, acc} = {acc, c}; setzn(acc); end
            4: if (c) npc = pc + 2;
            5: if (z) npc = pc + 2;
            6: begin
                 if (in_service && depth <= isr_depth + 1) in_service = 0;
                 npc = pop();
               end
            7: begin halted = 1; npc = pc; end
            default: ;
          endcase
        end
      endcase
      pc = npc;
    endfunction
  endclass

endpackage
