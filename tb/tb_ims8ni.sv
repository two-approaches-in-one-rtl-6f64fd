// tb_ims8ni - end-to-end test of the Ims8NI core at its default parameters.
//
// The core runs in lockstep with the instruction-level reference model of
// ims8ni_tb_pkg. Every clock, half a period after the falling (write)
// edge, the testbench checks that the RTL's PC matches the model's, steps
// the model by one instruction cycle and compares accumulator, PSW and any
// peripheral write. At the end of each program the whole RAM is compared.
//
// Programs: one directed program that forces each mechanism of the core on
// purpose (skips on C, Z and a set bit, SETB/CLRB, rotations, PSW access
// at FFh, a table lookup through LDPC and RET #imm, a 4-deep call chain
// that overflows the 3-level stack, an interrupt whose handler calls a
// subroutine and acknowledges the request, HCF), then a series of random
// programs with random interrupt requests. It checks that every
// instruction and the interrupt entry take exactly one clock, and counts
// how often each mechanism happened; one that never happened is a failure.
// The test peripherals are those described in ims8ni_tb_pkg.
module tb_ims8ni;
  import ims8ni_pkg::*;
  import ims8ni_tb_pkg::*;

  localparam int N_RANDOM  = 40;
  localparam int RAND_CYC  = 500;

  logic       clk = 1'b0, reset = 1'b0, int_req = 1'b0;
  logic       hcf, per_sel, per_we, int_taken;
  byte_t      per_addr, per_wdata, per_rdata, acc;
  logic [3:0] psw_out;
  pc_t        pc;

  ims8ni dut (.*);

  always #5 clk = ~clk;

  // ------------------------------------------------ test peripherals
  byte_t p_in = 8'h3C, p_out = 8'h00, p_cnt = 8'h00;
  always_comb begin
    unique case (per_addr)
      P_IN:    per_rdata = p_in;
      P_OUT:   per_rdata = p_out;
      P_CNT:   per_rdata = p_cnt;
      default: per_rdata = per_addr ^ 8'hA5;
    endcase
  end
  always @(negedge clk) if (per_we) begin
    if (per_addr == P_OUT) p_out <= per_wdata;
    if (per_addr == P_CNT) p_cnt <= p_cnt + 8'd1;
    if (per_addr == P_ACK) int_req <= 1'b0;
  end

  // ------------------------------------------------ scoreboard
  iss  m = new();
  int  checks = 0, failures = 0;
  bit  compare_on = 0;
  int  cycles = 0;

  // mechanism counters
  int n_int = 0, n_skip_c = 0, n_skip_z = 0, n_skip_b = 0, n_ovf = 0,
      n_call = 0, n_ret = 0, n_retk = 0, n_ldpc = 0, n_setb = 0, n_clrb = 0,
      n_pswwr = 0, n_perwr = 0, n_perrd = 0, n_carry = 0, n_rot = 0,
      n_hcf = 0, n_masked = 0, n_nested_ret = 0;

  always @(posedge clk) if (!reset) m.irq_q = int_req;

  task automatic fail(string s);
    failures++;
    if (failures < 20) $display("FAIL t=%0t %s", $time, s);
  endtask

  always @(negedge clk) begin
    #1;
    if (compare_on && !reset) begin
      instr_t i;
      ctrl_t  c;
      i = dut.instr;
      c = dut.ctrl;
      cycles++;
      checks++;
      if (pc !== m.pc) fail($sformatf("pc %h, model %h", pc, m.pc));
      // mechanism counts from the RTL
      if (int_taken) n_int++;
      if (dut.u_ctrl.in_service && int_req) n_masked++;
      if (c.pc_op == PC_SKIP) begin
        if (i[12:11] == 2'b10) n_skip_b++;
        else if (i[2:0] == 3'd4) n_skip_c++;
        else n_skip_z++;
      end
      if (dut.u_stack.overflow) n_ovf++;
      if (c.stk_op == STK_PUSH && !int_taken) n_call++;
      if (c.stk_op == STK_POP && !c.acc_imm) n_ret++;
      if (c.stk_op == STK_POP && !c.acc_imm && dut.u_ctrl.in_service &&
          dut.u_stack.depth > dut.u_ctrl.isr_depth + 1) n_nested_ret++;
      if (c.stk_op == STK_POP && c.acc_imm) n_retk++;
      if (c.pc_op == PC_ACC) n_ldpc++;
      if (c.bp_op == BP_SET) n_setb++;
      if (c.bp_op == BP_CLR) n_clrb++;
      if (c.mem_we && dut.psw_sel) n_pswwr++;
      if (per_we) n_perwr++;
      if (per_sel && !c.mem_we && c.acc_load) n_perrd++;
      if (c.carry_we && dut.alu_c && c.alu_op == ALU_ADD) n_carry++;
      if (c.alu_op inside {ALU_RRC, ALU_RLC}) n_rot++;
      if (hcf) n_hcf++;
      // step the model and compare the results of this cycle
      m.p_in = p_in;
      m.step();
      checks++;
      if (acc !== m.acc) fail($sformatf("acc %h, model %h (next pc %h, instr %h)", acc, m.acc, m.pc, i));
      if (dut.psw !== m.psw()) fail($sformatf("psw %h, model %h", dut.psw, m.psw()));
      if (psw_out !== m.user) fail("psw_out");
      if (hcf !== m.halted && !m.halted) fail("hcf early");
      begin
        bit win;
        win = m.wr_valid && m.wr_addr >= 8'hF0 && m.wr_addr != 8'hFF;
        checks++;
        if (per_we !== win || (win && (per_addr !== m.wr_addr || per_wdata !== m.wr_data)))
          fail($sformatf("peripheral write %b %h %h, model %b %h %h",
                         per_we, per_addr, per_wdata, win, m.wr_addr, m.wr_data));
      end
    end
  end

  // ------------------------------------------------ program loading
  task automatic load(instr_t prog [1024]);
    for (int a = 0; a < 1024; a++) begin
      dut.u_rom.mem[a] = prog[a];
      m.rom[a] = prog[a];
    end
    for (int a = 0; a < 240; a++) begin
      byte_t v = byte_t'($urandom);
      dut.u_dmem.ram[a] = v;
      m.ram[a] = v;
    end
  endtask

  task automatic start(instr_t prog [1024]);
    @(posedge clk); #1;
    reset = 1'b1; compare_on = 0; int_req = 1'b0;
    load(prog);
    p_out = 8'h00; p_cnt = 8'h00;
    m.reset();
    #1 reset = 1'b0;
    compare_on = 1;
    cycles = 0;
  endtask

  task automatic compare_ram();
    for (int a = 0; a < 240; a++) begin
      checks++;
      if (dut.u_dmem.ram[a] !== m.ram[a]) fail($sformatf("ram[%h] %h, model %h", a, dut.u_dmem.ram[a], m.ram[a]));
    end
  endtask

  // ------------------------------------------------ random instructions
  function automatic int rand_daddr();
    int r = $urandom_range(0, 9);
    if (r < 6) return $urandom_range(0, 63);
    if (r < 8) return $urandom_range(8'hF0, 8'hFF);
    return $urandom_range(0, 255);
  endfunction

  function automatic instr_t rand_instr(int a);
    int r = $urandom_range(0, 99);
    if (r < 4)  return JMP($urandom_range(0, 1023));
    if (r < 8)  return JMP(a + $urandom_range(1, 6));
    if (r < 13) return CALL(a + $urandom_range(1, 12));
    if (r < 45) return {2'b01, 3'($urandom_range(0, 5)), 8'(rand_daddr())};
    if (r < 52) return LDI($urandom);
    if (r < 56) return RETK($urandom);
    if (r < 70) return {2'b10, 2'($urandom_range(0, 3)), 6'($urandom), 3'($urandom)};
    if (r < 72) return LDPC;
    if (r < 78) return RRC;
    if (r < 84) return RLC;
    if (r < 88) return SC;
    if (r < 92) return SZ;
    if (r < 97) return RET;
    if (r < 98) return ST(P_ACK);
    return NOP;
  endfunction

  // ------------------------------------------------ watchdog
  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    instr_t p [1024];
    int     halt_cycle;

    // ================= directed program =================
    foreach (p[a]) p[a] = HCF;
    p['h000] = JMP('h010);
    p['h001] = JMP('h100);                // interrupt vector
    p['h010] = LDI(0);
    p['h011] = ST('h30);                  // interrupt-seen flag
    p['h012] = LDI('h80);
    p['h013] = ST('h20);
    p['h014] = ADD('h20);                 // 80+80: A=00, C=1, Z=1
    p['h015] = SC;                        // taken
    p['h016] = HCF;
    p['h017] = SZ;                        // taken
    p['h018] = HCF;
    p['h019] = SETB('h20, 0);             // [20] = 81
    p['h01A] = SB('h20, 0);               // taken
    p['h01B] = HCF;
    p['h01C] = CLRB('h20, 7);             // [20] = 01
    p['h01D] = SB('h20, 7);               // not taken
    p['h01E] = LD('h20);                  // A = 01
    p['h01F] = RLC;                       // A = 03, C = 0
    p['h020] = RRC;                       // A = 01, C = 1
    p['h021] = CALL('h300);               // table lookup, returns A = 22h
    p['h022] = ST(P_OUT);
    p['h023] = LDI('h5A);
    p['h024] = ST('hFF);                  // PSW = 52h
    p['h025] = LD('hFF);
    p['h026] = ST(P_CNT);
    p['h027] = LD(P_IN);
    p['h028] = ST('h21);
    p['h029] = CALL('h050);               // 4-deep chain: stack overflow
    p['h02A] = LD('h30);                  // wait for the interrupt
    p['h02B] = SZ;
    p['h02C] = JMP('h02E);
    p['h02D] = JMP('h02A);
    p['h02E] = HCF;
    // chain
    p['h050] = CALL('h058);
    p['h051] = JMP('h02A);                // its own return address was lost
    p['h058] = CALL('h05C);
    p['h059] = RET;
    p['h05C] = CALL('h05E);               // fourth level: oldest entry lost
    p['h05D] = RET;
    p['h05E] = RETK('h77);
    // interrupt handler
    p['h100] = CALL('h110);
    p['h101] = LDI(1);
    p['h102] = ST('h30);
    p['h103] = ST(P_ACK);
    p['h104] = RET;
    p['h110] = RET;                       // nested return inside the handler
    // table in page 3
    p['h300] = LDI('h11);
    p['h301] = LDPC;                      // -> 311h
    p['h310] = RETK('h11);
    p['h311] = RETK('h22);

    start(p);
    halt_cycle = -1;
    for (int k = 0; k < 400 && halt_cycle < 0; k++) begin
      @(posedge clk); #1;
      if (pc == 10'h02A && dut.u_stack.depth == 0 && !int_req && m.ram['h30] == 0) begin
        @(negedge clk) int_req = 1'b1;
      end
      if (hcf) halt_cycle = cycles;
    end
    repeat (5) @(posedge clk);
    checks++;
    if (!hcf || pc !== 10'h02E) fail($sformatf("directed program did not halt at 02Eh (pc %h)", pc));
    checks++;
    if (p_out !== 8'h22 || p_cnt !== 8'd1) fail($sformatf("peripheral results out=%h cnt=%h", p_out, p_cnt));
    checks++;
    if (dut.u_dmem.ram['h21] !== 8'h3C || dut.u_dmem.ram['h20] !== 8'h01 || dut.u_dmem.ram['h30] !== 8'h01)
      fail("directed program RAM results");
    // one clock per instruction and per interrupt entry
    checks++;
    if (halt_cycle != m.instr_count + n_int)
      fail($sformatf("cycle count %0d, instructions %0d + interrupts %0d", halt_cycle, m.instr_count, n_int));
    compare_ram();
    $display("directed program: %0d instructions, %0d interrupt entries, %0d clocks to HCF",
             m.instr_count, n_int, halt_cycle);

    // ================= random programs =================
    for (int r = 0; r < N_RANDOM; r++) begin
      foreach (p[a]) p[a] = rand_instr(a);
      p[1] = JMP($urandom_range(2, 1023));
      start(p);
      for (int k = 0; k < RAND_CYC; k++) begin
        @(negedge clk);
        if (!int_req && $urandom_range(0, 40) == 0) int_req <= 1'b1;
      end
      compare_ram();
    end

    $display("mechanisms: int=%0d masked=%0d skipC=%0d skipZ=%0d skipB=%0d ovf=%0d call=%0d ret=%0d nested_ret=%0d retk=%0d ldpc=%0d setb=%0d clrb=%0d pswwr=%0d perwr=%0d perrd=%0d carry=%0d rot=%0d hcf=%0d",
             n_int, n_masked, n_skip_c, n_skip_z, n_skip_b, n_ovf, n_call, n_ret, n_nested_ret, n_retk,
             n_ldpc, n_setb, n_clrb, n_pswwr, n_perwr, n_perrd, n_carry, n_rot, n_hcf);
    begin
      int cnt [19];
      cnt = '{n_int, n_masked, n_skip_c, n_skip_z, n_skip_b, n_ovf, n_call, n_ret,
                       n_nested_ret, n_retk, n_ldpc, n_setb, n_clrb, n_pswwr, n_perwr,
                       n_perrd, n_carry, n_rot, n_hcf};
      foreach (cnt[i]) begin
        checks++;
        if (cnt[i] == 0) fail($sformatf("mechanism %0d never happened", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
