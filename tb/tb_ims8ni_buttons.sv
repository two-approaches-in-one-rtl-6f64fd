// tb_ims8ni_buttons - the Ims8NI core running a small control program of
// the kind it was designed for: button sampling with debouncing, a seven-
// segment display and an actuator output.
//
// The program is the core's default ROM image (rtl/ims8ni_demo.hex). The
// testbench first checks that image word by word against the program built
// here with the assembler functions of ims8ni_tb_pkg, then runs it:
//  * A periodic INT (a sampling timer, every TICK clocks) enters the handler
//    at 001h. The handler saves ACC, reads the button port F0h, and accepts
//    a new debounced state only when two successive samples agree. A press
//    of button 1 (debounced 0 -> 1) increments a counter. It acknowledges
//    the timer through F2h, restores ACC and returns.
//  * The main loop copies debounced button 0 to actuator bit PSW[4] (psw_out
//    bit 0) with SB, and shows the low four bits of the press counter on
//    the display port F1h through a seven-segment table in page 300h read
//    with LDPC and RET #imm.
// The testbench drives bouncing button presses (bounce shorter than one
// sampling period) and checks the display code and actuator against the
// presses it applied. The clock period is 66 ns, the instruction cycle of
// the core at 2 um; the time from a settled press to the display update is
// reported and must be below three sampling periods.
module tb_ims8ni_buttons;
  import ims8ni_pkg::*;
  import ims8ni_tb_pkg::*;

  localparam int TICK    = 60;     // clocks between sampling interrupts
  localparam int PRESSES = 12;

  logic       clk = 1'b0, reset = 1'b0, int_req = 1'b0;
  logic       hcf, per_sel, per_we, int_taken;
  byte_t      per_addr, per_wdata, per_rdata, acc;
  logic [3:0] psw_out;
  pc_t        pc;

  ims8ni dut (.*);

  always #33 clk = ~clk;           // 66 ns instruction cycle

  // peripherals: F0h buttons, F1h display latch, F2h timer acknowledge
  byte_t buttons = 8'h00, display = 8'h00;
  assign per_rdata = (per_addr == P_IN) ? buttons : (per_addr == P_OUT) ? display : 8'h00;
  always @(negedge clk) if (per_we) begin
    if (per_addr == P_OUT) display <= per_wdata;
    if (per_addr == P_ACK) int_req <= 1'b0;
  end

  // sampling timer
  int clk_count = 0;
  always @(posedge clk) if (!reset) begin
    clk_count <= clk_count + 1;
    if (clk_count % TICK == TICK - 1) int_req <= 1'b1;
  end

  int checks = 0, failures = 0, n_int = 0, n_ldpc = 0, n_sb_skip = 0;
  always @(negedge clk) if (!reset) begin
    if (int_taken) n_int++;
    if (dut.ctrl.pc_op == PC_ACC) n_ldpc++;
    if (dut.ctrl.pc_op == PC_SKIP && dut.instr[12:11] == 2'b10) n_sb_skip++;
  end

  // seven-segment codes, segments g..a
  function automatic byte_t seg(int d);
    byte_t t [16] = '{8'h3F, 8'h06, 8'h5B, 8'h4F, 8'h66, 8'h6D, 8'h7D, 8'h07,
                      8'h7F, 8'h6F, 8'h77, 8'h7C, 8'h39, 8'h5E, 8'h79, 8'h71};
    return t[d & 15];
  endfunction

  // RAM use: 00h debounced, 01h last sample, 02h press count, 03h sample,
  // 04h = 0Fh, 05h = 10h, 0Ah saved ACC
  task automatic build(output instr_t p [1024]);
    foreach (p[a]) p[a] = '0;
    p['h000] = JMP('h010);
    p['h001] = JMP('h080);
    p['h010] = LDI(0);   p['h011] = ST('h00); p['h012] = ST('h01); p['h013] = ST('h02);
    p['h014] = LDI('h0F); p['h015] = ST('h04); p['h016] = LDI('h10); p['h017] = ST('h05);
    // main loop
    p['h018] = SB('h00, 0);               // debounced button 0 set -> skip
    p['h019] = JMP('h01C);
    p['h01A] = LDI('h10);                 // actuator on (PSW[4])
    p['h01B] = JMP('h01D);
    p['h01C] = LDI('h00);                 // actuator off
    p['h01D] = ST('hFF);
    p['h01E] = LD('h02);
    p['h01F] = CALL('h300);
    p['h020] = ST(P_OUT);
    p['h021] = JMP('h018);
    // sampling interrupt handler
    p['h080] = ST('h0A);                  // save ACC
    p['h081] = LD(P_IN);
    p['h082] = ST('h03);
    p['h083] = XOR_('h01);                 // same as the previous sample?
    p['h084] = SZ;
    p['h085] = JMP('h08F);                // no: not stable yet
    p['h086] = SB('h00, 1);               // old debounced button 1 set?
    p['h087] = JMP('h089);
    p['h088] = JMP('h08D);                // it was already pressed
    p['h089] = SB('h03, 1);               // newly pressed?
    p['h08A] = JMP('h08D);
    p['h08B] = LDI(1);
    p['h08C] = JMP('h0A0);
    p['h08D] = LD('h03);
    p['h08E] = ST('h00);                  // debounced = sample
    p['h08F] = LD('h03);
    p['h090] = ST('h01);                  // previous sample = sample
    p['h091] = ST(P_ACK);
    p['h092] = LD('h0A);                  // restore ACC
    p['h093] = RET;
    p['h0A0] = ADD('h02);                 // count++
    p['h0A1] = ST('h02);
    p['h0A2] = JMP('h08D);
    // seven-segment table
    p['h300] = AND_('h04);
    p['h301] = OR_('h05);
    p['h302] = LDPC;                      // -> 310h + digit
    for (int d = 0; d < 16; d++) p['h310 + d] = RETK(seg(d));
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bounce_to(byte_t v);
    // a burst of bounces lasting well under one sampling period
    for (int k = 0; k < 5; k++) begin
      buttons = (k % 2 == 0) ? v : ~v & 8'h03;
      repeat ($urandom_range(2, 6)) @(posedge clk);
    end
    buttons = v;
  endtask

  task automatic expect_outputs(int presses, logic act, string when);
    checks++;
    if (display !== seg(presses) || psw_out[0] !== act) begin
      failures++;
      $display("FAIL %s: display %h (exp %h), actuator %b (exp %b)", when, display, seg(presses), psw_out[0], act);
    end
  endtask

  initial begin
    instr_t p [1024];
    int     presses = 0;
    time    t0, worst = 0;
    $timeformat(-9, 0, " ns", 0);
    build(p);
    foreach (p[a]) begin
      checks++;
      if (dut.u_rom.mem[a] !== p[a]) begin
        failures++; $display("FAIL ROM image word %h = %h, expected %h", a, dut.u_rom.mem[a], p[a]);
      end
    end
    @(posedge clk); #1 reset = 1'b1;
    #1 reset = 1'b0;
    repeat (4 * TICK) @(posedge clk);
    expect_outputs(0, 1'b0, "after start");
    for (int k = 0; k < PRESSES; k++) begin
      // press button 1 (and toggle button 0 every third press)
      logic act = (k % 3 == 2);
      bounce_to({6'b0, 1'b1, act});
      t0 = $time;
      presses++;
      while (display !== seg(presses) && $time - t0 < 4 * TICK * 66) @(posedge clk);
      if ($time - t0 > worst) worst = $time - t0;
      checks++;
      if ($time - t0 >= 3 * TICK * 66) begin
        failures++; $display("FAIL press %0d took %0t", k, $time - t0);
      end
      repeat (3 * TICK) @(posedge clk);
      expect_outputs(presses, act, "after press");
      bounce_to({6'b0, 1'b0, act});
      repeat (3 * TICK) @(posedge clk);
      expect_outputs(presses, act, "after release");
    end
    checks++;
    if (n_int == 0 || n_ldpc == 0 || n_sb_skip == 0) begin
      failures++; $display("FAIL a mechanism never ran: int %0d ldpc %0d sb-skip %0d", n_int, n_ldpc, n_sb_skip);
    end
    $display("%0d presses counted, %0d sampling interrupts, worst press-to-display %0t",
             presses, n_int, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
