// tb_ims8ni_fft - an 8-point FFT of real 8-bit samples on the Ims8NI core.
//
// The program is generated here with the assembler functions of
// ims8ni_tb_pkg as straight-line code for a radix-2 decimation-in-time FFT:
//   stage 1  a0..a7 = x0+-x4, x2+-x6, x1+-x5, x3+-x7
//   stage 2  E0 = a0+a2, E2 = a0-a2, O0 = a4+a6, O2 = a4-a6
//   stage 3  X0 = E0+O0, X4 = E0-O0, X2 = E2 - jO2, X6 = E2 + jO2,
//            m1 = c(a5-a7), m2 = c(a5+a7), c = 1/sqrt(2),
//            X1 = (a1+m1) - j(a3+m2), X7 = conj(X1),
//            X3 = (a1-m1) + j(a3-m2), X5 = conj(X3).
// Subtraction is a - b = ~(~a + b). The constant c is approximated by
// 1/2 + 1/8 + 1/16 + 1/64 = 0.703 with arithmetic right shifts; an
// arithmetic shift is ST t / ADD t (carry = sign) / LD t / RRC.
// Samples lie in [-15, 15] so that no 8-bit result overflows. Inputs are
// at 40h-47h, the real parts of X0..X7 at 50h-57h, the imaginary parts at
// 58h-5Fh.
//
// For several random input vectors the testbench checks the outputs
// bit-exactly against the same fixed-point formulas evaluated here in
// integer arithmetic, and against a floating-point DFT within 4 LSB. It
// checks that the run takes one clock per instruction and reports the time
// at a 15 MHz clock; the run must stay within 15 us (the core is credited
// with about 10 us for this transform at that clock).
module tb_ims8ni_fft;
  import ims8ni_pkg::*;
  import ims8ni_tb_pkg::*;

  localparam int VECTORS = 24;
  localparam int X_IN = 'h40, XR = 'h50, XI = 'h58;
  localparam int A = 'h60, E0 = 'h68, E2 = 'h69, O0 = 'h6A, O2 = 'h6B;
  localparam int M1 = 'h6C, M2 = 'h6D, NA3 = 'h6E, C_FF = 'h70, C_01 = 'h71;
  localparam int T = 'h72, R = 'h73, U = 'h74, V = 'h75, D = 'h76;

  logic       clk = 1'b0, reset = 1'b0, int_req = 1'b0;
  logic       hcf, per_sel, per_we, int_taken;
  byte_t      per_addr, per_wdata, acc;
  byte_t      per_rdata = 8'h00;
  logic [3:0] psw_out;
  pc_t        pc;

  ims8ni dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------------------------------------------- code generation
  instr_t p [1024];
  int     pcg;
  function automatic void e(instr_t i); p[pcg] = i; pcg++; endfunction
  function automatic void add(int d, int a, int b); e(LD(a)); e(ADD(b)); e(ST(d)); endfunction
  function automatic void sub(int d, int a, int b);
    e(LD(a)); e(XOR_(C_FF)); e(ADD(b)); e(XOR_(C_FF)); e(ST(d));
  endfunction
  function automatic void neg(int d, int a); e(LD(a)); e(XOR_(C_FF)); e(ADD(C_01)); e(ST(d)); endfunction
  function automatic void cpy(int d, int a); e(LD(a)); e(ST(d)); endfunction
  function automatic void asr(); e(ST(T)); e(ADD(T)); e(LD(T)); e(RRC); endfunction
  function automatic void mulc(int d, int a);
    e(LD(a)); asr(); e(ST(R));            // a/2
    asr(); asr(); e(ST(U));               // a/8
    asr(); e(ST(V));                      // a/16
    asr(); asr();                         // a/64
    e(ADD(V)); e(ADD(U)); e(ADD(R)); e(ST(d));
  endfunction

  function automatic int gen();
    foreach (p[i]) p[i] = HCF;
    pcg = 0;
    e(LDI('hFF)); e(ST(C_FF)); e(LDI('h01)); e(ST(C_01));
    // stage 1 (bit-reversed pairs)
    add(A+0, X_IN+0, X_IN+4); sub(A+1, X_IN+0, X_IN+4);
    add(A+2, X_IN+2, X_IN+6); sub(A+3, X_IN+2, X_IN+6);
    add(A+4, X_IN+1, X_IN+5); sub(A+5, X_IN+1, X_IN+5);
    add(A+6, X_IN+3, X_IN+7); sub(A+7, X_IN+3, X_IN+7);
    // stage 2
    add(E0, A+0, A+2); sub(E2, A+0, A+2);
    add(O0, A+4, A+6); sub(O2, A+4, A+6);
    // stage 3
    add(XR+0, E0, O0); sub(XR+4, E0, O0);
    e(LDI(0)); e(ST(XI+0)); e(ST(XI+4));
    cpy(XR+2, E2); cpy(XR+6, E2); neg(XI+2, O2); cpy(XI+6, O2);
    sub(D, A+5, A+7); mulc(M1, D);
    add(D, A+5, A+7); mulc(M2, D);
    add(XR+1, A+1, M1); cpy(XR+7, XR+1);
    sub(XR+3, A+1, M1); cpy(XR+5, XR+3);
    neg(NA3, A+3);
    sub(XI+1, NA3, M2); add(XI+7, A+3, M2);
    sub(XI+3, A+3, M2); add(XI+5, NA3, M2);
    e(HCF);
    return pcg;
  endfunction

  // ---------------------------------------------------- references
  function automatic byte_t mulc_ref(byte_t a);
    logic signed [7:0] s = a;
    return byte_t'((s >>> 1) + (s >>> 3) + (s >>> 4) + (s >>> 6));
  endfunction

  task automatic reference(input byte_t x [8], output byte_t xr [8], output byte_t xi [8]);
    byte_t a [8], e0, e2, o0, o2, m1, m2;
    a[0] = x[0] + x[4]; a[1] = x[0] - x[4]; a[2] = x[2] + x[6]; a[3] = x[2] - x[6];
    a[4] = x[1] + x[5]; a[5] = x[1] - x[5]; a[6] = x[3] + x[7]; a[7] = x[3] - x[7];
    e0 = a[0] + a[2]; e2 = a[0] - a[2]; o0 = a[4] + a[6]; o2 = a[4] - a[6];
    m1 = mulc_ref(a[5] - a[7]); m2 = mulc_ref(a[5] + a[7]);
    xr[0] = e0 + o0; xi[0] = 0;  xr[4] = e0 - o0; xi[4] = 0;
    xr[2] = e2; xi[2] = -o2;     xr[6] = e2; xi[6] = o2;
    xr[1] = a[1] + m1; xi[1] = -a[3] - m2;  xr[7] = xr[1]; xi[7] = a[3] + m2;
    xr[3] = a[1] - m1; xi[3] = a[3] - m2;   xr[5] = xr[3]; xi[5] = -a[3] + m2;
  endtask

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int    n_instr, cycles;
    byte_t x [8], xr [8], xi [8];
    real   worst_err = 0.0;
    n_instr = gen();
    for (int v = 0; v < VECTORS; v++) begin
      for (int k = 0; k < 8; k++) x[k] = byte_t'($urandom_range(0, 30) - 15);
      if (v == 0) x = '{8'd15, 8'd15, 8'd15, 8'd15, 8'd15, 8'd15, 8'd15, 8'd15};
      @(posedge clk); #1 reset = 1'b1;
      foreach (p[a]) dut.u_rom.mem[a] = p[a];
      for (int k = 0; k < 8; k++) dut.u_dmem.ram[X_IN + k] = x[k];
      #1 reset = 1'b0;
      cycles = 0;
      while (!hcf && cycles < 1000) begin @(posedge clk); #1 cycles++; end
      // one clock per instruction: the HCF at the end is the n_instr-th
      checks++;
      if (cycles != n_instr) begin
        failures++; $display("FAIL vector %0d: %0d clocks for %0d instructions", v, cycles, n_instr);
      end
      reference(x, xr, xi);
      for (int k = 0; k < 8; k++) begin
        real re, im;
        re = 0.0; im = 0.0;
        for (int n = 0; n < 8; n++) begin
          re += $itor($signed(x[n])) * $cos(2.0 * 3.14159265358979 * k * n / 8.0);
          im -= $itor($signed(x[n])) * $sin(2.0 * 3.14159265358979 * k * n / 8.0);
        end
        checks++;
        if (dut.u_dmem.ram[XR + k] !== xr[k] || dut.u_dmem.ram[XI + k] !== xi[k]) begin
          failures++;
          $display("FAIL vector %0d X%0d = (%0d, %0d), reference (%0d, %0d)", v, k,
                   $signed(dut.u_dmem.ram[XR + k]), $signed(dut.u_dmem.ram[XI + k]),
                   $signed(xr[k]), $signed(xi[k]));
        end
        checks++;
        begin
          real er, ei;
          er = $itor($signed(dut.u_dmem.ram[XR + k])) - re;
          ei = $itor($signed(dut.u_dmem.ram[XI + k])) - im;
          if (er < 0) er = -er;
          if (ei < 0) ei = -ei;
          if (er > worst_err) worst_err = er;
          if (ei > worst_err) worst_err = ei;
          if (er > 4.0 || ei > 4.0) begin
            failures++; $display("FAIL vector %0d X%0d differs from the DFT (%f, %f)", v, k, re, im);
          end
        end
      end
    end
    $display("8-point FFT: %0d instructions (%0d clocks) = %0.2f us at 15 MHz, then HCF; worst error vs DFT %0.2f LSB",
             n_instr - 1, n_instr - 1, (n_instr - 1) / 15.0, worst_err);
    checks++;
    if ((n_instr - 1) / 15.0 > 15.0) begin failures++; $display("FAIL FFT slower than 15 us at 15 MHz"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
