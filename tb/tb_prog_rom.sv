// tb_prog_rom - self-checking test of the program ROM.
// One instance is loaded from tb/tb_prog_rom.hex, whose 64 words follow the
// formula word[i] = (i*2A7h + 113h) mod 2000h, and the words after them must
// read 0; a second instance with an empty INIT_FILE must read 0 everywhere. Reads are combinational.
module tb_prog_rom;
  import ims8ni_pkg::*;

  pc_t    addr;
  instr_t data, data0;
  int     checks = 0, failures = 0;

  prog_rom #(.INIT_FILE("tb/tb_prog_rom.hex")) dut  (.addr(addr), .data(data));
  prog_rom #(.INIT_FILE(""))                    dut0 (.addr(addr), .data(data0));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      addr = pc_t'(i);
      #1;
      checks++;
      if (data !== instr_t'((i * 'h2A7 + 'h113) % 'h2000)) begin
        failures++; $display("FAIL word %0d = %h", i, data);
      end
    end
    for (int i = 64; i < 1024; i++) begin
      addr = pc_t'(i);
      #1;
      checks++;
      if (data !== '0) begin failures++; $display("FAIL unset word %0d = %h", i, data); end
    end
    for (int i = 0; i < 1024; i++) begin
      addr = pc_t'(i);
      #1;
      checks++;
      if (data0 !== '0) begin failures++; $display("FAIL blank word %0d = %h", i, data0); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
