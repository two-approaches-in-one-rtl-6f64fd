// tb_alu - self-checking test of the Ims8NI ALU.
// Drives random operands, carry-in and every operation, and compares the
// result and the C/Z/N flags with a reference computed here from the
// instruction definitions (8-bit add with carry out, rotate through carry).
module tb_alu;
  import ims8ni_pkg::*;

  alu_op_e op;
  byte_t   a, b, y;
  logic    c_in, c_out, z_out, n_out;
  int      checks = 0, failures = 0;

  alu dut (.op(op), .a(a), .b(b), .c_in(c_in), .y(y), .c_out(c_out),
           .z_out(z_out), .n_out(n_out));

  task automatic check_one();
    byte_t ey; logic ec; int s;
    ec = c_in;
    case (op)
      ALU_AND:  ey = a & b;
      ALU_OR:   ey = a | b;
      ALU_XOR:  ey = a ^ b;
      ALU_ADD:  begin s = int'(a) + int'(b); ey = s[7:0]; ec = s > 255; end
      ALU_PASS: ey = b;
      ALU_RRC:  begin ey = (a >> 1) | (c_in ? 8'h80 : 8'h00); ec = a[0]; end
      ALU_RLC:  begin ey = (a << 1) | (c_in ? 8'h01 : 8'h00); ec = a[7]; end
      default:  ey = a;
    endcase
    #1;
    checks++;
    if (y !== ey || c_out !== ec || z_out !== (ey == 0) || n_out !== ey[7]) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h c=%b -> y=%h c=%b z=%b n=%b (exp %h %b)",
               op, a, b, c_in, y, c_out, z_out, n_out, ey, ec);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corner cases
    op = ALU_ADD; a = 8'hFF; b = 8'h01; c_in = 0; check_one();   // carry, zero
    op = ALU_ADD; a = 8'h7F; b = 8'h01; c_in = 1; check_one();   // no carry in
    op = ALU_RRC; a = 8'h01; b = 0;     c_in = 0; check_one();
    op = ALU_RLC; a = 8'h80; b = 0;     c_in = 1; check_one();
    for (int i = 0; i < 4000; i++) begin
      op   = alu_op_e'($urandom_range(0, 7));
      a    = byte_t'($urandom);
      b    = byte_t'($urandom);
      c_in = 1'($urandom);
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
