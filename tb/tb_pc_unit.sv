// tb_pc_unit - self-checking test of the program counter.
// Checks the reset vector, then random next-PC selections (increment,
// skip, jump, LDPC, return, interrupt vector, hold) against a reference,
// including wrap-around at the top of the 1K program space.
module tb_pc_unit;
  import ims8ni_pkg::*;

  logic   clk = 1'b0, reset;
  pc_op_e op;
  pc_t    jump_addr, tos, pc, pc_plus1, model;
  byte_t  acc;
  int     checks = 0, failures = 0;

  pc_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #40000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; op = PC_HOLD; jump_addr = '0; tos = '0; acc = '0;
    #12;
    checks++; if (pc !== 10'h000) begin failures++; $display("FAIL reset vector"); end
    reset = 0;
    model = 10'h000;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      op = pc_op_e'($urandom_range(0, 6));
      if (i % 50 == 0) begin op = PC_JUMP; jump_addr = 10'h3FF; end   // wrap test
      else jump_addr = pc_t'($urandom);
      tos = pc_t'($urandom); acc = byte_t'($urandom);
      #1;
      checks++;
      if (pc_plus1 !== pc_t'(model + 1)) begin failures++; $display("FAIL pc+1"); end
      @(posedge clk);
      case (op)
        PC_INC:  model = pc_t'(model + 1);
        PC_SKIP: model = pc_t'(model + 2);
        PC_JUMP: model = jump_addr;
        PC_ACC:  model = {model[9:8], acc};
        PC_POP:  model = tos;
        PC_INT:  model = 10'h001;
        default: ;
      endcase
      #1;
      checks++;
      if (pc !== model) begin failures++; $display("FAIL %0d op=%0d pc=%h exp=%h", i, op, pc, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
