// tb_hw_stack - self-checking test of the 3-level return stack.
// Random push/pop sequences, including pushes onto a full stack and pops
// from an empty one, checked against a reference array that drops the
// bottom entry on overflow and yields 0 on underflow.
module tb_hw_stack;
  import ims8ni_pkg::*;

  logic      clk = 1'b0, reset;
  stk_op_e   op;
  pc_t       din, tos;
  logic [1:0] depth;
  logic      overflow, underflow;
  pc_t       m [3];
  int        md;
  int        checks = 0, failures = 0, n_ovf = 0, n_unf = 0;

  hw_stack dut (.*);

  always #5 clk = ~clk;

  initial begin
    #40000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; op = STK_NONE; din = '0;
    m = '{default: '0}; md = 0;
    #12 reset = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      op  = stk_op_e'($urandom_range(0, 2));
      din = pc_t'($urandom);
      #1;
      checks++;
      if (overflow !== (op == STK_PUSH && md == 3) ||
          underflow !== (op == STK_POP && md == 0)) begin
        failures++; $display("FAIL strobes %0d", i);
      end
      if (overflow) n_ovf++;
      if (underflow) n_unf++;
      @(posedge clk);
      if (op == STK_PUSH) begin
        m[2] = m[1]; m[1] = m[0]; m[0] = din; if (md < 3) md++;
      end else if (op == STK_POP) begin
        m[0] = m[1]; m[1] = m[2]; m[2] = '0; if (md > 0) md--;
      end
      #1;
      checks++;
      if (tos !== m[0] || depth !== 2'(md)) begin
        failures++; $display("FAIL %0d tos=%h exp=%h depth=%0d exp=%0d", i, tos, m[0], depth, md);
      end
    end
    checks++;
    if (n_ovf == 0 || n_unf == 0) begin failures++; $display("FAIL no overflow/underflow seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
