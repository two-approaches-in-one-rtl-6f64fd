// tb_accumulator - self-checking test of the accumulator.
// Random loads from the ALU or the immediate field; checks that the value
// changes only on a falling clock edge with load asserted, and reset.
module tb_accumulator;
  import ims8ni_pkg::*;

  logic  clk = 1'b1, reset, load, sel_imm;
  byte_t alu_y, imm, acc, model;
  int    checks = 0, failures = 0;

  accumulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; load = 0; sel_imm = 0; alu_y = 8'h55; imm = 8'hAA;
    #12 reset = 0;
    checks++; if (acc !== 8'h00) begin failures++; $display("FAIL reset"); end
    model = 8'h00;
    for (int i = 0; i < 500; i++) begin
      @(posedge clk);
      load = 1'($urandom); sel_imm = 1'($urandom);
      alu_y = byte_t'($urandom); imm = byte_t'($urandom);
      #2;   // clock high: nothing may change yet
      checks++;
      if (acc !== model) begin failures++; $display("FAIL early change %0d", i); end
      @(negedge clk);
      if (load) model = sel_imm ? imm : alu_y;
      #1;
      checks++;
      if (acc !== model) begin
        failures++; $display("FAIL %0d acc=%h exp=%h", i, acc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
