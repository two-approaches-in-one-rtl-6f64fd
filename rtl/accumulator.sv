// accumulator - the 8-bit accumulator of the Ims8NI core.
//
// Loaded on the falling clock edge, the core's write event, when the control
// unit asserts C_ACC (load). The source is either the ALU result or the
// 8-bit immediate operand field of the instruction (LD #imm, RET #imm), as
// the block diagram shows both feeding the accumulator. Asynchronous
// active-high reset clears it; the reset value is this design's choice.
module accumulator
  import ims8ni_pkg::*;
(
  input  logic  clk,
  input  logic  reset,
  input  logic  load,     // C_ACC
  input  logic  sel_imm,  // 1: immediate operand, 0: ALU result
  input  byte_t alu_y,
  input  byte_t imm,
  output byte_t acc
);

  always_ff @(negedge clk or posedge reset) begin
    if (reset)     acc <= '0;
    else if (load) acc <= sel_imm ? imm : alu_y;
  end

endmodule
