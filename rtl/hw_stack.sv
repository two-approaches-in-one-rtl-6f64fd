// hw_stack - hidden hardware return-address stack of the Ims8NI core.
//
// LEVELS registers of PC_W bits (Top-Of-Stack, Level 2, Level 3 with the
// default of three levels), built as a shift register: a push moves every
// level down one place and loads the top, a pop moves every level up one
// place and clears the bottom. The stack is not program accessible: only
// CALL, RET, RET #imm and interrupt entry move it (C_STACK). It is clocked on
// the rising edge together with the program counter.
//
// A push onto a full stack loses the bottom entry; a pop from an empty stack
// returns 0. The stack itself cannot signal these, so 'depth' (saturating
// count of valid entries) and the one-cycle 'overflow'/'underflow' strobes
// are provided for the interrupt logic and for monitoring. The three levels
// and the width follow the architecture; the overflow behaviour is this
// design's choice.
module hw_stack
  import ims8ni_pkg::*;
#(
  parameter int unsigned LEVELS = STACK_LEVELS,
  parameter int unsigned W      = PC_W
)(
  input  logic                       clk,
  input  logic                       reset,
  input  stk_op_e                    op,       // C_STACK
  input  logic [W-1:0]               din,
  output logic [W-1:0]               tos,
  output logic [$clog2(LEVELS+1)-1:0] depth,
  output logic                       overflow,  // push while full
  output logic                       underflow  // pop while empty
);

  localparam int unsigned DW = $clog2(LEVELS+1);

  logic [W-1:0] lvl [LEVELS];

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      for (int i = 0; i < LEVELS; i++) lvl[i] <= '0;
      depth <= '0;
    end else begin
      unique case (op)
        STK_PUSH: begin
          lvl[0] <= din;
          for (int i = 1; i < LEVELS; i++) lvl[i] <= lvl[i-1];
          if (depth != DW'(LEVELS)) depth <= depth + 1'b1;
        end
        STK_POP: begin
          for (int i = 0; i < LEVELS-1; i++) lvl[i] <= lvl[i+1];
          lvl[LEVELS-1] <= '0;
          if (depth != '0) depth <= depth - 1'b1;
        end
        default: ;
      endcase
    end
  end

  assign tos       = lvl[0];
  assign overflow  = (op == STK_PUSH) && (depth == DW'(LEVELS));
  assign underflow = (op == STK_POP)  && (depth == '0);

endmodule
