// alu - arithmetic-logic unit of the Ims8NI core.
//
// Purely combinational, as the core's timing scheme lets it be: the operands
// are the accumulator (a) and the data-bus operand (b); the operation comes
// from the control unit on three lines. It performs the one arithmetic
// operation of the instruction set, addition without an input carry, and the
// logical operations AND, OR, XOR and rotation of the accumulator right or
// left through the carry flag. ALU_PASS forwards b (LD direct) and ALU_NONE
// forwards a.
//
// Three flag lines go to the PSW: carry (carry out of ADD, or the bit
// rotated out), zero and negative (bit 7 of the result). Which flags exist
// beyond the carry and zero flags that the skip instructions test, and that
// rotation goes through the carry, are this design's reading of the
// instruction names.
module alu
  import ims8ni_pkg::*;
(
  input  alu_op_e     op,
  input  byte_t       a,       // accumulator
  input  byte_t       b,       // data bus operand
  input  logic        c_in,    // current carry flag (rotations)
  output byte_t       y,
  output logic        c_out,
  output logic        z_out,
  output logic        n_out
);

  always_comb begin
    c_out = c_in;
    unique case (op)
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_ADD:  {c_out, y} = {1'b0, a} + {1'b0, b};
      ALU_PASS: y = b;
      ALU_RRC:  begin y = {c_in, a[7:1]}; c_out = a[0]; end
      ALU_RLC:  begin y = {a[6:0], c_in}; c_out = a[7]; end
      default:  y = a;
    endcase
    z_out = (y == '0);
    n_out = y[DATA_W-1];
  end

endmodule
