// bool_proc - Boolean processor of the Ims8NI core.
//
// Works on single bits of the bit-addressable data memory (bytes 00h-3Fh):
// the byte addressed by the instruction is read over the data bus, and the
// bit selected by the 3-bit bit address is set (SETB), cleared (CLRB) or
// tested (SB, skip if bit set). The modified byte goes back onto the data
// bus and is written on the falling clock edge together with every other
// write, so a read-modify-write takes one instruction cycle. The block is
// combinational; C_BOOL (op) selects the operation. That the block works by
// reading and rewriting the whole byte is this design's choice.
module bool_proc
  import ims8ni_pkg::*;
(
  input  bp_op_e     op,        // C_BOOL
  input  logic [2:0] bit_sel,   // BIT address from the instruction
  input  byte_t      rdata,     // byte read over the data bus
  output byte_t      wdata,     // modified byte for the write back
  output logic       bit_val    // value of the selected bit (SB)
);

  byte_t mask;

  always_comb begin
    mask    = byte_t'(1) << bit_sel;
    bit_val = |(rdata & mask);
    unique case (op)
      BP_SET:  wdata = rdata | mask;
      BP_CLR:  wdata = rdata & ~mask;
      default: wdata = rdata;
    endcase
  end

endmodule
