// psw_reg - program status word of the Ims8NI core, mapped at data address
// FFh.
//
// Bits: 0 = C (carry), 1 = Z (zero), 2 = N (negative), 3 reads as 0,
// 7:4 = general-purpose output bits that leave the core on four lines for
// peripherals. The register is written on the falling clock edge, the write
// event: either the whole byte from the data bus (ST to FFh) or the flags
// from the ALU (C only when carry_we, Z and N when flags_we). A bus write
// has priority; the control unit never asks for both in one instruction.
// The block diagram gives the PSW's address, its 3 flag lines from the ALU
// and to the control unit and 4 lines towards the peripherals; the meaning
// of each bit is this design's choice. Reset clears it.
module psw_reg
  import ims8ni_pkg::*;
(
  input  logic       clk,
  input  logic       reset,
  input  logic       bus_we,     // data-bus write to FFh
  input  byte_t      bus_wdata,
  input  logic       flags_we,   // update Z, N
  input  logic       carry_we,   // update C
  input  logic       c_in,
  input  logic       z_in,
  input  logic       n_in,
  output byte_t      psw,        // full byte for data-bus reads
  output logic [2:0] flags,      // {N, Z, C} to the control unit and ALU
  output logic [3:0] user_out    // PSW[7:4] to peripherals
);

  logic       c_q, z_q, n_q;
  logic [3:0] u_q;

  always_ff @(negedge clk or posedge reset) begin
    if (reset) begin
      c_q <= 1'b0;
      z_q <= 1'b0;
      n_q <= 1'b0;
      u_q <= '0;
    end else if (bus_we) begin
      c_q <= bus_wdata[PSW_C];
      z_q <= bus_wdata[PSW_Z];
      n_q <= bus_wdata[PSW_N];
      u_q <= bus_wdata[7:4];
    end else begin
      if (carry_we) c_q <= c_in;
      if (flags_we) begin
        z_q <= z_in;
        n_q <= n_in;
      end
    end
  end

  assign psw      = {u_q, 1'b0, n_q, z_q, c_q};
  assign flags    = {n_q, z_q, c_q};
  assign user_out = u_q;

endmodule
