// data_mem - the 256-byte data address space of the Ims8NI core, apart from
// the PSW at FFh.
//
// Addresses below PERIPH_BASE are on-chip RAM (bytes 00h-3Fh of it are the
// bit-addressable cells); addresses from PERIPH_BASE to FEh form a window in
// which external peripherals (timers, ports, display controllers) sit on the
// data bus. FFh is left to the PSW. Reads are combinational, so an operand
// is on the bus within the cycle; writes happen on the falling clock edge,
// the core's write event. For the window, per_sel marks the access, per_we
// strobes a write (to be taken on the falling edge) and per_rdata is read
// back combinationally.
// The 256x8 space, the bit-addressable cells and the open attachment of
// peripherals follow the architecture; the split between RAM and the
// peripheral window (PERIPH_BASE = F0h) is this design's choice. The RAM is
// not reset.
module data_mem
  import ims8ni_pkg::*;
#(
  parameter int unsigned PERIPH_BASE = 'hF0
)(
  input  logic  clk,
  input  byte_t addr,
  input  byte_t wdata,
  input  logic  we,
  output byte_t rdata,
  // peripheral window
  output logic  per_sel,
  output logic  per_we,
  input  byte_t per_rdata
);

  byte_t ram [PERIPH_BASE];
  logic  in_ram;

  assign in_ram  = (32'(addr) < PERIPH_BASE);
  assign per_sel = !in_ram && (addr != PSW_ADDR);
  assign per_we  = per_sel && we;

  always_ff @(negedge clk) begin
    if (we && in_ram) ram[addr] <= wdata;
  end

  always_comb begin
    if (in_ram)       rdata = ram[addr];
    else if (per_sel) rdata = per_rdata;
    else              rdata = '0;
  end

endmodule
