// tb_psw_reg - self-checking test of the PSW register.
// Random mixes of bus writes and ALU flag updates, checked after each
// falling edge against a reference of the bit layout {user[3:0],0,N,Z,C}.
module tb_psw_reg;
  import ims8ni_pkg::*;

  logic       clk = 1'b1, reset, bus_we, flags_we, carry_we, c_in, z_in, n_in;
  byte_t      bus_wdata, psw, model;
  logic [2:0] flags;
  logic [3:0] user_out;
  int         checks = 0, failures = 0;

  psw_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1; bus_we = 0; flags_we = 0; carry_we = 0;
    c_in = 0; z_in = 0; n_in = 0; bus_wdata = 0;
    #12 reset = 0;
    model = 8'h00;
    for (int i = 0; i < 600; i++) begin
      @(posedge clk);
      bus_we = ($urandom_range(0, 3) == 0);
      flags_we = 1'($urandom); carry_we = 1'($urandom);
      c_in = 1'($urandom); z_in = 1'($urandom); n_in = 1'($urandom);
      bus_wdata = byte_t'($urandom);
      @(negedge clk);
      if (bus_we) model = bus_wdata & 8'hF7;
      else begin
        if (carry_we) model[0] = c_in;
        if (flags_we) begin model[1] = z_in; model[2] = n_in; end
      end
      #1;
      checks++;
      if (psw !== model || flags !== model[2:0] || user_out !== model[7:4]) begin
        failures++; $display("FAIL %0d psw=%h exp=%h", i, psw, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
