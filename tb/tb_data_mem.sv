// tb_data_mem - self-checking test of the data memory.
// Writes every RAM byte on the falling edge and reads it back, checks that
// writes only take effect on the falling edge, and that the peripheral
// window (F0h-FEh) raises per_sel/per_we and returns per_rdata while FFh
// (the PSW) selects neither.
module tb_data_mem;
  import ims8ni_pkg::*;

  logic  clk = 1'b1, we, per_sel, per_we;
  byte_t addr, wdata, rdata, per_rdata;
  byte_t model [240];
  int    checks = 0, failures = 0;

  data_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0; per_rdata = 8'h3C;
    for (int a = 0; a < 240; a++) begin
      @(posedge clk);
      addr = byte_t'(a); wdata = byte_t'(a * 7 + 3); we = 1; model[a] = wdata;
      @(negedge clk);
      #1 we = 0;
    end
    for (int i = 0; i < 1500; i++) begin
      @(posedge clk);
      addr = byte_t'($urandom); wdata = byte_t'($urandom); we = 1'($urandom);
      per_rdata = byte_t'($urandom);
      #1;
      checks++;
      if (addr < 8'hF0) begin
        if (rdata !== model[addr] || per_sel || per_we) begin
          failures++; $display("FAIL ram read %h: %h exp %h", addr, rdata, model[addr]);
        end
      end else if (addr == 8'hFF) begin
        if (per_sel || per_we) begin failures++; $display("FAIL FFh selects peripheral"); end
      end else begin
        if (!per_sel || per_we !== we || rdata !== per_rdata) begin
          failures++; $display("FAIL peripheral window %h", addr);
        end
      end
      @(negedge clk);
      if (we && addr < 8'hF0) model[addr] = wdata;
      #1;
      checks++;
      if (addr < 8'hF0 && rdata !== model[addr]) begin
        failures++; $display("FAIL write %h: %h exp %h", addr, rdata, model[addr]);
      end
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
