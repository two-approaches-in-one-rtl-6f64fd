// tb_bool_proc - self-checking test of the Boolean processor.
// For every byte value, bit position and operation, checks the rewritten
// byte and the tested bit against a reference built bit by bit.
module tb_bool_proc;
  import ims8ni_pkg::*;

  bp_op_e     op;
  logic [2:0] bit_sel;
  byte_t      rdata, wdata;
  logic       bit_val;
  int         checks = 0, failures = 0;

  bool_proc dut (.op(op), .bit_sel(bit_sel), .rdata(rdata), .wdata(wdata),
                 .bit_val(bit_val));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++)
      for (int k = 0; k < 8; k++)
        for (int o = 0; o < 4; o++) begin
          byte_t e;
          rdata = byte_t'(v); bit_sel = 3'(k); op = bp_op_e'(o);
          e = byte_t'(v);
          if (op == BP_SET) e[k] = 1'b1;
          if (op == BP_CLR) e[k] = 1'b0;
          #1;
          checks++;
          if (wdata !== e || bit_val !== v[k]) begin
            failures++;
            $display("FAIL op=%0d v=%h k=%0d -> %h %b", o, v, k, wdata, bit_val);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
