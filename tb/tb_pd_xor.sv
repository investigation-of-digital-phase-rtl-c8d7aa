// tb_pd_xor: self-checking test of the XOR phase detector.
// Checks the truth table, then drives two 16-cycle square waves with every
// lag d = 0..15 and checks that the output is high 2*min(d, 16-d) cycles per
// period (the triangular phase-voltage response).
module tb_pd_xor;
  timeunit 1ns; timeprecision 1ps;
  import pd_pkg::*;

  logic fi, fo, pd;
  pump_t pump;
  int checks = 0, failures = 0;

  pd_xor dut (.fi(fi), .fo(fo), .pd(pd), .pump(pump));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {fi, fo} = 2'(v);
      #1;
      check(pd == (v == 1 || v == 2), $sformatf("truth table %0d", v));
      check(pump.up == pd && pump.dn == !pd, "pump drive");
    end
    for (int d = 0; d < 16; d++) begin
      int high;
      high = 0;
      for (int t = 0; t < 16; t++) begin
        fo = (t % 16) < 8;
        fi = (((t - d + 16) % 16) < 8);
        #1;
        high += int'(pd);
      end
      check(high == 2 * ((d < 16 - d) ? d : 16 - d),
            $sformatf("lag %0d: high %0d cycles", d, high));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
