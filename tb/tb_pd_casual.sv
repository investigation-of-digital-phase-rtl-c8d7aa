// tb_pd_casual: self-checking test of the detector for casual input signals.
// Checks the truth table (pump up only for fi=1, fo=1; pump down only for
// fi=1, fo=0; output floating whenever fi=0) and, for 16-cycle square waves
// with every lag d, that up minus down per period is 8 - 2*min(d, 16-d).
module tb_pd_casual;
  timeunit 1ns; timeprecision 1ps;
  import pd_pkg::*;

  logic fi, fo, q1_n, q2;
  pump_t pump;
  int checks = 0, failures = 0;

  pd_casual dut (.fi(fi), .fo(fo), .q1_n(q1_n), .q2(q2), .pump(pump));

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
    // fi fo : up dn
    fi = 0; fo = 0; #1; check(!pump.up && !pump.dn && q1_n && !q2, "fi=0 fo=0 floats");
    fi = 0; fo = 1; #1; check(!pump.up && !pump.dn && q1_n && !q2, "fi=0 fo=1 floats");
    fi = 1; fo = 0; #1; check(!pump.up &&  pump.dn && q1_n &&  q2, "fi=1 fo=0 pumps down");
    fi = 1; fo = 1; #1; check( pump.up && !pump.dn && !q1_n && !q2, "fi=1 fo=1 pumps up");
    for (int d = 0; d < 16; d++) begin
      int net;
      net = 0;
      for (int t = 0; t < 16; t++) begin
        fo = (t % 16) < 8;
        fi = (((t - d + 16) % 16) < 8);
        #1;
        net += int'(pump.up) - int'(pump.dn);
      end
      check(net == 8 - 2 * ((d < 16 - d) ? d : 16 - d),
            $sformatf("lag %0d: up-down %0d", d, net));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
