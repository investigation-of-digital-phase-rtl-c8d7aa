// tb_dac4_model: self-checking test of the 4-bit DAC model.
// Every code must give 5 V * code / 16; codes 8 and 15 must give the 2.5 V and
// 4.6875 V levels marked on the counter detector's response.
module tb_dac4_model;
  timeunit 1ns; timeprecision 1ps;

  logic [3:0] db;
  real vout;
  int checks = 0, failures = 0;

  dac4_model dut (.db(db), .vout(vout));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(real a, real b);
    return (a - b < 1.0e-9) && (b - a < 1.0e-9);
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 16; c++) begin
      db = 4'(c);
      #1;
      check(near(vout, 0.3125 * c), $sformatf("code %0d gives %f V", c, vout));
    end
    db = 4'd8;  #1; check(near(vout, 2.5), "mid scale 2.5 V");
    db = 4'd15; #1; check(near(vout, 4.6875), "full scale 4.6875 V");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
