// tb_loop_filter_model: self-checking test of the charge pump and filter
// model. Passive filter: charging from 0 V towards 5 V must follow
// 5 * (1 - (1 - T/RC)^n), and a floating input must hold the voltage.
// Active filter: a constant input of 3 V must settle at
// 2.5 - (3 - 2.5) * R_FB / R_IN = 2.0 V, a floating input must decay
// towards 2.5 V, and a 5 V input must take the output to 0 V and no lower.
module tb_loop_filter_model;
  timeunit 1ns; timeprecision 1ps;

  localparam real T = 62.5e-6, RC = 100.0e3 * 470.0e-9;
  logic clk = 0, rst_n, active, drive;
  real vpd, vout;
  int checks = 0, failures = 0;

  loop_filter_model #(.V_INIT(0.0)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(real a, real b, real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real held;
    rst_n = 0; active = 0; drive = 0; vpd = 0.0;
    repeat (2) @(posedge clk);
    #1 check(vout == 0.0, "reset to V_INIT");
    @(negedge clk) begin rst_n = 1; drive = 1; vpd = 5.0; end
    for (int n = 1; n <= 3000; n++) begin
      @(posedge clk); #1;
      if (n % 500 == 0)
        check(near(vout, 5.0 * (1.0 - (1.0 - T / RC) ** n), 1.0e-6),
              $sformatf("passive charge after %0d steps: %f", n, vout));
    end
    @(negedge clk) drive = 0;
    held = vout;
    repeat (1000) @(posedge clk);
    #1 check(vout == held, "passive filter holds while the input floats");
    // active filter
    @(negedge clk) begin active = 1; drive = 1; vpd = 3.0; end
    repeat (8000) @(posedge clk);
    #1 check(near(vout, 2.0, 1.0e-3), $sformatf("active settles at %f, expected 2.0", vout));
    @(negedge clk) drive = 0;
    repeat (8000) @(posedge clk);
    #1 check(near(vout, 2.5, 1.0e-3), $sformatf("active decays to %f, expected 2.5", vout));
    @(negedge clk) begin drive = 1; vpd = 5.0; end
    repeat (8000) @(posedge clk);
    #1 check(vout >= 0.0 && vout < 1.0e-3, $sformatf("active output goes to %f, expected 0 V", vout));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
