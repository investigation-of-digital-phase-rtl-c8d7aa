// tb_phase_setting: self-checking test of the phase-step counter and LED
// decoder. Each rising edge of the Set level must add one to step (mod 16),
// a held level must not count again, and exactly the LED of the current
// step must be lit (active low).
module tb_phase_setting;
  timeunit 1ns; timeprecision 1ps;
  import pd_pkg::*;

  logic clk = 0, rst_n, set_q;
  logic [STEP_BITS-1:0] step;
  logic [STEPS-1:0] led_n;
  int checks = 0, failures = 0;

  phase_setting dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    set_q = 0; rst_n = 0;
    repeat (3) @(posedge clk);
    #1 check(step == 0 && led_n == 16'hFFFE, "power-on step 0, LED 1 lit");
    rst_n = 1;
    for (k = 1; k <= 40; k++) begin
      @(negedge clk) set_q = 1;
      repeat ($urandom_range(1, 6)) @(negedge clk);
      set_q = 0;
      repeat ($urandom_range(1, 6)) @(negedge clk);
      check(step == 4'(k), $sformatf("press %0d: step %0d", k, step));
      check(led_n == ~(16'(1) << (k % 16)), $sformatf("press %0d: LEDs %h", k, led_n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
