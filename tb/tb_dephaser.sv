// tb_dephaser: self-checking test of the Johnson-counter dephaser.
// For every step k = 0..15 it releases Reset and checks that fo is a 50 %
// square wave of 16 f_osc periods, that fi equals fo delayed by exactly k
// f_osc periods once k periods have passed, and that during Reset fo is 0
// and fi is step[3]. It runs once with f_osc = clk and once with f_osc
// every third clk.
module tb_dephaser;
  timeunit 1ns; timeprecision 1ps;
  import pd_pkg::*;

  logic clk = 0, osc_en, r, fo, fi;
  logic [STEP_BITS-1:0] step;
  logic [JOHNSON_BITS-1:0] taps;
  int checks = 0, failures = 0;

  dephaser dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int k, input int div);
    logic hist[$];   // fo after each f_osc edge
    int bad = 0, hi = 0, n = 0;
    @(negedge clk) begin r = 1; step = 4'(k); osc_en = 1; end
    @(negedge clk);
    check(fo == 0 && fi == step[3] && taps == 0, $sformatf("step %0d: outputs during Reset", k));
    r = 0;
    for (int t = 0; t < 64 * div; t++) begin
      @(negedge clk) osc_en = ((t % div) == 0);
      @(posedge clk); #1;
      if (osc_en) begin
        hist.push_back(fo);
        n = hist.size();
        if (n > 16) begin
          hi += int'(fo);
          if (n > k && fi != hist[n - 1 - k]) bad++;
          if (fo != !hist[n - 9]) bad++;
        end
      end
    end
    check(bad == 0, $sformatf("step %0d div %0d: %0d mismatches", k, div, bad));
    check(hi == (hist.size() - 16) / 2, $sformatf("step %0d: fo duty %0d", k, hi));
  endtask

  initial begin
    r = 1; step = 0; osc_en = 1;
    for (int k = 0; k < 16; k++) run(k, 1);
    for (int k = 0; k < 16; k += 5) run(k, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
