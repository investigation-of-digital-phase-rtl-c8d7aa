// tb_pfd_double: self-checking test of the both-edge frequency-sensitive
// phase detector. Because it compares every edge, a lag of d cycles gives
// two pump pulses per period and q2 minus q1 must be 2*d per period, both
// for 50 % duty (16-cycle period, d = -7..7) and for 20 % duty (20-cycle
// period, high 4 cycles, d = -3..3), the two duty cycles of the reference
// analysis. edge_alt must toggle twice per period, and reset must load 1.
module tb_pfd_double;
  timeunit 1ns; timeprecision 1ps;
  import pd_pkg::*;

  logic clk = 0, rst_n, fi, fo, set1_n, set2_n, q1, q1_n, q2, reset_n, edge_alt;
  pump_t pump;
  int checks = 0, failures = 0;

  pfd_double dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Square wave that starts low and rises at t = 0.
  function automatic logic wave(input int t, input int p, input int h);
    return (t >= 0) && ((t % p) < h);
  endfunction

  task automatic run(input int p, input int h, input int d);
    int net = 0, toggles = 0;
    logic ea_prev;
    @(negedge clk) begin fi = 0; fo = 0; rst_n = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);   // let the start-up clear and toggle settle
    ea_prev = edge_alt;
    for (int t = 0; t < 5 * p; t++) begin
      @(negedge clk);
      fo = wave(t - ((d < 0) ? -d : 0), p, h);
      fi = wave(t - ((d > 0) ?  d : 0), p, h);
      @(posedge clk); #1;
      if (t >= 3 * p && t < 4 * p) begin
        net += int'(q2) - int'(q1);
        toggles += int'(edge_alt != ea_prev);
      end
      ea_prev = edge_alt;
    end
    check(net == 2 * d, $sformatf("period %0d high %0d offset %0d: q2-q1 = %0d", p, h, d, net));
    check(toggles == 2, $sformatf("period %0d offset %0d: %0d edge_alt toggles", p, d, toggles));
  endtask

  initial begin
    fi = 0; fo = 0; rst_n = 0; set1_n = 1; set2_n = 1;
    repeat (3) @(posedge clk);
    #1 check(q1 && q2 && edge_alt, "reset loads 1 into all flip-flops");
    for (int d = -7; d <= 7; d++) run(16, 8, d);
    for (int d = -3; d <= 3; d++) run(20, 4, d);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
