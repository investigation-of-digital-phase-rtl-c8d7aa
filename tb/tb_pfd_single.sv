// tb_pfd_single: self-checking test of the rising-edge frequency-sensitive
// phase detector. With 16-cycle square waves and fi lagging (d > 0) or
// leading (d < 0) fo by |d| cycles (the waves start low and the earlier one
// rises first after reset), the net pump time per period,
// q2 minus q1, must be d: the leading input's flip-flop is high from its
// edge until the other edge. It checks one clear pulse per
// period, the presets, the reset value, and frequency sensitivity: with fi
// faster than fo only q1 may pump for long.
module tb_pfd_single;
  timeunit 1ns; timeprecision 1ps;
  import pd_pkg::*;

  localparam int P = 16;
  logic clk = 0, rst_n, fi, fo, set1_n, set2_n, q1, q1_n, q2, reset_n;
  pump_t pump;
  int checks = 0, failures = 0;

  pfd_single dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Square wave that starts low and rises at t = 0.
  function automatic logic wave(input int t, input int p, input int h);
    return (t >= 0) && ((t % p) < h);
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fi = 0; fo = 0; rst_n = 0; set1_n = 1; set2_n = 1;
    repeat (3) @(posedge clk);
    #1 check(!q1 && !q2 && reset_n, "reset clears both");
    rst_n = 1;
    for (int d = -(P - 1); d < P; d++) begin
      int net, clears;
      net = 0; clears = 0;
      @(negedge clk) begin rst_n = 0; fi = 0; fo = 0; end
      @(negedge clk) rst_n = 1;
      for (int t = 0; t < 4 * P; t++) begin
        @(negedge clk);
        fo = wave(t - ((d < 0) ? -d : 0), P, P / 2);
        fi = wave(t - ((d > 0) ?  d : 0), P, P / 2);
        @(posedge clk); #1;
        if (t >= 2 * P && t < 3 * P) begin
          net += int'(q2) - int'(q1);
          clears += int'(!reset_n);
        end
        if (q1_n == q1 || pump.up != q1 || pump.dn != q2) failures++;
      end
      check(net == d, $sformatf("offset %0d: q2-q1 = %0d", d, net));
      check(clears == 1, $sformatf("offset %0d: %0d clear pulses per period", d, clears));
    end
    // presets
    @(negedge clk) begin fi = 0; fo = 0; rst_n = 0; end
    @(negedge clk) begin rst_n = 1; set1_n = 0; end
    @(negedge clk) set1_n = 1;
    check(q1 && !q2, "set1_n presets q1");
    @(negedge clk) fo = 1;
    @(negedge clk);
    check(!q1 && !q2 && !reset_n, "fo edge completes the pair: cleared, reset_n pulse");
    @(negedge clk);
    check(!q1 && !q2 && reset_n, "reset_n pulse lasts one clk");
    @(negedge clk) set2_n = 0;
    @(negedge clk) set2_n = 1;
    check(!q1 && q2, "set2_n presets q2");
    // frequency sensitivity: fi period 12, fo period 16
    begin
      int up, dn;
      up = 0; dn = 0;
      @(negedge clk) begin fi = 0; fo = 0; rst_n = 0; end
      @(negedge clk) rst_n = 1;
      for (int t = 0; t < 48 * 8; t++) begin
        @(negedge clk);
        fo = (t % 16) < 8;
        fi = (t % 12) < 6;
        @(posedge clk); #1;
        up += int'(q1 && !q2);
        dn += int'(q2 && !q1);
      end
      check(up > 4 * dn, $sformatf("faster fi pumps up: up %0d down %0d", up, dn));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
