// tb_pd_tester_top: end-to-end test of the phase-detector tester with all
// parameters at their defaults.
//
// The testbench works the tester as an operator would: it presses Set (with
// contact bounce) to step the phase difference through all sixteen values,
// presses Reset before each reading, selects each detector in turn and
// reads the test outputs over four signal periods once the detector has
// settled. f_osc is clk (osc_en = 1), so fi lags fo by `step` clk periods
// and one period is 16 clks. Expected values per period, worked out from
// the detector descriptions (s = step):
//   XOR               PD high 2*min(s, 16-s)
//   edge-set FF       PD high 16-s (16 for s = 0)
//   rising-edge PFD   q2-q1 = s; with the negative sign selected, s-16
//   both-edge PFD     q2-q1 = 2s for s < 8, clipped at 14 for s >= 8; with the
//                     preset, 2s-32 for s >= 10, clipped at -14 below that
//   casual-input PD   up-down = 8 - 2*min(s, 16-s)
//   counter PD        sum of DAC codes = 16-s (code 0 from an fo edge to the
//                     next fi edge, 1 otherwise, after the Reset load of 7)
// It also checks the LED row and the wrap of the step counter, the DAC
// voltage, and the filter: passive on the XOR output at s = 4 must settle
// near 2.5 V, active on the rising-edge PFD at s = 4 near
// 2.5 + 2.5 * 4/16 = 3.125 V. Every mechanism is counted; one that never
// happened counts as a failure.
module tb_pd_tester_top;
  timeunit 1ns; timeprecision 1ps;
  import pd_pkg::*;

  localparam int P = 16;

  logic clk = 0, por_n, osc_en;
  logic set_s_n, set_r_n, rst_s_n, rst_r_n, neg, pd34, filter_active;
  pd_sel_e pd_sel;
  logic fo, fi, r, q1, q2;
  logic [STEP_BITS-1:0] step;
  logic [STEPS-1:0] led_n;
  pump_t pd_out;
  logic [3:0] dac_code;
  real dac_v, vout;

  int checks = 0, failures = 0;
  int n_set = 0, n_wrap = 0, n_reset = 0, n_neg3 = 0, n_neg4 = 0;
  int n_sel[6] = '{default: 0};
  int n_passive = 0, n_active = 0, n_p4_toggle = 0, n_p3_clear = 0;

  pd_tester_top dut (.*);

  always #5 clk = ~clk;

  // coverage only: a Q1 or Q2 pulse ending marks a clear of the selected PFD
  logic q1_d = 0, q2_d = 0;
  always @(posedge clk) begin
    if ((q1_d && !q1) || (q2_d && !q2)) begin
      if (pd_sel == PD_PFD_BOTH) n_p4_toggle++;
      if (pd_sel == PD_PFD_ONE) n_p3_clear++;
    end
    q1_d <= q1;
    q2_d <= q2;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int imin(input int a, input int b);
    return (a < b) ? a : b;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic press_set();
    set_r_n = 1;
    repeat (2) @(negedge clk);
    for (int b = 0; b < 3; b++) begin
      set_s_n = 0; @(negedge clk);
      set_s_n = 1; @(negedge clk);
    end
    set_s_n = 0; repeat (4) @(negedge clk);
    set_s_n = 1; @(negedge clk);
    set_r_n = 0; @(negedge clk);
    set_r_n = 1; @(negedge clk);
    set_r_n = 0; repeat (2) @(negedge clk);
    n_set++;
  endtask

  task automatic press_reset();
    rst_r_n = 1; @(negedge clk);
    rst_s_n = 0; @(negedge clk);
    rst_s_n = 1; @(negedge clk);
    rst_s_n = 0; repeat (6) @(negedge clk);
    check(r && fo == 0 && fi == step[3], "dephaser held during Reset");
    rst_s_n = 1; @(negedge clk);
    rst_r_n = 0; @(negedge clk);
    n_reset++;
  endtask

  // Settle three periods, then sum over four; returns per-period sums.
  task automatic measure(output int up, output int dn, output int net12,
                         output int code_sum);
    int u = 0, d = 0, n = 0, c = 0;
    repeat (3 * P) @(negedge clk);
    for (int t = 0; t < 4 * P; t++) begin
      @(posedge clk); #1;
      u += int'(pd_out.up);
      d += int'(pd_out.dn);
      n += int'(q2) - int'(q1);
      c += int'(dac_code);
    end
    up = u / 4; dn = d / 4; net12 = n / 4; code_sum = c / 4;
  endtask

  initial begin
    int up, dn, net, cs, s;
    por_n = 0; osc_en = 1; set_s_n = 1; set_r_n = 0; rst_s_n = 1; rst_r_n = 0;
    neg = 0; pd34 = 0; filter_active = 0; pd_sel = PD_XOR;
    repeat (4) @(negedge clk);
    por_n = 1;
    repeat (2) @(negedge clk);
    check(step == 0 && led_n == 16'hFFFE, "power-on: step 0, first LED");

    for (s = 0; s < STEPS; s++) begin
      check(step == 4'(s), $sformatf("step %0d after %0d presses", step, s));
      check(led_n == ~(16'(1) << s), $sformatf("LED row %h at step %0d", led_n, s));
      neg = 0;
      pd_sel = PD_XOR;      press_reset(); measure(up, dn, net, cs); n_sel[0]++;
      check(up == 2 * imin(s, P - s), $sformatf("XOR step %0d: high %0d", s, up));
      pd_sel = PD_EDGE_SR;  press_reset(); measure(up, dn, net, cs); n_sel[1]++;
      check(up == ((s == 0) ? P : P - s), $sformatf("edge FF step %0d: high %0d", s, up));
      pd_sel = PD_PFD_ONE;  press_reset(); measure(up, dn, net, cs); n_sel[2]++;
      check(net == s, $sformatf("PFD rising step %0d: q2-q1 %0d", s, net));
      pd_sel = PD_PFD_BOTH; press_reset(); measure(up, dn, net, cs); n_sel[3]++;
      check(net == ((s < 8) ? 2 * s : 14), $sformatf("PFD both step %0d: q2-q1 %0d", s, net));
      pd_sel = PD_CASUAL;   press_reset(); measure(up, dn, net, cs); n_sel[4]++;
      check(up - dn == 8 - 2 * imin(s, P - s), $sformatf("casual step %0d: up-down %0d", s, up - dn));
      check(net == dn - up, "casual Q1/Q2 outputs follow the pump");
      pd_sel = PD_COUNTER;  press_reset(); measure(up, dn, net, cs); n_sel[5]++;
      check(cs == P - s, $sformatf("counter step %0d: code sum %0d", s, cs));
      check(up == 0 && dn == 0, "counter detector leaves the pump output idle");
      check(dac_v == 5.0 * real'(dac_code) / 16.0, "DAC voltage");
      // negative differences, rising-edge PFD
      if (s > 0) begin
        neg = 1; pd34 = 0; pd_sel = PD_PFD_ONE;
        press_reset(); measure(up, dn, net, cs); n_neg3++;
        check(net == s - P, $sformatf("PFD rising step -%0d: q2-q1 %0d", P - s, net));
        // both-edge PFD with its preset: lags past pi read as lag - 2*pi
        pd34 = 1; pd_sel = PD_PFD_BOTH;
        press_reset(); measure(up, dn, net, cs); n_neg4++;
        check(net == ((s >= 10) ? 2 * s - 2 * P : -14),
              $sformatf("PFD both step -%0d: q2-q1 %0d", P - s, net));
        neg = 0; pd34 = 0;
      end
      press_set();
      if (s == STEPS - 1) begin
        check(step == 0, "step counter wraps to 0");
        if (step == 0) n_wrap++;
      end
    end

    // filters
    repeat (4) press_set();
    neg = 0; pd_sel = PD_XOR; filter_active = 0;
    press_reset();
    repeat (6000) @(negedge clk);
    n_passive++;
    check(vout > 2.4 && vout < 2.6, $sformatf("passive filter on XOR at pi/2: %f V", vout));
    pd_sel = PD_PFD_ONE; filter_active = 1;
    press_reset();
    repeat (6000) @(negedge clk);
    n_active++;
    check(vout > 3.025 && vout < 3.225, $sformatf("active filter on PFD at pi/2: %f V", vout));

    check(n_set > 0 && n_wrap > 0 && n_reset > 0 && n_neg3 > 0 && n_neg4 > 0,
          "buttons, wrap and negative initialization exercised");
    foreach (n_sel[i]) check(n_sel[i] > 0, $sformatf("detector %0d selected", i));
    check(n_passive > 0 && n_active > 0, "both filters used");
    check(n_p4_toggle > 0 && n_p3_clear > 0, "PFD clears and edge toggles seen");
    $display("events: set %0d wrap %0d reset %0d neg3 %0d neg4 %0d passive %0d active %0d p3_clear %0d p4_toggle %0d",
             n_set, n_wrap, n_reset, n_neg3, n_neg4, n_passive, n_active, n_p3_clear, n_p4_toggle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
