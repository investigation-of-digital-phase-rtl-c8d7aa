// tb_phase_sweep: phase-voltage response sweep of all six detectors.
//
// Reproduces the transient sweep used to characterise the detectors: fo has
// a period of 1.000 ms and fi of 1.025 ms, both with 50 % duty, so the lag of
// fi behind fo grows by 2.5 % of a period every period. With clk = 12.5 us
// these are 80 and 82 clk periods (high 40 and 41). Each detector's output is
// averaged over every fo period (window from one fo rising edge to the
// next); with L the lag of the fi edge inside the window, in clk periods,
// the expected per-window sums are
//   XOR               high 2*min(L, 80-L)             (triangle)
//   edge-set FF       high 80-L                        (sawtooth)
//   rising-edge PFD   q2-q1 = L                        (linear over 2*pi)
//   both-edge PFD     q2-q1 = 2L+1 (rising pair L, falling pair L+1)
// each within 3 clk periods, skipping windows whose fi edge is within 3 clk
// periods of the window ends. The counter detector runs for 16 * 40 periods,
// enough for the difference to sweep its whole 16-period range: its DAC code
// may only step down by one (with a wrap from 0 to 15) from one window to
// the next, and must take every value.
// Finally fi is made casual (it drops out for random stretches) and the
// casual-input detector must leave its pump output floating whenever fi is
// 0, so the passive filter holds its voltage.
module tb_phase_sweep;
  timeunit 1ns; timeprecision 1ps;
  import pd_pkg::*;

  localparam int PO = 80, PI = 82;
  localparam int NSHORT = 82;        // 82 ms, as in the reference simulation
  localparam int NLONG  = 16 * 40 + 4;

  logic clk = 0, rst_n, fi, fo, casual_en;
  logic x_pd, sr_pd, sr_pd_n, s_q1, s_q1_n, s_q2, s_rn, d_q1, d_q1_n, d_q2, d_rn, d_ea;
  logic c_q1_n, c_q2;
  pump_t x_pump, sr_pump, s_pump, d_pump, c_pump;
  logic [3:0] cnt_a, cnt_b, diff, code;
  real dac_v, vout;
  int checks = 0, failures = 0;

  pd_xor     u_xor (.fi(fi), .fo(fo), .pd(x_pd), .pump(x_pump));
  pd_edge_sr u_sr  (.clk(clk), .rst_n(rst_n), .fi(fi), .fo(fo), .pd(sr_pd), .pd_n(sr_pd_n), .pump(sr_pump));
  pfd_single u_p3  (.clk(clk), .rst_n(rst_n), .fi(fi), .fo(fo), .set1_n(1'b1), .set2_n(1'b1),
                    .q1(s_q1), .q1_n(s_q1_n), .q2(s_q2), .reset_n(s_rn), .pump(s_pump));
  pfd_double u_p4  (.clk(clk), .rst_n(rst_n), .fi(fi), .fo(fo), .set1_n(1'b1), .set2_n(1'b1),
                    .q1(d_q1), .q1_n(d_q1_n), .q2(d_q2), .reset_n(d_rn), .edge_alt(d_ea), .pump(d_pump));
  pd_casual  u_cas (.fi(fi), .fo(fo), .q1_n(c_q1_n), .q2(c_q2), .pump(c_pump));
  pd_counter u_cnt (.clk(clk), .rst_n(rst_n), .fi(fi), .fo(fo), .load_n(rst_n),
                    .cnt_a(cnt_a), .cnt_b(cnt_b), .diff(diff), .dac_code(code));
  dac4_model u_dac (.db(code), .vout(dac_v));
  loop_filter_model #(.T_CLK(12.5e-6), .V_INIT(2.5)) u_flt (
    .clk(clk), .rst_n(rst_n), .active(1'b0),
    .drive(c_pump.up | c_pump.dn), .vpd(c_pump.up ? 5.0 : 0.0), .vout(vout));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int imin(input int a, input int b);
    return (a < b) ? a : b;
  endfunction

  initial begin
    repeat (PO * NLONG + PI * 400 + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: time t counts clk periods from the start of the sweep
  int t = -4;
  logic drop = 0;
  always @(negedge clk) begin
    t <= t + 1;
    fo <= (t >= 0) && ((t % PO) < PO / 2);
    fi <= (t >= 0) && ((t % PI) < PI / 2) && !(casual_en && drop);
  end

  initial begin
    int hx, hs, n3, n4, lag, win, seen, code_prev, wraps, bad_step, nwin;
    real held;
    rst_n = 0; casual_en = 0; fi = 0; fo = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    seen = 0; wraps = 0; bad_step = 0; nwin = 0; code_prev = -1;
    for (win = 0; win < NLONG; win++) begin
      hx = 0; hs = 0; n3 = 0; n4 = 0; lag = -1;
      // window: clk periods win*PO .. win*PO+PO-1, outputs seen one clk late
      wait (t == win * PO + 1);
      for (int k = 0; k < PO; k++) begin
        @(posedge clk); #1;
        if (fi && (t - 1) % PI == 0) lag = k;
        hx += int'(x_pd);
        hs += int'(sr_pd);
        n3 += int'(s_q2) - int'(s_q1);
        n4 += int'(d_q2) - int'(d_q1);
      end
      seen |= 1 << code;
      if (code_prev >= 0) begin
        if (code == 4'(code_prev - 1) && code_prev == 0) wraps++;
        if (!(code == 4'(code_prev) || code == 4'(code_prev - 1))) bad_step++;
      end
      code_prev = int'(code);
      if (win >= 2 && win < NSHORT && lag >= 3 && lag <= PO - 4) begin
        nwin++;
        check(hx >= 2 * imin(lag, PO - lag) - 3 && hx <= 2 * imin(lag, PO - lag) + 3,
              $sformatf("XOR window %0d lag %0d: %0d", win, lag, hx));
        check(hs >= PO - lag - 3 && hs <= PO - lag + 3,
              $sformatf("edge FF window %0d lag %0d: %0d", win, lag, hs));
        check(n3 >= lag - 3 && n3 <= lag + 3,
              $sformatf("rising PFD window %0d lag %0d: %0d", win, lag, n3));
        if (lag <= PO / 2 - 4)
          check(n4 >= 2 * lag + 1 - 3 && n4 <= 2 * lag + 1 + 3,
                $sformatf("both-edge PFD window %0d lag %0d: %0d", win, lag, n4));
      end
    end
    check(nwin > 60, $sformatf("%0d windows compared", nwin));
    check(bad_step == 0, $sformatf("counter code moved by other than 0 or -1 %0d times", bad_step));
    check(seen == 32'hFFFF && wraps >= 1, $sformatf("counter codes seen %h, wraps %0d", seen, wraps));
    check(dac_v == 5.0 * real'(code) / 16.0, "DAC voltage matches the code");

    // casual fi: random dropouts; the pump must float while fi is 0
    casual_en = 1;
    for (int k = 0; k < 200; k++) begin
      drop = ($urandom_range(0, 2) == 0);
      repeat ($urandom_range(20, 200)) begin
        @(posedge clk); #1;
        if (!fi) begin
          checks++;
          if (c_pump.up || c_pump.dn) begin failures++; $display("FAIL: casual pump active with fi = 0"); end
        end
      end
    end
    drop = 1;
    repeat (2) @(posedge clk);
    #1 held = vout;
    repeat (500) @(posedge clk);
    #1 check(vout == held, "passive filter holds through an fi dropout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
