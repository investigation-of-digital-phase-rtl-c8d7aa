// pd_tester_top: phase-detector tester with the six detectors in place.
//
// The tester measures the phase-voltage response of a digital phase
// detector point by point. A Johnson-counter dephaser makes two square waves
// of equal frequency, fo and fi, with fi lagging fo by step*pi/8; the Set
// button advances step, and an LED row shows it. For negative differences
// the sign switch makes the Reset button preset the detector one fi edge
// ahead (init_block), which moves the reading by -2*pi, so 32 points from
// -2*pi to +2*pi can be taken. The detector's outputs (PD, Q1, Q2) go to
// the test outputs and, through the filter switch, to a passive or an
// active low-pass filter whose output Vout is read with a voltmeter.
//
// In the bench hardware one detector module at a time is plugged into the
// tester's socket. Here all six detectors are built and run side by side on
// the same fi and fo, and pd_sel chooses which one drives the test outputs
// and the filter:
//   PD_XOR       XOR gate                            (pd_xor)
//   PD_EDGE_SR   edge-set flip-flop                  (pd_edge_sr)
//   PD_PFD_ONE   frequency sensitive, rising edges   (pfd_single)
//   PD_PFD_BOTH  frequency sensitive, both edges     (pfd_double)
//   PD_CASUAL    for casual fi                       (pd_casual)
//   PD_COUNTER   expanded range, via the 4-bit DAC   (pd_counter)
// q1/q2 carry the two digital outputs of the two-output detectors (for the
// casual detector the pump-up and pump-down levels) and are 0 for the
// others. pd_out is the drive of the PD node (pump_t); for the counter
// detector PD is the DAC voltage dac_v instead and pd_out is 0.
//
// Clocking: everything runs on clk; osc_en marks the clk cycles that carry
// an edge of the oscillator f_osc (the RC oscillator of the bench is outside
// this design). The detectors sample fi and fo on every clk, so clk may be
// f_osc itself (osc_en tied to 1) or faster. Buttons come in as the two
// contacts of each changeover switch, active low: set_s_n/rst_s_n closed
// while pressed, set_r_n/rst_r_n closed while released. por_n is a
// synchronous power-on reset. T_CLK is the clk period in seconds for the
// filter model.
module pd_tester_top
  import pd_pkg::*;
#(
  parameter real T_CLK = 62.5e-6,
  parameter real VDD   = 5.0
) (
  input  logic                 clk,
  input  logic                 por_n,
  input  logic                 osc_en,
  input  logic                 set_s_n,
  input  logic                 set_r_n,
  input  logic                 rst_s_n,
  input  logic                 rst_r_n,
  input  logic                 neg,
  input  logic                 pd34,
  input  pd_sel_e              pd_sel,
  input  logic                 filter_active,
  output logic                 fo,
  output logic                 fi,
  output logic                 r,
  output logic [STEP_BITS-1:0] step,
  output logic [STEPS-1:0]     led_n,
  output pump_t                pd_out,
  output logic                 q1,
  output logic                 q2,
  output logic [3:0]           dac_code,
  output real                  dac_v,
  output real                  vout
);

  // ---------------------------------------------------------------- buttons
  logic set_q, set_qn, r_n;

  switch_latch u_set_btn (
    .clk(clk), .rst_n(por_n), .s_n(set_s_n), .r_n(set_r_n),
    .q(set_q), .q_n(set_qn)
  );

  switch_latch u_rst_btn (
    .clk(clk), .rst_n(por_n), .s_n(rst_s_n), .r_n(rst_r_n),
    .q(r), .q_n(r_n)
  );

  // ----------------------------------------------------- phase step and LEDs
  phase_setting u_setting (
    .clk(clk), .rst_n(por_n), .set_q(set_q), .step(step), .led_n(led_n)
  );

  // ---------------------------------------------------------------- dephaser
  logic [JOHNSON_BITS-1:0] taps;

  dephaser u_dephaser (
    .clk(clk), .osc_en(osc_en), .r(r), .step(step),
    .fo(fo), .fi(fi), .taps(taps)
  );

  // ---------------------------------------------------------- initialization
  logic clr_n, pd3_set1_n, pd4_set1_n;
  logic pfd_rst_n, pd_rst_n;

  init_block u_init (
    .r(r), .neg(neg), .pd34(pd34),
    .clr_n(clr_n), .pd3_set1_n(pd3_set1_n), .pd4_set1_n(pd4_set1_n)
  );

  assign pfd_rst_n = por_n & clr_n;
  assign pd_rst_n  = por_n & r_n;

  // --------------------------------------------------------------- detectors
  logic  xor_pd;
  pump_t xor_pump;
  pd_xor u_pd_xor (.fi(fi), .fo(fo), .pd(xor_pd), .pump(xor_pump));

  logic  sr_pd, sr_pd_n;
  pump_t sr_pump;
  pd_edge_sr u_pd_edge_sr (
    .clk(clk), .rst_n(pd_rst_n), .fi(fi), .fo(fo),
    .pd(sr_pd), .pd_n(sr_pd_n), .pump(sr_pump)
  );

  logic  p3_q1, p3_q1_n, p3_q2, p3_reset_n;
  pump_t p3_pump;
  pfd_single #(.INIT(1'b0)) u_pfd_single (
    .clk(clk), .rst_n(pfd_rst_n), .fi(fi), .fo(fo),
    .set1_n(pd3_set1_n), .set2_n(1'b1),
    .q1(p3_q1), .q1_n(p3_q1_n), .q2(p3_q2), .reset_n(p3_reset_n),
    .pump(p3_pump)
  );

  logic  p4_q1, p4_q1_n, p4_q2, p4_reset_n, p4_edge_alt;
  pump_t p4_pump;
  pfd_double #(.INIT(1'b0)) u_pfd_double (
    .clk(clk), .rst_n(pfd_rst_n), .fi(fi), .fo(fo),
    .set1_n(pd4_set1_n), .set2_n(1'b1),
    .q1(p4_q1), .q1_n(p4_q1_n), .q2(p4_q2), .reset_n(p4_reset_n),
    .edge_alt(p4_edge_alt), .pump(p4_pump)
  );

  logic  cs_q1_n, cs_q2;
  pump_t cs_pump;
  pd_casual u_pd_casual (
    .fi(fi), .fo(fo), .q1_n(cs_q1_n), .q2(cs_q2), .pump(cs_pump)
  );

  logic [3:0] cnt_a, cnt_b, cnt_diff;
  pd_counter u_pd_counter (
    .clk(clk), .rst_n(pd_rst_n), .fi(fi), .fo(fo), .load_n(r_n),
    .cnt_a(cnt_a), .cnt_b(cnt_b), .diff(cnt_diff), .dac_code(dac_code)
  );

  dac4_model #(.VREF(VDD)) u_dac (.db(dac_code), .vout(dac_v));

  // ------------------------------------------------- socket and test outputs
  logic is_counter;

  always_comb begin
    pd_out     = '0;
    q1         = 1'b0;
    q2         = 1'b0;
    is_counter = 1'b0;
    unique case (pd_sel)
      PD_XOR:      pd_out = xor_pump;
      PD_EDGE_SR:  pd_out = sr_pump;
      PD_PFD_ONE:  begin pd_out = p3_pump; q1 = p3_q1;    q2 = p3_q2; end
      PD_PFD_BOTH: begin pd_out = p4_pump; q1 = p4_q1;    q2 = p4_q2; end
      PD_CASUAL:   begin pd_out = cs_pump; q1 = ~cs_q1_n; q2 = cs_q2; end
      PD_COUNTER:  is_counter = 1'b1;
      default:     ;
    endcase
  end

  // ------------------------------------------------------------------ filter
  logic drive;
  real  vpd;

  always_comb begin
    drive = is_counter | pd_out.up | pd_out.dn;
    if (is_counter)                 vpd = dac_v;
    else if (pd_out.up & pd_out.dn) vpd = VDD / 2.0;  // both pump switches on
    else if (pd_out.up)             vpd = VDD;
    else                            vpd = 0.0;
  end

  loop_filter_model #(.T_CLK(T_CLK)) u_filter (
    .clk(clk), .rst_n(por_n), .active(filter_active),
    .drive(drive), .vpd(vpd), .vout(vout)
  );

endmodule
