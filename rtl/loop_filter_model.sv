// loop_filter_model: behavioural model of the charge pump and low-pass filter.
//
// Behavioural model, not synthesizable logic: the real parts are analog
// (the pump transistors and the resistor-capacitor filters). It turns a
// detector output into the voltage the tester shows as Vout, stepping a
// forward-Euler solution once per clk of period T_CLK seconds.
//
// Input: drive = 1 when the detector output node is driven, with its voltage
// vpd (0 or VDD for a logic output or a pump, the DAC voltage for the
// counter detector); drive = 0 when the pump leaves the node floating.
// active selects the filter, as the tester's filter switch does:
//   passive (active = 0): series resistor R_IN into capacitor C to ground,
//     no resistor across C, so a floating input holds the voltage:
//     dV/dt = (vpd - V) / (R_IN * C) while driven, 0 otherwise.
//   active (active = 1): inverting lossy integrator around an op-amp whose
//     non-inverting input sits at VMID (a divider from +5 V), input resistor
//     R_IN, feedback R_FB in parallel with C:
//     dV/dt = -((vpd - VMID) / R_IN * drive + (V - VMID) / R_FB) / C,
//     clamped to 0 .. VSAT (single +12 V supply).
// The defaults are the tester's filter components (100 kOhm, 470 nF,
// 100 kOhm, 2.5 V) and f_osc = 16 kHz, so that fo is 1 kHz as in the
// reference simulations; the active filter inverts, so a larger mean input
// gives a lower output. rst_n (synchronous) sets the voltage to V_INIT.
module loop_filter_model #(
  parameter real T_CLK  = 62.5e-6,
  parameter real R_IN   = 100.0e3,
  parameter real R_FB   = 100.0e3,
  parameter real C      = 470.0e-9,
  parameter real VMID   = 2.5,
  parameter real VSAT   = 12.0,
  parameter real V_INIT = 2.5
) (
  input  logic clk,
  input  logic rst_n,
  input  logic active,
  input  logic drive,
  input  real  vpd,
  output real  vout
);

  real v, dv;

  always_comb begin
    if (!active) begin
      dv = drive ? (vpd - v) * T_CLK / (R_IN * C) : 0.0;
    end else begin
      dv = -((drive ? (vpd - VMID) / R_IN : 0.0) + (v - VMID) / R_FB) * T_CLK / C;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)              v <= V_INIT;
    else if (v + dv > VSAT)  v <= VSAT;
    else if (v + dv < 0.0)   v <= 0.0;
    else                     v <= v + dv;
  end

  assign vout = v;

endmodule
