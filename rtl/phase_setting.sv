// phase_setting: phase-step counter and LED indicator of the tester.
//
// A 4-bit binary counter (U3) advances by one on each press of the Set
// button, that is on each rising edge of the debounced button level. Its
// value k selects the phase difference k*pi/8 produced by the dephaser
// (k = 0..15 covers 0..15*pi/8). A 4-to-16 decoder (U2) with active-low
// outputs drives one LED of a row of sixteen (D1..D16) to show the set step;
// the panel prints the positive and the negative scale above and below the
// row. The counter wraps from 15 to 0, and is not cleared by the tester's
// Reset button; rst_n (synchronous) is a power-on clear that the bench
// hardware does not have. Latency: step changes one clk after the button
// edge is seen, led_n follows combinationally.
module phase_setting
  import pd_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 set_q,
  output logic [STEP_BITS-1:0] step,
  output logic [STEPS-1:0]     led_n
);

  logic set_d;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      set_d <= 1'b0;
      step  <= '0;
    end else begin
      set_d <= set_q;
      if (set_q && !set_d) step <= step + STEP_BITS'(1);
    end
  end

  always_comb begin
    led_n       = '1;
    led_n[step] = 1'b0;
  end

endmodule
