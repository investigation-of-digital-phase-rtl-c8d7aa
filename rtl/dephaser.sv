// dephaser: generator of the two compared signals fo and fi of the tester.
//
// An 8-bit shift register (U5) whose last output QH is inverted (U4A) and
// fed back to its serial input forms a Johnson counter. Stepped at f_osc it
// runs through 16 states, so every output is a square wave at f_osc/16 with
// 50 % duty, and each output lags the one before it by one f_osc period,
// which is pi/8 of the signal period. The first output QA is the reference
// fo. An 8-to-1 multiplexer (U6) picks output number step[2:0], a lag of
// 0..7*pi/8, and an XOR gate (U7D) inverts it when step[3] is 1, which adds
// pi: fi lags fo by step*pi/8 for step = 0..15.
//
// r is the tester's Reset: it clears the shift register (QA..QH = 0, input
// CLR of U5) and disables the multiplexer (strobe input of U6), so fi is
// just step[3] while r is high. The first rising edge after Reset is always
// an fo edge, followed by fi after step*pi/8.
//
// Synchronous to clk; osc_en marks the clk cycles that carry an f_osc edge
// (tie it to 1 to make clk itself f_osc). In the schematic fo passes three
// XOR gates wired as buffers (U7A..U7C) so that its delay matches that of
// fi through the multiplexer and U7D; in this clocked version both outputs
// are decoded from the same register in the same cycle and no matching is
// needed.
module dephaser
  import pd_pkg::*;
(
  input  logic                 clk,
  input  logic                 osc_en,
  input  logic                 r,
  input  logic [STEP_BITS-1:0] step,
  output logic                 fo,
  output logic                 fi,
  output logic [JOHNSON_BITS-1:0] taps
);

  logic [JOHNSON_BITS-1:0] q;   // q[0] = QA ... q[7] = QH
  logic                    y;

  always_ff @(posedge clk) begin
    if (r)           q <= '0;
    else if (osc_en) q <= {q[JOHNSON_BITS-2:0], ~q[JOHNSON_BITS-1]};
  end

  always_comb begin
    y    = r ? 1'b0 : q[step[2:0]];
    fi   = y ^ step[3];
    fo   = q[0];
    taps = q;
  end

endmodule
