// pd_counter: phase detector with an expanded linear range.
//
// Two 4-bit up counters count the rising edges of fi (counter A, U1) and of
// fo (counter B, U2). Since they are separate counters, coincident edges of
// fi and fo are never lost, which a single up/down counter could not
// guarantee. An ALU in subtract mode (U3, select S2..S0 = 0,1,0 and carry in
// 1) forms F = A - B modulo 16, the number of fi edges in excess of fo edges.
// The most significant bit of F is inverted (U4A) before the 4-bit DAC, which
// turns the two's complement difference -8..+7 into the offset code 0..15,
// so the DAC output is a linear staircase over 16 periods of phase
// difference (-8*2*pi .. +7*2*pi) instead of one.
//
// load_n (the U2_load stimulus) loads counter B with PRELOAD_B, printed as
// 0111 on the reference schematic, so that one run can sweep the whole
// range. Synchronous to clk, which must be much faster than fi and fo;
// rst_n (synchronous) clears A and B, the initial condition of the reference
// simulation. load_n takes precedence over counting and over rst_n, as the
// asynchronous parallel load of the counter does. Latency: one clk from an input edge to
// the counters, F and the DAC code are combinational from them.
module pd_counter
  import pd_pkg::*;
#(
  parameter int unsigned W         = 4,
  parameter logic [W-1:0] PRELOAD_B = W'(7)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         fi,
  input  logic         fo,
  input  logic         load_n,
  output logic [W-1:0] cnt_a,
  output logic [W-1:0] cnt_b,
  output logic [W-1:0] diff,
  output logic [W-1:0] dac_code
);

  logic fi_d, fo_d;
  logic fi_rise, fo_rise;

  assign fi_rise = fi & ~fi_d;
  assign fo_rise = fo & ~fo_d;

  always_ff @(posedge clk) begin
    fi_d <= fi;
    fo_d <= fo;
    if (!rst_n) begin
      cnt_a <= '0;
      cnt_b <= '0;
    end else begin
      if (fi_rise) cnt_a <= cnt_a + W'(1);
      if (fo_rise) cnt_b <= cnt_b + W'(1);
    end
    // The parallel load wins over counting and over rst_n.
    if (!load_n) cnt_b <= PRELOAD_B;
  end

  always_comb begin
    diff     = cnt_a - cnt_b;                 // A minus B, carry in = 1
    dac_code = {~diff[W-1], diff[W-2:0]};     // inverted MSB
  end

endmodule
