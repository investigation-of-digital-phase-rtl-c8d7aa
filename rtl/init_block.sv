// init_block: initialization of the frequency-sensitive detectors.
//
// The dephaser only makes fi lag fo by 0..15*pi/8. Negative differences,
// -2*pi .. -pi/8, are obtained by starting the detector one fi edge ahead.
// While the tester's Reset r is held, the block clears the detector
// flip-flops (clr_n low) and, if the sign switch selects a negative
// difference (neg = 1), also holds the preset of the fi flip-flop (q1)
// active; a preset wins over the clear. When Reset is released the first fo
// edge only clears that flip-flop, and from there on q1 marks the time from
// each fi edge to the next fo edge, so the mean output reads
// step*pi/8 - 2*pi instead of step*pi/8.
//
// The socket signal PD 3/4 (pd34: 0 = rising-edge detector, 1 = both-edge
// detector) steers the preset to the detector type in use; the other
// detector is only cleared. Combinational.
module init_block (
  input  logic r,
  input  logic neg,
  input  logic pd34,
  output logic clr_n,
  output logic pd3_set1_n,
  output logic pd4_set1_n
);

  always_comb begin
    clr_n      = ~r;
    pd3_set1_n = ~(r & neg & ~pd34);
    pd4_set1_n = ~(r & neg &  pd34);
  end

endmodule
