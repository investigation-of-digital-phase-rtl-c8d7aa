// switch_latch: debounce latch for a changeover push button.
//
// The tester reads its Set and Reset buttons through a set-reset latch made
// of two cross-coupled NAND gates (U1A/U1B for Set, U1C/U1D for Reset). The
// button's common contact is grounded and pulls one of the two latch inputs
// low, each input having a pull-up resistor. A contact bouncing on one side
// only lets that input float high again, which the latch ignores, so every
// press gives exactly one clean transition.
//
// Here the latch is a register on clk. s_n low (the normally-open contact
// closed, button pressed) sets q to 1; r_n low (the normally-closed contact
// closed, button released) clears it; both high holds. If both were low at
// once the NAND latch would drive both outputs high; this version gives s_n
// priority instead. rst_n (synchronous, power-on) clears q. Latency: one
// clk.
module switch_latch (
  input  logic clk,
  input  logic rst_n,
  input  logic s_n,
  input  logic r_n,
  output logic q,
  output logic q_n
);

  always_ff @(posedge clk) begin
    if (!rst_n)    q <= 1'b0;
    else if (!s_n) q <= 1'b1;
    else if (!r_n) q <= 1'b0;
  end

  assign q_n = ~q;

endmodule
