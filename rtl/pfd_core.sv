// pfd_core: the two set flip-flops and the clearing gate of the
// frequency-sensitive phase detectors (pfd_single, pfd_double).
//
// ev1 and ev2 are one-clk pulses marking an active edge of fi and of fo. An
// event sets its flip-flop (q1 for fi, q2 for fo). In the gate circuit a
// NAND gate clears both flip-flops a few gate delays after both have become
// 1; here the flip-flops are cleared on the very clk edge on which the
// second of them would be set, so they are never both 1 and `clearing` is
// high, combinationally, in that cycle (it is the clock of the both-edge
// detector's toggle flip-flop). clear_q is the same event registered, a
// one-clk pulse that stands for the low pulse of the NAND output.
//
// set1_n and set2_n are the asynchronous presets of the flip-flops; here
// they are sampled on clk and win over the clear and over rst_n.
// rst_n (synchronous) loads INIT into both flip-flops; if INIT is 1 the pair
// is cleared on the first clk after reset, as the gate circuit would do.
module pfd_core #(
  parameter bit INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ev1,
  input  logic ev2,
  input  logic set1_n,
  input  logic set2_n,
  output logic q1,
  output logic q2,
  output logic clearing,
  output logic clear_q
);

  logic n1, n2;

  always_comb begin
    n1       = q1 | ev1;
    n2       = q2 | ev2;
    clearing = rst_n & n1 & n2;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q1      <= INIT;
      q2      <= INIT;
      clear_q <= 1'b0;
    end else begin
      q1      <= n1 & ~clearing;
      q2      <= n2 & ~clearing;
      clear_q <= clearing;
    end
    if (!set1_n) q1 <= 1'b1;
    if (!set2_n) q2 <= 1'b1;
  end

  // Outside reset and presets, a pair of edges never leaves both flip-flops set.
  a_never_both: assert property (@(posedge clk) (rst_n && set1_n && set2_n) |=> !(q1 && q2));

endmodule
