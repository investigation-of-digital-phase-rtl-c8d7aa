// pfd_single: frequency-sensitive phase detector on the rising edges.
//
// Two flip-flops are set to 1 by the rising edges of their inputs: U1A by fi
// (output q1) and U1B by fo (output q2). A NAND gate watches both outputs;
// when both are 1 it pulls its output low and clears both flip-flops. So q1
// is high from an fi edge until the matching fo edge when fi leads, and q2
// is high from an fo edge until the matching fi edge when fi lags. Because a
// flip-flop stays set until the other input catches up, the detector also
// responds to a frequency difference. q1 and q2 drive the charge pump: q1
// switches the output node to the supply (the p-channel transistor is driven
// by q1_n), q2 switches it to ground; with neither, the node floats.
//
// set1_n and set2_n are the presets of the two flip-flops (the U1A_set and
// U1B_set stimuli of the reference circuit); the tester uses set1_n to start
// the detector one fi edge ahead, which shifts its range by -2*pi.
//
// This version is synchronous to clk, which must be much faster than fi and
// fo: each input is sampled and a 0-to-1 change between two samples is an
// edge. The flip-flops and the clear are in pfd_core: the second edge of a
// pair clears both flip-flops on the same clk edge, and reset_n pulses low
// for the following clk. With fi lagging fo by d clk periods, q2 is high for
// d clk periods per signal period (and q1 when fi leads). rst_n (synchronous)
// loads INIT into both flip-flops; the default 0 is the initial condition of
// the reference simulation. Latency: one clk from an input edge to q1/q2.
module pfd_single
  import pd_pkg::*;
#(
  parameter bit INIT = 1'b0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  fi,
  input  logic  fo,
  input  logic  set1_n,
  input  logic  set2_n,
  output logic  q1,
  output logic  q1_n,
  output logic  q2,
  output logic  reset_n,
  output pump_t pump
);

  logic fi_d, fo_d;
  logic clear_q;

  always_ff @(posedge clk) begin
    fi_d <= fi;
    fo_d <= fo;
  end

  pfd_core #(.INIT(INIT)) u_core (
    .clk(clk), .rst_n(rst_n),
    .ev1(fi & ~fi_d), .ev2(fo & ~fo_d),
    .set1_n(set1_n), .set2_n(set2_n),
    .q1(q1), .q2(q2), .clearing(), .clear_q(clear_q)
  );

  always_comb begin
    q1_n    = ~q1;
    reset_n = ~clear_q;
    pump.up = q1;
    pump.dn = q2;
  end

endmodule
