// pfd_double: frequency-sensitive phase detector working on both edges.
//
// The detector of pfd_single is preceded by two XOR gates used as controlled
// inverters (U4A on fi, U4B on fo). Their common control, edge_alt, is the
// output of a toggle flip-flop (U3A, D wired to its inverted output) clocked
// by the NAND output that clears the detector. Each time the detector clears,
// edge_alt flips, so the flip-flops, which react to rising edges of the XOR
// outputs, next react to the falling edges of fi and fo, then to the rising
// ones, and so on: every edge of the inputs is compared, not just one per
// period, and a lag of d clk periods gives two pump pulses of d periods per
// signal period.
//
// Flipping edge_alt itself changes an XOR output whose input is low at that
// moment, which is an edge too; the gate circuit has this behaviour and so
// does this model. Synchronous to clk, which must be much faster than fi and
// fo. edge_alt toggles on the clk edge that clears the flip-flops. An edge of
// the XOR output is then looked for in the order in which the gate circuit
// makes the changes: first the toggle (old input sample, old and new
// edge_alt), then the input change (old and new input sample, new
// edge_alt); a rise in either step is an edge. This keeps an input edge that
// arrives one clk after a clear, when the XOR output would otherwise show no
// change between two samples. rst_n (synchronous) loads INIT into all three
// flip-flops; the default 1 is the initial condition of the reference
// simulation.
module pfd_double
  import pd_pkg::*;
#(
  parameter bit INIT = 1'b1
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
  output logic  edge_alt,
  output pump_t pump
);

  logic fi_d, fo_d, ea_d;
  logic fi_prev, fi_mid, fi_now, fo_prev, fo_mid, fo_now;
  logic ev1, ev2, clearing, clear_q;

  always_comb begin
    // XOR outputs before the toggle, after the toggle, after the input change
    fi_prev = fi_d ^ ea_d;
    fi_mid  = fi_d ^ edge_alt;
    fi_now  = fi   ^ edge_alt;
    fo_prev = fo_d ^ ea_d;
    fo_mid  = fo_d ^ edge_alt;
    fo_now  = fo   ^ edge_alt;
    ev1     = (~fi_prev & fi_mid) | (~fi_mid & fi_now);
    ev2     = (~fo_prev & fo_mid) | (~fo_mid & fo_now);
  end

  pfd_core #(.INIT(INIT)) u_core (
    .clk(clk), .rst_n(rst_n), .ev1(ev1), .ev2(ev2),
    .set1_n(set1_n), .set2_n(set2_n),
    .q1(q1), .q2(q2), .clearing(clearing), .clear_q(clear_q)
  );

  always_ff @(posedge clk) begin
    fi_d <= fi;
    fo_d <= fo;
    ea_d <= edge_alt;
    if (!rst_n)        edge_alt <= INIT;
    else if (clearing) edge_alt <= ~edge_alt;
  end

  always_comb begin
    q1_n    = ~q1;
    reset_n = ~clear_q;
    pump.up = q1;
    pump.dn = q2;
  end

endmodule
