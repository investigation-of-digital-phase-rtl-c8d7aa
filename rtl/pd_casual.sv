// pd_casual: phase detector for casual (intermittent) input signals, type 1.
//
// The detector only acts while fi is 1. Then it pumps up while fo is 1
// (fi AND fo, inverted to q1_n to drive the p-channel pump transistor) and
// pumps down while fo is 0 (fi AND NOT fo, q2 drives the n-channel
// transistor). While fi is 0 both transistors are off, the pump output
// floats and a filter without a resistor across its capacitor keeps its
// last voltage, so a missing fi does not disturb the loop. The gates (two
// AND gates and two inverters) are those of the reference schematic. Purely
// combinational; no clock.
module pd_casual
  import pd_pkg::*;
(
  input  logic  fi,
  input  logic  fo,
  output logic  q1_n,
  output logic  q2,
  output pump_t pump
);

  always_comb begin
    pump.up = fi & fo;
    pump.dn = fi & ~fo;
    q1_n    = ~pump.up;
    q2      = pump.dn;
  end

endmodule
