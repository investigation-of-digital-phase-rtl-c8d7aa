// pd_xor: type-1 phase detector for regular input signals.
//
// The output is the exclusive OR of the two compared square waves, fi and fo.
// Its mean value, taken by the following low-pass filter, rises linearly from
// 0 at zero phase difference to the full logic level at a difference of pi and
// falls back to 0 at 2*pi (a triangular phase-voltage response). The gate is
// the one of the reference schematic; the module is purely combinational and
// has no clock. Interface: fi, fo in; pd out, plus the same level as a pump
// drive for the shared filter model.
module pd_xor
  import pd_pkg::*;
(
  input  logic  fi,
  input  logic  fo,
  output logic  pd,
  output pump_t pump
);

  always_comb begin
    pd      = fi ^ fo;
    pump.up = pd;
    pump.dn = ~pd;
  end

endmodule
