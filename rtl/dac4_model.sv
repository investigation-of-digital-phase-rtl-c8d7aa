// dac4_model: behavioural model of the 4-bit digital-to-analog converter.
//
// Behavioural model, not synthesizable logic: the real part is an analog
// converter (DC_DAC4 in the reference schematic, inputs DB0..DB3, reference
// REF tied to +5 V, analog ground LGND). The output voltage is
// VREF * code / 16, so code 8 gives VREF/2 and code 15 gives 15/16 of VREF
// (4.6875 V at 5 V), the levels printed on the reference response plot.
// There is no clock; the output follows the code at once.
module dac4_model #(
  parameter real VREF = 5.0
) (
  input  logic [3:0] db,
  output real        vout
);

  always_comb vout = VREF * real'(db) / 16.0;

endmodule
